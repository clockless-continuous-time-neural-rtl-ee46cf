// tb_sort_engine: random templates in a small memory model, random spike
// features; checks the winning class (lowest FD, ties to the lower index),
// the minimum distance, and that done arrives N_CLASSES + 1 cycles after
// start. Templates are drawn from a narrow range so ties occur.
module tb_sort_engine;
  import ct_sort_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0, start, busy, done;
  logic [2:0][7:0] cnt;
  logic signed [7:0] peak;
  logic [1:0] tpl_idx, cls;
  template_t tpl;
  logic [FD_W-1:0] min_fd;
  template_t mem [NC];
  int checks = 0, failures = 0, n_ties = 0;

  sort_engine #(.N_CLASSES(NC)) dut (.*);
  assign tpl = mem[tpl_idx];
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int x); return x < 0 ? -x : x; endfunction
  function automatic int ref_fd(template_t t);
    int e = 0;
    for (int k = 0; k < 3; k++) e += iabs(int'(cnt[k]) - int'(t.feat[k])) >> t.coef[k];
    e += iabs(int'(peak) - int'($signed(t.feat[3]))) >> t.coef[3];
    return e;
  endfunction

  initial begin
    int best, bfd, f, lat;
    start = 0; cnt = '0; peak = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++)
        for (int k = 0; k < 4; k++) begin
          mem[c].feat[k] = (i % 2) ? 8'($urandom) : 8'($urandom_range(3));
          mem[c].coef[k] = (i % 2) ? 3'($urandom) : 3'd0;
        end
      for (int k = 0; k < 3; k++) cnt[k] = (i % 2) ? 8'($urandom) : 8'($urandom_range(3));
      peak = (i % 2) ? 8'($urandom) : 8'($urandom_range(3));
      best = 0; bfd = ref_fd(mem[0]);
      for (int c = 1; c < NC; c++) begin
        f = ref_fd(mem[c]);
        if (f == bfd) n_ties++;
        if (f < bfd) begin bfd = f; best = c; end
      end
      start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done && lat < 50) begin @(negedge clk); lat++; end
      checks++;
      if (lat != NC + 1) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (int'(cls) != best || int'(min_fd) != bfd) begin
        failures++;
        if (failures < 10) $display("i=%0d cls=%0d fd=%0d want %0d/%0d", i, cls, min_fd, best, bfd);
      end
    end
    checks++;
    if (n_ties == 0) begin failures++; $display("no ties exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
