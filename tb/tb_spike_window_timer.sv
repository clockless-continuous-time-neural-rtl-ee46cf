// tb_spike_window_timer: checks that done pulses exactly WINDOW_TICKS
// cycles after start, once, that running covers the window, and that a start
// inside the window restarts it.
module tb_spike_window_timer;
  localparam int N = 37;
  logic clk = 0, rst_n = 0, start, running, done;
  int checks = 0, failures = 0;

  spike_window_timer #(.WINDOW_TICKS(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_window(int restart_at);
    int t_done;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t_done = -1;
    for (int t = 1; t <= 3 * N; t++) begin
      if (t == restart_at) begin
        start = 1; @(negedge clk); start = 0; t_done = -1; t = 1; restart_at = -1;
      end
      checks++;
      if (done) begin
        if (t_done >= 0) begin failures++; $display("second done"); end
        t_done = t;
      end
      if (t < N && !running) begin failures++; $display("running low at t=%0d", t); end
      @(negedge clk);
    end
    checks++;
    if (t_done != N + 1) begin failures++; $display("done at %0d, want %0d", t_done, N + 1); end
  endtask

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (running || done) failures++;
    run_window(-1);
    run_window(10);
    run_window(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
