// tb_feature_registers: random increments, clears and levels against a
// reference model of three saturating counters and a peak tracker. One
// phase holds all increments high long enough to saturate every counter.
module tb_feature_registers;
  import ct_sort_pkg::*;
  logic clk = 0, rst_n = 0, clear, en;
  logic [2:0] inc, sat;
  logic signed [7:0] level, peak;
  logic [2:0][7:0] cnt;
  int checks = 0, failures = 0;
  int rc [3];
  int rpeak, n_sat = 0;

  feature_registers dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; en = 0; inc = 0; level = 0;
    rc = '{0, 0, 0}; rpeak = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      clear = (($urandom_range(150) == 0) && !(i >= 1000 && i < 1400)) || i == 0 || i == 2000;
      en    = (i >= 1000 && i < 1400) ? 1'b1 : ($urandom_range(4) != 0);
      inc   = (i >= 1000 && i < 1400) ? 3'b111 : 3'($urandom);
      level = 8'($urandom);
      @(posedge clk); #1;
      if (clear) begin
        rc = '{0, 0, 0}; rpeak = int'(level);
      end else if (en) begin
        for (int k = 0; k < 3; k++)
          if (inc[k]) begin
            if (rc[k] < 255) rc[k]++; else n_sat++;
          end
        if (int'(level) > rpeak) rpeak = int'(level);
      end
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (int'(cnt[k]) != rc[k] || sat[k] !== (rc[k] == 255)) begin
          failures++;
          if (failures < 10) $display("cnt mismatch i=%0d k=%0d %0d ref %0d", i, k, cnt[k], rc[k]);
        end
      end
      checks++;
      if (int'(peak) != rpeak) begin
        failures++;
        if (failures < 10) $display("peak mismatch i=%0d %0d ref %0d", i, peak, rpeak);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
