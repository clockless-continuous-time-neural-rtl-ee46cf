// tb_trigger_timing: drives random thermometer comparator codes into the
// trigger and checks the step event and the saturating level register
// against a reference computed in the testbench. Long runs of up-only and
// down-only codes push the level into both saturation limits.
module tb_trigger_timing;
  import ct_sort_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] comp_up, comp_dn;
  step_evt_t evt;
  logic signed [7:0] level;
  int checks = 0, failures = 0;
  int ref_level;
  int n_sat_hi = 0, n_sat_lo = 0;

  trigger_timing dut (.*);

  always #5 clk = ~clk;

  function automatic logic [3:0] therm(int n);  // n highest steps set
    return 4'((1 << n) - 1);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nu, nd, exp_step, stp;
    comp_up = 0; comp_dn = 0;
    ref_level = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      nu = 0; nd = 0;
      if (i < 1000)      begin nu = $urandom_range(4); nd = ($urandom_range(3) == 0) ? $urandom_range(4) : 0; end
      else if (i < 1200) nu = $urandom_range(4);
      else if (i < 1500) nd = $urandom_range(4);
      else begin nu = $urandom_range(4); nd = $urandom_range(4); end
      comp_up = therm(nu);
      comp_dn = therm(nd);
      @(posedge clk); #1;
      checks++;
      if (nu > 0) begin
        stp = 1 << (nu - 1); exp_step = nu - 1;
        ref_level = ref_level + stp;
      end else if (nd > 0) begin
        stp = 1 << (nd - 1); exp_step = nd - 1;
        ref_level = ref_level - stp;
      end
      if (ref_level > 127) begin ref_level = 127; n_sat_hi++; end
      if (ref_level < -128) begin ref_level = -128; n_sat_lo++; end
      if (evt.valid !== (nu > 0 || nd > 0) ||
          (evt.valid && (evt.dn !== (nu == 0) || int'(evt.step) != exp_step)) ||
          int'(level) != ref_level) begin
        failures++;
        if (failures < 10)
          $display("mismatch i=%0d nu=%0d nd=%0d evt=%p level=%0d ref=%0d", i, nu, nd, evt, level, ref_level);
      end
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("saturation not reached hi=%0d lo=%0d", n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
