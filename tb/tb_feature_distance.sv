// tb_feature_distance: random features, templates and coefficients, with
// extreme values mixed in, against the distance computed in the testbench
// with integer arithmetic.
module tb_feature_distance;
  import ct_sort_pkg::*;
  logic [2:0][7:0] cnt;
  logic signed [7:0] peak;
  template_t tpl;
  logic [FD_W-1:0] fd;
  int checks = 0, failures = 0;

  feature_distance dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int x); return x < 0 ? -x : x; endfunction

  function automatic logic [7:0] pick();
    case ($urandom_range(5))
      0: return 8'h00;
      1: return 8'hff;
      2: return 8'h80;
      3: return 8'h7f;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    int e;
    for (int i = 0; i < 20000; i++) begin
      for (int k = 0; k < 3; k++) cnt[k] = pick();
      peak = pick();
      for (int k = 0; k < 4; k++) begin
        tpl.feat[k] = pick();
        tpl.coef[k] = 3'($urandom);
      end
      #1;
      e = 0;
      for (int k = 0; k < 3; k++)
        e += iabs(int'(cnt[k]) - int'(tpl.feat[k])) >> tpl.coef[k];
      e += iabs(int'(peak) - int'($signed(tpl.feat[3]))) >> tpl.coef[3];
      checks++;
      if (int'(fd) != e) begin
        failures++;
        if (failures < 10) $display("fd %0d want %0d cnt=%p peak=%0d tpl=%p", fd, e, cnt, peak, tpl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
