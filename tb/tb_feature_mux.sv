// tb_feature_mux: checks all 8 event streams against all selections of the
// three counters, exhaustively, plus the no-event case.
module tb_feature_mux;
  import ct_sort_pkg::*;
  step_evt_t evt;
  evt_sel_t [2:0] sel;
  logic [2:0] inc;
  int checks = 0, failures = 0;

  feature_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 2; v++)
      for (int e = 0; e < 8; e++)
        for (int s = 0; s < 512; s++) begin
          evt = '{valid: v[0], dn: e[2], step: e[1:0]};
          sel = 9'(s);
          #1;
          for (int i = 0; i < 3; i++) begin
            exp = v[0] && (((s >> (3 * i)) & 7) == e);
            checks++;
            if (inc[i] !== exp) begin
              failures++;
              if (failures < 10) $display("mismatch v=%0d e=%0d s=%0h i=%0d inc=%b", v, e, s, i, inc);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
