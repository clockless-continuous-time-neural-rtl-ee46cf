// tb_config_memory: writes random words to every address (including unused
// ones) in random order, and checks the threshold, MUX selections, DAC1 code
// and each class template read back by class index against a shadow copy.
module tb_config_memory;
  import ct_sort_pkg::*;
  localparam int NC = 4;
  localparam int AW = cfg_aw(NC);
  logic clk = 0, rst_n = 0, cfg_we;
  logic [AW-1:0] cfg_addr;
  logic [CFG_DW-1:0] cfg_wdata;
  logic signed [7:0] threshold;
  evt_sel_t [2:0] mux_sel;
  logic [3:0] dac1_code;
  logic [1:0] tpl_idx;
  template_t tpl;
  int checks = 0, failures = 0;
  logic [CFG_DW-1:0] shadow [1 << AW];

  config_memory #(.N_CLASSES(NC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    checks++;
    if (threshold !== shadow[0][7:0]) begin failures++; $display("threshold %h", threshold); end
    checks++;
    if (mux_sel !== shadow[1][8:0]) begin failures++; $display("mux_sel %h", mux_sel); end
    checks++;
    if (dac1_code !== shadow[2][3:0]) begin failures++; $display("dac1 %h", dac1_code); end
    for (int c = 0; c < NC; c++) begin
      tpl_idx = 2'(c);
      #1;
      for (int f = 0; f < 4; f++) begin
        checks++;
        if (tpl.feat[f] !== shadow[4 + 4 * c + f][7:0] || tpl.coef[f] !== shadow[4 + 4 * c + f][10:8]) begin
          failures++;
          if (failures < 10) $display("tpl c=%0d f=%0d got %h/%h", c, f, tpl.coef[f], tpl.feat[f]);
        end
      end
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; tpl_idx = 0;
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      cfg_we    = ($urandom_range(3) != 0);
      cfg_addr  = AW'($urandom);
      cfg_wdata = CFG_DW'($urandom);
      @(posedge clk);
      if (cfg_we) shadow[cfg_addr] = cfg_wdata;
      @(negedge clk);
      cfg_we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
