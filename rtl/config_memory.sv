// config_memory: the in-channel configuration and template memory.
//
// Written after offline training through a simple word port (cfg_we,
// cfg_addr, cfg_wdata; one word per cycle). It holds the detection
// threshold, the three MUX selections, the ADC delay code for DAC1 and, for
// each of N_CLASSES spike classes, four template words {coef, feat}: the
// expected counts of the three selected event streams and the expected peak,
// each with the shift coefficient of its term in the feature distance.
//
// Address map (see ct_sort_pkg): 0 threshold, 1 {sel2,sel1,sel0}, 2 DAC1
// code, 4 + 4*class + feature the template words. Writes to unused addresses
// are ignored. Template words are read combinationally by class index
// (tpl_idx -> tpl), one class at a time. All words reset to zero.
//
// From the document: what the memory holds (thresholds, selected features,
// classification coefficients, ADC delay). The word port, the address map and
// the number of classes are this design's own.
module config_memory
  import ct_sort_pkg::*;
#(
  parameter int N_CLASSES = 4,
  localparam int AW  = cfg_aw(N_CLASSES),
  localparam int CIW = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [AW-1:0]           cfg_addr,
  input  logic [CFG_DW-1:0]       cfg_wdata,
  output logic signed [ADC_W-1:0] threshold,
  output evt_sel_t [N_CNT-1:0]    mux_sel,
  output logic [3:0]              dac1_code,
  input  logic [CIW-1:0]          tpl_idx,
  output template_t               tpl
);

  logic [ADC_W-1:0]       thresh_q;
  logic [3*N_CNT-1:0]     sel_q;
  logic [3:0]             dac1_q;
  logic [CFG_DW-1:0]      tpl_mem [N_CLASSES*N_FEAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thresh_q <= '0;
      sel_q    <= '0;
      dac1_q   <= '0;
      for (int i = 0; i < N_CLASSES * N_FEAT; i++) tpl_mem[i] <= '0;
    end else if (cfg_we) begin
      if (int'(cfg_addr) == CFG_THRESH) thresh_q <= cfg_wdata[ADC_W-1:0];
      if (int'(cfg_addr) == CFG_MUXSEL) sel_q    <= cfg_wdata[3*N_CNT-1:0];
      if (int'(cfg_addr) == CFG_DAC1)   dac1_q   <= cfg_wdata[3:0];
      if (int'(cfg_addr) >= CFG_TPL_BASE && int'(cfg_addr) < CFG_TPL_BASE + N_CLASSES * N_FEAT)
        tpl_mem[int'(cfg_addr) - CFG_TPL_BASE] <= cfg_wdata;
    end
  end

  assign threshold = thresh_q;
  assign mux_sel   = sel_q;
  assign dac1_code = dac1_q;

  always_comb begin
    tpl = '0;
    for (int f = 0; f < N_FEAT; f++) begin
      tpl.feat[f] = tpl_mem[int'(tpl_idx) * N_FEAT + f][CNT_W-1:0];
      tpl.coef[f] = tpl_mem[int'(tpl_idx) * N_FEAT + f][CFG_DW-1:CNT_W];
    end
  end

endmodule
