// ct_spike_sorter: event-driven spike sorter for one neural recording channel.
//
// The channel's analog front end and variable-step level-crossing ADC are
// outside this module: their comparators deliver, as thermometer codes, how
// far the input has moved above (comp_up) or below (comp_dn) the
// reconstructed level, in steps of 1, 2, 4 and 8 LSB. The module
//   - turns these into step events and keeps the 8-bit level (trigger_timing),
//     whose value drives the feedback DAC (dac2_code);
//   - routes three configured event streams (feature_mux) to three counters
//     and tracks the peak level (feature_registers);
//   - detects a spike when the level rises above the threshold, opens a
//     fixed spike window (spike_window_timer) and counts until it closes
//     (spike_controller);
//   - compares the four features with each class template by a weighted
//     L1 distance and picks the nearest class (sort_engine);
//   - reports the class as an address event {CHANNEL_ID, class} over a
//     four-phase req/ack handshake (aer_tx).
// Threshold, stream selections, ADC delay code (dac1_code) and templates are
// written after offline training through the cfg_* port (config_memory).
//
// Nothing happens between events apart from the window timer: in hardware
// built from this, power follows spike activity. The clock clk samples the
// event strobes; the document's design is clockless, and this synchronous
// rendering is this design's own choice. Latency from window end to
// aer_req is N_CLASSES + 3 cycles when the output is free.
module ct_spike_sorter
  import ct_sort_pkg::*;
#(
  parameter int          N_CLASSES    = 4,
  parameter int unsigned WINDOW_TICKS = 2000,
  parameter int          CH_W         = 4,
  parameter int          CHANNEL_ID   = 0,
  localparam int AW  = cfg_aw(N_CLASSES),
  localparam int CIW = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // analog comparators of the CT ADC
  input  logic [N_STEPS-1:0]    comp_up,
  input  logic [N_STEPS-1:0]    comp_dn,
  // to the ADC's DACs
  output logic [ADC_W-1:0]      dac2_code,
  output logic [3:0]            dac1_code,
  // configuration upload
  input  logic                  cfg_we,
  input  logic [AW-1:0]         cfg_addr,
  input  logic [CFG_DW-1:0]     cfg_wdata,
  // status and output
  output logic                  spike_active,
  output step_evt_t             evt,
  output logic                  aer_req,
  input  logic                  aer_ack,
  output logic [CH_W+CIW-1:0]   aer_addr
);

  logic signed [ADC_W-1:0]     level, threshold;
  evt_sel_t [N_CNT-1:0]        mux_sel;
  logic [N_CNT-1:0]            inc, sat;
  logic [N_CNT-1:0][CNT_W-1:0] cnt;
  logic signed [ADC_W-1:0]     peak;
  logic [CIW-1:0]              tpl_idx, cls;
  template_t                   tpl;
  logic [FD_W-1:0]             min_fd;
  logic feat_clear, feat_en, win_start, win_running, win_done;
  logic sort_start, sort_busy, sort_done, aer_ready, aer_load, cooling;

  trigger_timing u_trig (
    .clk, .rst_n, .comp_up, .comp_dn, .evt, .level
  );
  assign dac2_code = level;

  config_memory #(.N_CLASSES(N_CLASSES)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .threshold, .mux_sel, .dac1_code, .tpl_idx, .tpl
  );

  feature_mux u_mux (.evt, .sel(mux_sel), .inc);

  feature_registers u_regs (
    .clk, .rst_n, .clear(feat_clear), .en(feat_en), .inc, .level,
    .cnt, .peak, .sat
  );

  spike_window_timer #(.WINDOW_TICKS(WINDOW_TICKS)) u_win (
    .clk, .rst_n, .start(win_start), .running(win_running), .done(win_done)
  );

  spike_controller u_ctl (
    .clk, .rst_n, .level, .threshold, .win_done, .sort_done, .aer_ready,
    .feat_clear, .feat_en, .win_start, .sort_start, .aer_load,
    .spike_active, .cooling
  );

  sort_engine #(.N_CLASSES(N_CLASSES)) u_sort (
    .clk, .rst_n, .start(sort_start), .cnt, .peak, .tpl_idx, .tpl,
    .busy(sort_busy), .done(sort_done), .cls, .min_fd
  );

  aer_tx #(.CH_W(CH_W), .CLS_W(CIW), .CHANNEL_ID(CHANNEL_ID)) u_aer (
    .clk, .rst_n, .load(aer_load), .cls, .ready(aer_ready),
    .req(aer_req), .ack(aer_ack), .addr(aer_addr)
  );

endmodule
