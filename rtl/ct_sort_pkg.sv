// ct_sort_pkg: widths, types and the configuration address map shared by the
// blocks of the event-driven spike sorter.
//
// The sorter works on the output of a variable-step continuous-time ADC whose
// level-crossing steps are +/-1, +/-2, +/-4 and +/-8 LSB of an 8-bit range.
// A step event is described by its direction and a 2-bit step index
// (step size = 1 << index). Three counters count three configurable event
// streams; together with the spike's peak value they form four features.
// The 8-bit counter width, the 3-bit shift coefficients and the address map
// below are this design's own choices.
package ct_sort_pkg;

  localparam int ADC_W   = 8;  // resolution of the CT ADC level
  localparam int N_STEPS = 4;  // step sizes 1, 2, 4, 8 LSB
  localparam int N_CNT   = 3;  // step counters
  localparam int N_FEAT  = N_CNT + 1;  // counters plus peak value
  localparam int CNT_W   = 8;  // counter width (saturating)
  localparam int COEF_W  = 3;  // shift amount of one FD term
  localparam int FD_W    = 11; // sum of four terms of at most 255

  // One step event of the CT ADC.
  typedef struct packed {
    logic       valid;  // an event happened in this cycle
    logic       dn;     // 1: decrement, 0: increment
    logic [1:0] step;   // step size = 1 << step
  } step_evt_t;

  // Selection of one event stream for a counter.
  typedef struct packed {
    logic       dn;
    logic [1:0] step;
  } evt_sel_t;

  // Template of one spike class: the four feature values and their
  // coefficients. feat[0..2] are counter values, feat[3] is the peak
  // (signed, two's complement).
  typedef struct packed {
    logic [N_FEAT-1:0][COEF_W-1:0] coef;
    logic [N_FEAT-1:0][CNT_W-1:0]  feat;
  } template_t;

  // Configuration word layout and address map.
  localparam int CFG_DW       = COEF_W + CNT_W;  // 11-bit words
  localparam int CFG_THRESH   = 0;  // [7:0] signed detection threshold
  localparam int CFG_MUXSEL   = 1;  // [8:0] {sel2, sel1, sel0}
  localparam int CFG_DAC1     = 2;  // [3:0] ADC delay code
  localparam int CFG_TPL_BASE = 4;  // 4 + 4*class + feature: {coef, feat}

  function automatic int cfg_aw(int n_classes);
    return $clog2(CFG_TPL_BASE + N_FEAT * n_classes);
  endfunction

endpackage
