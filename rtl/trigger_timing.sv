// trigger_timing: digital trigger of the variable-step continuous-time ADC.
//
// The analog comparators report, as two 4-bit thermometer codes, whether the
// input lies above (comp_up) or below (comp_dn) the reconstructed level by at
// least 1, 2, 4 or 8 LSB (each threshold sitting half an LSB before the step).
// In the cycle a comparator fires, the largest step crossed is taken: the
// level register moves by that step, saturating at the ends of the signed
// 8-bit range, and a one-cycle step event {valid, dn, step} is issued. The
// level is the code of the feedback DAC and the ADC value seen by the
// spike detector.
//
// Timing: event and level are registered; both change on the clock edge
// after the comparator outputs are seen. Up has priority over down should
// both fire (the analog side never does this).
//
// From the document: step sizes +/-1, 2, 4, 8 and the 8-bit resolution.
// This design's own: "largest crossed step wins", saturation, the synchronous
// rendering of the clockless trigger, and reset of the level to 0.
module trigger_timing
  import ct_sort_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_STEPS-1:0]      comp_up,
  input  logic [N_STEPS-1:0]      comp_dn,
  output step_evt_t               evt,
  output logic signed [ADC_W-1:0] level
);

  localparam logic signed [ADC_W:0] LVL_MAX = (1 <<< (ADC_W - 1)) - 1;
  localparam logic signed [ADC_W:0] LVL_MIN = -(1 <<< (ADC_W - 1));

  // Index of the highest set bit of a thermometer code.
  function automatic logic [1:0] top_idx(logic [N_STEPS-1:0] c);
    logic [1:0] r;
    r = '0;
    for (int i = 0; i < N_STEPS; i++)
      if (c[i]) r = 2'(i);
    return r;
  endfunction

  step_evt_t             nxt_evt;
  logic signed [ADC_W:0] nxt_sum;

  always_comb begin
    nxt_evt = '0;
    if (|comp_up) begin
      nxt_evt.valid = 1'b1;
      nxt_evt.dn    = 1'b0;
      nxt_evt.step  = top_idx(comp_up);
    end else if (|comp_dn) begin
      nxt_evt.valid = 1'b1;
      nxt_evt.dn    = 1'b1;
      nxt_evt.step  = top_idx(comp_dn);
    end
    nxt_sum = $signed({level[ADC_W-1], level});
    if (nxt_evt.valid) begin
      if (nxt_evt.dn) nxt_sum = nxt_sum - $signed((ADC_W+1)'(1 << nxt_evt.step));
      else            nxt_sum = nxt_sum + $signed((ADC_W+1)'(1 << nxt_evt.step));
    end
    if (nxt_sum > LVL_MAX) nxt_sum = LVL_MAX;
    if (nxt_sum < LVL_MIN) nxt_sum = LVL_MIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evt   <= '0;
      level <= '0;
    end else begin
      evt   <= nxt_evt;
      level <= nxt_sum[ADC_W-1:0];
    end
  end

endmodule
