// spike_controller: the detect-and-sort state machine of one channel.
//
//   IDLE     - the level register follows the ADC; when the level rises above
//              the threshold a spike is detected: the feature registers are
//              cleared (peak loaded with the level) and the window started.
//   SPIKE    - the selected step events are counted and the peak tracked
//              until the spike window ends (win_done).
//   SORT     - the sort engine compares the features with every template.
//   EMIT     - the winning class is handed to the address-event sender as
//              soon as it is ready.
//   COOLDOWN - the detector re-arms only once the level is back at or below
//              the threshold, so one long spike is not reported twice.
//
// Outputs are decoded from the state and inputs in the same cycle (Mealy):
// feat_clear/win_start on detection, sort_start at window end, aer_load
// when the result is handed over. spike_active is high during SPIKE.
//
// From the document: detection by threshold crossing, accumulation until the
// delay element ends the window, minimum-distance sorting and the
// address-event output. The explicit cool-down state is this design's
// reading of the level test in the flow chart.
module spike_controller
  import ct_sort_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] level,
  input  logic signed [ADC_W-1:0] threshold,
  input  logic                    win_done,
  input  logic                    sort_done,
  input  logic                    aer_ready,
  output logic                    feat_clear,
  output logic                    feat_en,
  output logic                    win_start,
  output logic                    sort_start,
  output logic                    aer_load,
  output logic                    spike_active,
  output logic                    cooling
);

  typedef enum logic [2:0] {IDLE, SPIKE, SORT, EMIT, COOLDOWN} ctl_state_t;

  ctl_state_t state, nxt;

  always_comb begin
    nxt        = state;
    feat_clear = 1'b0;
    feat_en    = 1'b0;
    win_start  = 1'b0;
    sort_start = 1'b0;
    aer_load   = 1'b0;
    unique case (state)
      IDLE: if (level > threshold) begin
        feat_clear = 1'b1;
        win_start  = 1'b1;
        nxt        = SPIKE;
      end
      SPIKE: begin
        feat_en = 1'b1;
        if (win_done) begin
          sort_start = 1'b1;
          nxt        = SORT;
        end
      end
      SORT: if (sort_done) nxt = EMIT;
      EMIT: if (aer_ready) begin
        aer_load = 1'b1;
        nxt      = COOLDOWN;
      end
      COOLDOWN: if (level <= threshold) nxt = IDLE;
      default: nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= nxt;
  end

  assign spike_active = (state == SPIKE);
  assign cooling      = (state == COOLDOWN);

endmodule
