// feature_registers: the data registers of one spike: three step counters
// and the peak-value register.
//
// clear (one cycle, at spike detection) zeroes the counters and loads the
// peak with the current level. While en is high, counter i adds one for each
// cycle in which inc[i] is set, and the peak follows any higher level.
// Counters saturate at their maximum instead of wrapping, so a noisy spike
// cannot alias to a small count. All outputs are registered.
//
// From the document: the three counters and the use of the peak value as a
// feature. Width, saturation and the clear/enable protocol are this
// design's own.
module feature_registers
  import ct_sort_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clear,
  input  logic                               en,
  input  logic [N_CNT-1:0]                   inc,
  input  logic signed [ADC_W-1:0]            level,
  output logic [N_CNT-1:0][CNT_W-1:0]        cnt,
  output logic signed [ADC_W-1:0]            peak,
  output logic [N_CNT-1:0]                   sat      // counter i is saturated
);

  always_comb
    for (int i = 0; i < N_CNT; i++) sat[i] = &cnt[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      peak <= '0;
    end else if (clear) begin
      cnt  <= '0;
      peak <= level;
    end else if (en) begin
      for (int i = 0; i < N_CNT; i++)
        if (inc[i] && !sat[i]) cnt[i] <= cnt[i] + 1'b1;
      if (level > peak) peak <= level;
    end
  end

endmodule
