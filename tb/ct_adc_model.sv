// ct_adc_model: behavioural model of the analog half of the variable-step
// continuous-time ADC (comparators, delay cells tuned by DAC1, feedback
// DAC2), for simulation only.
//
// vin is the amplified electrode signal in 1/16 LSB. The model compares it
// with the reconstructed level held by the digital trigger: comp_up[k] is
// set when vin exceeds the level by at least 2^k - 1/2 LSB, comp_dn[k] when
// it lies that far below. After every conversion the comparators are held
// off for dac1_code clock cycles, the conversion delay; during that time the
// input may move further, so larger steps follow faster signals.
module ct_adc_model (
  input  logic              clk,
  input  logic              rst_n,
  input  int                vin,
  input  logic signed [7:0] dac2_code,
  input  logic              evt_valid,
  input  logic [3:0]        dac1_code,
  output logic [3:0]        comp_up,
  output logic [3:0]        comp_dn
);
  int hold;
  int diff;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         hold <= 0;
    else if (evt_valid) hold <= int'(dac1_code) - 1;
    else if (hold > 0)  hold <= hold - 1;

  always_comb begin
    diff = vin - 16 * int'(dac2_code);
    for (int k = 0; k < 4; k++) begin
      comp_up[k] = diff >= 16 * (1 << k) - 8;
      comp_dn[k] = -diff >= 16 * (1 << k) - 8;
    end
    if (hold > 0 || (evt_valid && dac1_code != 0)) begin
      comp_up = '0;
      comp_dn = '0;
    end
  end
endmodule
