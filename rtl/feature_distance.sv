// feature_distance: distance between the features of the current spike and
// one class template.
//
//   FD = sum_{i=0..2} |N_i - T_i| >> C_i  +  |PEAK - T_peak| >> C_3
//
// where N_i are the three step counts, PEAK the signed peak level, T the
// template values and C the per-term shift coefficients of the template. A
// right shift by C is the division by 2^C of the document's formula, so a
// large coefficient makes a feature count less. Combinational.
//
// From the document: the four-term sum of differences weighted by
// coefficients. Absolute differences and the power-of-two reading of the
// coefficients are this design's interpretation.
module feature_distance
  import ct_sort_pkg::*;
(
  input  logic [N_CNT-1:0][CNT_W-1:0] cnt,
  input  logic signed [ADC_W-1:0]     peak,
  input  template_t                   tpl,
  output logic [FD_W-1:0]             fd
);

  function automatic logic [ADC_W:0] absdiff(logic signed [ADC_W:0] a, logic signed [ADC_W:0] b);
    logic signed [ADC_W+1:0] d;
    d = $signed({a[ADC_W], a}) - $signed({b[ADC_W], b});
    return (d < 0) ? (ADC_W+1)'(-d) : (ADC_W+1)'(d);
  endfunction

  logic [N_FEAT-1:0][ADC_W:0] term;

  always_comb begin
    for (int i = 0; i < N_CNT; i++)
      term[i] = absdiff($signed({1'b0, cnt[i]}), $signed({1'b0, tpl.feat[i]})) >> tpl.coef[i];
    term[N_CNT] = absdiff($signed({peak[ADC_W-1], peak}),
                          $signed({tpl.feat[N_CNT][ADC_W-1], tpl.feat[N_CNT]})) >> tpl.coef[N_CNT];
    fd = '0;
    for (int i = 0; i < N_FEAT; i++) fd = fd + FD_W'(term[i]);
  end

endmodule
