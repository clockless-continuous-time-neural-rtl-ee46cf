// feature_mux: routes three of the eight step-event streams of the CT ADC
// (+1, +2, +4, +8, -1, -2, -4, -8) to the three step counters.
//
// Each counter has a configured selection {dn, step}; its increment strobe
// is high in a cycle whose step event matches that selection. Purely
// combinational, so the strobes line up with the registered event.
//
// From the document: the MUX between the trigger and the counters and its
// control by the configuration settings. The select encoding is this
// design's own.
module feature_mux
  import ct_sort_pkg::*;
(
  input  step_evt_t             evt,
  input  evt_sel_t [N_CNT-1:0]  sel,
  output logic     [N_CNT-1:0]  inc
);

  always_comb begin
    for (int i = 0; i < N_CNT; i++)
      inc[i] = evt.valid && (evt.dn == sel[i].dn) && (evt.step == sel[i].step);
  end

endmodule
