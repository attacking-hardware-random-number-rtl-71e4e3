// Behavioural model (not synthesizable logic): the attack circuit of the
// supply-voltage manipulation scenario.
//
// N_SLICES slices are filled with single-LUT ring oscillators, one per LUT6_2,
// LUTS_PER_SLICE per slice (400 slices of four LUTs by default: 1600
// oscillators). All share the activation signal `en`, so switching it on draws a
// large current step from the local power distribution network. The individual
// oscillator outputs are brought out only so that their activity can be
// observed. Slice count and LUT count per slice follow the document; the
// oscillator delay is an assumption of attack_ro.
module attack_ro_array #(
  parameter int unsigned N_SLICES       = 400,
  parameter int unsigned LUTS_PER_SLICE = 4,
  parameter int unsigned HALF_PERIOD_PS = 300
) (
  input  logic                               en,
  output logic [N_SLICES*LUTS_PER_SLICE-1:0] osc
);

  for (genvar i = 0; i < N_SLICES * LUTS_PER_SLICE; i++) begin : g_ro
    attack_ro #(.HALF_PERIOD_PS(HALF_PERIOD_PS)) u_ro (.en(en), .osc(osc[i]));
  end

endmodule
