// Behavioural model (not synthesizable logic): one attack ring oscillator.
//
// In the FPGA each attack oscillator occupies a single LUT6_2: the LUT computes
// NAND(enable, own output) and its output is routed straight back to one of its
// inputs, so the loop consists of one LUT and its routing. While `en` is high the
// output toggles every HALF_PERIOD_PS picoseconds; while it is low the output
// settles high. The oscillators have no logical function in the experiment:
// their switching current is what lowers the supply voltage of the neighbourhood.
// The single-LUT mapping is the document's; the NAND form and the delay value
// are this model's assumptions.
module attack_ro #(
  parameter int unsigned HALF_PERIOD_PS = 300
) (
  input  logic en,
  output logic osc
);

  logic q = 1'b1;

  always @(en or q) q <= #(HALF_PERIOD_PS * 1ps) ~(en & q);

  assign osc = q;

endmodule
