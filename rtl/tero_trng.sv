// Behavioural model (it contains the loop, which is not synthesizable logic):
// the complete transition effect ring oscillator (TERO) TRNG.
//
// The sampler (tero_sampler) raises the loop's control signal periodically; the
// loop (tero_loop, two branches of XOR, AND and six buffers) then oscillates for
// a noise-dependent number of periods, which the sampler counts. The count's
// least significant bit is the random bit; the whole count is also brought out,
// since the distribution of counts is how a TERO's quality and its reaction to
// a supply attack are judged.
//
// Timing: as tero_sampler, one result every 2*CTRL_HALF_CYCLES clocks.
module tero_trng #(
  parameter int unsigned CTRL_HALF_CYCLES = 64,
  parameter int unsigned CNT_W            = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [CNT_W-1:0] count,
  output logic             bit_o,
  output logic             valid
);

  logic ctrl, osc;

  tero_loop u_loop (.ctrl(ctrl), .osc(osc));

  tero_sampler #(.CTRL_HALF_CYCLES(CTRL_HALF_CYCLES), .CNT_W(CNT_W)) u_sampler (
    .clk, .rst_n, .en, .ctrl, .osc, .count, .bit_o, .valid
  );

endmodule
