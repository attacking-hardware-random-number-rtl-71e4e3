// Behavioural model (it contains the ring, which is not synthesizable logic):
// the complete elementary ring oscillator (ERO) TRNG.
//
// A free-running ring (ero_ring: NAND plus two buffers in the loop, one output
// buffer) accumulates jitter, and the sampler (ero_sampler) captures its output
// every ACC_CYCLES clocks. The four gates and the sampling flip-flop fit one
// four-LUT slice in the FPGA. One random bit is produced per accumulation time:
// 512 clocks at 125 MHz, about 4.1 us, in the document's configuration.
//
// Timing: as ero_sampler; `en` also starts and stops the ring. `osc` is the
// buffered ring output, brought out so the ring frequency can be measured.
module ero_trng #(
  parameter int unsigned ACC_CYCLES     = 512,
  parameter int unsigned STAGE_DELAY_PS = 156
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic bit_o,
  output logic valid,
  output logic osc     // ring output, for frequency measurement
);

  ero_ring #(.STAGE_DELAY_PS(STAGE_DELAY_PS)) u_ring (.en(en), .osc(osc));

  ero_sampler #(.ACC_CYCLES(ACC_CYCLES)) u_sampler (
    .clk, .rst_n, .en, .osc, .bit_o, .valid
  );

endmodule
