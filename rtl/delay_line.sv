// Behavioural model (not synthesizable logic): one delay line of the locking
// attack.
//
// A chain of N_STAGES buffers, one LUT each, that carries the signal of the
// frequency-matched injector oscillator into the immediate neighbourhood of the
// target ring, where its switching couples into the target. The output is the
// input delayed by N_STAGES * STAGE_DELAY_PS. Using buffer chains placed around
// the target is the document's; their length and delay are assumptions.
module delay_line #(
  parameter int unsigned N_STAGES       = 8,
  parameter int unsigned STAGE_DELAY_PS = 150
) (
  input  logic din,
  output logic dout
);

  logic [N_STAGES-1:0] stage = '0;

  always @(din) stage[0] <= #(STAGE_DELAY_PS * 1ps) din;

  for (genvar i = 1; i < N_STAGES; i++) begin : g_stage
    always @(stage[i-1]) stage[i] <= #(STAGE_DELAY_PS * 1ps) stage[i-1];
  end

  assign dout = stage[N_STAGES-1];

endmodule
