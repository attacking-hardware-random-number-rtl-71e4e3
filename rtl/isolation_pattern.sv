// Known-pattern source for the isolation test.
//
// Before each attack experiment the data-gathering path is checked under the
// same attack conditions with a sequence the host can predict, so that any
// corruption of stored or transmitted data would show. The sequence here is a
// 16-bit maximal-length Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1) that
// shifts right by one bit per clock while `en` is high; the output is the bit
// shifted out. The need for the test is the document's; the pattern is this
// design's choice.
//
// Timing: `valid` follows `en` by one clock, `bit_o` is valid with it.
// After reset or `clr` the state is SEED and the next bit is SEED[0], so every
// capture run starts the same sequence.
module isolation_pattern #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  output logic bit_o,
  output logic valid
);

  logic [15:0] lfsr;
  logic        fb;

  assign fb = lfsr[0] ^ lfsr[2] ^ lfsr[3] ^ lfsr[5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr  <= SEED;
      bit_o <= 1'b0;
      valid <= 1'b0;
    end else begin
      valid <= en && !clr;
      if (clr) begin
        lfsr <= SEED;
      end else if (en) begin
        bit_o <= lfsr[0];
        lfsr  <= {fb, lfsr[15:1]};
      end
    end
  end

endmodule
