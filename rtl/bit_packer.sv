// Serial-to-byte packer between a random-bit source and the capture RAM.
//
// Collects eight consecutive valid bits; the first bit of each group ends up in
// bit 0 of the byte. `clr` discards a partial byte so that every capture run
// starts on a byte boundary. Storing the bits bytewise follows from the
// document's 64 KiB memory for 2^19 bits; the bit order is this design's choice.
//
// Timing: `byte_valid` pulses for one clock, one clock after the eighth bit.
module bit_packer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       bit_i,
  input  logic       bit_valid,
  output logic [7:0] byte_o,
  output logic       byte_valid
);

  logic [6:0] sh;
  logic [2:0] n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh         <= '0;
      n          <= '0;
      byte_o     <= '0;
      byte_valid <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      if (clr) begin
        n <= '0;
      end else if (bit_valid) begin
        sh <= {bit_i, sh[6:1]};
        n  <= n + 1'b1;
        if (n == 3'd7) begin
          byte_o     <= {bit_i, sh};
          byte_valid <= 1'b1;
        end
      end
    end
  end

endmodule
