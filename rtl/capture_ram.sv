// Block RAM that buffers the captured random data on chip.
//
// 2^ADDR_W bytes (64 KiB, i.e. 2^19 bits, by default), simple dual port: one
// write port used while capturing and one read port used while sending the
// data to the host. Capacity is the document's; the byte-wide organisation is
// this design's choice. Written as an array so that synthesis infers block RAM.
//
// Timing: writes take effect at the clock edge; `rdata` shows the byte at
// `raddr` one clock after the address is presented. Contents are not reset.
module capture_ram #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [7:0]        wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [7:0]        rdata
);

  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
