// UART transmitter that carries the captured data to the host computer.
//
// Sends 8N1 frames, least significant bit first: a start bit (0), eight data
// bits and a stop bit (1), each held for DIV = round(CLK_HZ / BAUD) clocks. The
// document only names the transmitter; frame format and baud rate (921600, about
// 0.3 % off with a 125 MHz clock) are this design's choices.
//
// Interface: ready/valid. A byte is taken when `valid` and `ready` are both high;
// `ready` is high exactly while the line is idle. The start bit begins on the
// clock after the handshake; one frame takes 10*DIV clocks.
module uart_tx #(
  parameter int unsigned CLK_HZ = trng_pkg::CLK_HZ,
  parameter int unsigned BAUD   = 921_600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned DW  = $clog2(DIV);

  logic [9:0]    frame;
  logic [3:0]    nbits;
  logic [DW-1:0] tick;

  assign ready = (nbits == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1;
      nbits <= '0;
      tick  <= '0;
      txd   <= 1'b1;
    end else if (nbits == '0) begin
      txd <= 1'b1;
      if (valid) begin
        frame <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        tick  <= '0;
        txd   <= 1'b0;
      end
    end else if (tick == DW'(DIV - 1)) begin
      tick  <= '0;
      frame <= {1'b1, frame[9:1]};
      nbits <= nbits - 1'b1;
      txd   <= (nbits == 4'd1) ? 1'b1 : frame[1];
    end else begin
      tick <= tick + 1'b1;
    end
  end

  // A byte offered while busy must be held until accepted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    valid && !ready |=> valid && $stable(data));

endmodule
