// Data-gathering controller: capture into block RAM, then send to the host.
//
// A run starts with `start`. In the capture phase every byte offered on channel
// 0 is written to RAM 0 at consecutive addresses until the RAM is full; when
// `dual` is set (replica observation), channel 1 fills RAM 1 at the same time.
// Capturing first and transmitting afterwards keeps the slow UART from dropping
// bits and gives 2^(ADDR_W+3) consecutive bits per channel. In the dump phase
// RAM 0 and then, if `dual`, RAM 1 are read out byte by byte in address order
// and sent through the UART. RAM capacity, the second RAM for the replica and
// capture-then-send are the document's; the dump order and the handshake are
// this design's choices.
//
// Interface: `b*_valid` are one-clock strobes with `b*` as data; bytes that
// arrive while not capturing are ignored. `capturing` is high during the
// capture phase, `busy` from `start` until the last stop bit has been sent.
// `dual` is sampled at `start`.
module data_gatherer #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned CLK_HZ = trng_pkg::CLK_HZ,
  parameter int unsigned BAUD   = 921_600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       dual,
  input  logic [7:0] b0,
  input  logic       b0_valid,
  input  logic [7:0] b1,
  input  logic       b1_valid,
  output logic       txd,
  output logic       busy,
  output logic       capturing
);

  typedef enum logic [2:0] {
    S_IDLE, S_CAPTURE, S_READ, S_WAIT, S_SEND, S_DRAIN
  } state_e;

  state_e            state;
  logic              dual_q;
  logic              ch;        // channel being sent
  logic [ADDR_W-1:0] wa0, wa1, ra;
  logic              full0, full1;
  logic [7:0]        rd0, rd1, tx_data;
  logic              tx_valid, tx_ready;

  capture_ram #(.ADDR_W(ADDR_W)) u_ram0 (
    .clk, .we(capturing && b0_valid && !full0), .waddr(wa0), .wdata(b0),
    .raddr(ra), .rdata(rd0)
  );

  capture_ram #(.ADDR_W(ADDR_W)) u_ram1 (
    .clk, .we(capturing && dual_q && b1_valid && !full1), .waddr(wa1), .wdata(b1),
    .raddr(ra), .rdata(rd1)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd
  );

  assign capturing = (state == S_CAPTURE);
  assign busy      = (state != S_IDLE);
  assign tx_valid  = (state == S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      dual_q  <= 1'b0;
      ch      <= 1'b0;
      wa0     <= '0;
      wa1     <= '0;
      ra      <= '0;
      full0   <= 1'b0;
      full1   <= 1'b0;
      tx_data <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_CAPTURE;
          dual_q <= dual;
          wa0    <= '0;
          wa1    <= '0;
          full0  <= 1'b0;
          full1  <= 1'b0;
        end
        S_CAPTURE: begin
          if (b0_valid && !full0) begin
            wa0 <= wa0 + 1'b1;
            if (wa0 == '1) full0 <= 1'b1;
          end
          if (dual_q && b1_valid && !full1) begin
            wa1 <= wa1 + 1'b1;
            if (wa1 == '1) full1 <= 1'b1;
          end
          if (full0 && (full1 || !dual_q)) begin
            state <= S_READ;
            ch    <= 1'b0;
            ra    <= '0;
          end
        end
        S_READ: state <= S_WAIT;   // address presented, data next clock
        S_WAIT: begin
          tx_data <= ch ? rd1 : rd0;
          state   <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          ra <= ra + 1'b1;
          if (ra != '1) begin
            state <= S_READ;
          end else if (!ch && dual_q) begin
            ch    <= 1'b1;
            state <= S_READ;
          end else begin
            state <= S_DRAIN;
          end
        end
        S_DRAIN: if (tx_ready && !tx_valid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
