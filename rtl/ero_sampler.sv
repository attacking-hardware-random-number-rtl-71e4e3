// Sampling stage of the elementary ring oscillator (ERO) TRNG.
//
// The ring runs freely and accumulates jitter; a counter measures the
// accumulation time of ACC_CYCLES system clocks (2^9 clocks at 125 MHz in the
// document, one bit every 4.1 us), and at its end the ring output is captured
// in the sampling flip-flop. The captured value is the random bit. The ring
// output is asynchronous to the clock and is sampled without a synchroniser,
// as in an ERO: the flip-flop itself is the digitiser. The counter is this
// design's way of producing the sampling instant.
//
// Timing: after `en` rises, `valid` pulses for one clock every ACC_CYCLES
// clocks, the first one ACC_CYCLES clocks after `en` was first seen high;
// `bit_o` holds the sample from that pulse until the next one.
module ero_sampler #(
  parameter int unsigned ACC_CYCLES = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic osc,
  output logic bit_o,
  output logic valid
);

  localparam int unsigned CW = (ACC_CYCLES > 1) ? $clog2(ACC_CYCLES) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      bit_o <= 1'b0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (!en) begin
        cnt <= '0;
      end else if (cnt == CW'(ACC_CYCLES - 1)) begin
        cnt   <= '0;
        bit_o <= osc;
        valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
