// Control and counting logic of the transition effect ring oscillator (TERO).
//
// A phase counter produces the control signal `ctrl`: high for CTRL_HALF_CYCLES
// clocks, then low for as many. While `ctrl` is high the loop oscillates for a
// random number of periods and a counter clocked by the loop output counts its
// rising edges. In the last clock of the high phase the loop has settled, so the
// count is static and is copied into the clock domain; its least significant bit
// is the random bit. While `ctrl` is low the oscillation counter is held in reset.
// Counting oscillations and taking the count's LSB is the document's; the
// control period, the counter width and the capture point are this design's.
//
// Timing: one `valid` pulse every 2*CTRL_HALF_CYCLES clocks; `count` and
// `bit_o` are held until the next pulse. The counter wraps at 2^CNT_W.
// The loop must settle within CTRL_HALF_CYCLES clocks of `ctrl` rising.
module tero_sampler #(
  parameter int unsigned CTRL_HALF_CYCLES = 64,
  parameter int unsigned CNT_W            = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic             ctrl,
  input  logic             osc,
  output logic [CNT_W-1:0] count,
  output logic             bit_o,
  output logic             valid
);

  localparam int unsigned PW = $clog2(2 * CTRL_HALF_CYCLES);

  logic [PW-1:0]    phase;
  logic [CNT_W-1:0] osc_cnt;
  logic             osc_clr;

  assign osc_clr = ~ctrl;   // driven by a flip-flop, so glitch-free
  assign bit_o   = count[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      ctrl  <= 1'b0;
      count <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (!en) begin
        phase <= '0;
        ctrl  <= 1'b0;
      end else begin
        phase <= (phase == PW'(2 * CTRL_HALF_CYCLES - 1)) ? '0 : phase + 1'b1;
        ctrl  <= (phase == PW'(2 * CTRL_HALF_CYCLES - 1)) || (phase < PW'(CTRL_HALF_CYCLES - 1));
        if (phase == PW'(CTRL_HALF_CYCLES - 1)) begin
          count <= osc_cnt;
          valid <= 1'b1;
        end
      end
    end
  end

  // Oscillation counter in the loop's own clock domain.
  always_ff @(posedge osc or posedge osc_clr) begin
    if (osc_clr) osc_cnt <= '0;
    else         osc_cnt <= osc_cnt + 1'b1;
  end

endmodule
