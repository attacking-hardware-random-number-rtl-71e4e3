// Frequency counter for on-chip ring oscillators.
//
// Ring frequencies are measured across the device to characterise the ERO
// rings (about 1.0-1.1 GHz) and to find an injector placement whose frequency
// is closest to the victim's, which the frequency-matched locking attack needs.
// A GHz ring cannot be sampled by the 125 MHz clock directly, so a binary
// prescaler clocked by the ring divides it by 2^PRESCALE_W first (64 by default:
// about 17 MHz, well below half the clock rate). The prescaler's top bit passes
// a two-flop synchroniser, and its rising edges are counted for GATE_CYCLES
// clocks. The ring frequency is then
//   f = count * 2^PRESCALE_W * f_clk / GATE_CYCLES
// (about 1.9 MHz per count with the defaults, +/-1 count of quantisation).
// That frequencies were measured is stated in the literature this design
// follows; how the counter is built is this design's choice.
//
// Interface: a pulse on `start` begins a measurement; `busy` is high during
// the gate; `valid` pulses for one clock when `count` holds the new result.
// Timing: `valid` rises GATE_CYCLES clocks after the clock edge that takes
// `start`. `start` is ignored while `busy`.
module ro_freq_counter #(
  parameter int unsigned PRESCALE_W  = 6,
  parameter int unsigned GATE_CYCLES = 8192,
  parameter int unsigned CNT_W       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             osc,
  output logic             busy,
  output logic [CNT_W-1:0] count,
  output logic             valid
);

  localparam int unsigned GW = $clog2(GATE_CYCLES + 1);

  logic [PRESCALE_W-1:0] pre;
  logic [2:0]            sync;
  logic [GW-1:0]         gate;
  logic [CNT_W-1:0]      acc;
  logic                  rise;

  // Prescaler in the ring's clock domain.
  always_ff @(posedge osc or negedge rst_n) begin
    if (!rst_n) pre <= '0;
    else        pre <= pre + 1'b1;
  end

  assign rise = sync[1] & ~sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= '0;
      gate  <= '0;
      acc   <= '0;
      count <= '0;
      valid <= 1'b0;
      busy  <= 1'b0;
    end else begin
      sync  <= {sync[1:0], pre[PRESCALE_W-1]};
      valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          gate <= GW'(GATE_CYCLES);
          acc  <= '0;
        end
      end else begin
        acc  <= acc + CNT_W'(rise);
        gate <= gate - 1'b1;
        if (gate == GW'(1)) begin
          busy  <= 1'b0;
          count <= acc + CNT_W'(rise);
          valid <= 1'b1;
        end
      end
    end
  end

endmodule
