// Activation signal for the attack ring-oscillator array.
//
// The array is either off, permanently on (static supply-voltage manipulation,
// which lowers the local supply through the resistance of the power network) or
// switched on and off periodically (dynamic manipulation). The dynamic rate of
// 15.24 kHz, chosen to excite a resonance of the power network, and the 125 MHz
// clock are the document's; the square wave with 50 % duty cycle made by a
// half-period counter is this design's choice.
//
// Interface: `mode` selects the behaviour (trng_pkg::attack_mode_e), `active`
// drives the oscillator enables, `toggles` counts rising edges of `active`.
// Timing: in dynamic mode `active` stays high and low for HALF_CYCLES clocks
// each, starting high on the clock after the mode is selected. In static mode
// it goes high one clock after the mode is selected.
module attack_controller #(
  parameter int unsigned CLK_HZ    = trng_pkg::CLK_HZ,
  parameter int unsigned TOGGLE_HZ = 15_240
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  trng_pkg::attack_mode_e mode,
  output logic                   active,
  output logic [31:0]            toggles
);

  // Rounded half period of the activation square wave, in clock cycles.
  localparam int unsigned HALF_CYCLES = (CLK_HZ + TOGGLE_HZ) / (2 * TOGGLE_HZ);
  localparam int unsigned CW = $clog2(HALF_CYCLES + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      cnt     <= '0;
      toggles <= '0;
    end else begin
      unique case (mode)
        trng_pkg::ATTACK_STATIC: begin
          active <= 1'b1;
          cnt    <= '0;
          if (!active) toggles <= toggles + 1;
        end
        trng_pkg::ATTACK_DYNAMIC: begin
          if (cnt == '0) begin
            active <= ~active;
            cnt    <= CW'(HALF_CYCLES - 1);
            if (!active) toggles <= toggles + 1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: begin
          active <= 1'b0;
          cnt    <= '0;
        end
      endcase
    end
  end

endmodule
