// Shared types and constants of the TRNG attack experiment chip.
//
// The system clock is 125 MHz, the rate at which the ERO sampler counts its
// accumulation time. The enums select what the attack controller does and which
// source feeds the capture RAMs. The experiment configuration is one struct so
// that the top level carries it as a single port.
package trng_pkg;

  localparam int unsigned CLK_HZ = 125_000_000;

  // Activation of the attack ring-oscillator array.
  typedef enum logic [1:0] {
    ATTACK_OFF     = 2'd0,  // oscillators stopped
    ATTACK_STATIC  = 2'd1,  // oscillators running continuously
    ATTACK_DYNAMIC = 2'd2   // oscillators switched on and off at the toggle rate
  } attack_mode_e;

  // What is written into capture RAM 0.
  typedef enum logic [1:0] {
    SRC_ERO        = 2'd0,  // bits of the victim ERO TRNG
    SRC_TERO_BIT   = 2'd1,  // bits of the TERO TRNG (count LSB)
    SRC_TERO_COUNT = 2'd2,  // whole TERO oscillation counts, one byte each
    SRC_ISOLATION  = 2'd3   // known LFSR pattern (isolation test)
  } source_e;

  typedef struct packed {
    source_e      source;        // channel 0 source
    logic         replica;       // also capture the replica ERO into RAM 1
    attack_mode_e attack_mode;   // supply-voltage manipulation
    logic         lock_inject;   // frequency-matched injector + delay lines on
    logic         lock_ident;    // identical ring oscillators around the target on
  } exp_cfg_t;

endpackage
