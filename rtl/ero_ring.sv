// Behavioural model (not synthesizable logic): the jittery ring oscillator of the
// elementary ring oscillator (ERO) TRNG.
//
// The loop is a NAND gate followed by two buffers, each in its own LUT, and a
// further buffer takes the ring signal out so that the internal signals are
// routed consistently; this structure is the document's. With `en` low the NAND
// output is forced high and the ring rests; with `en` high it oscillates with a
// half period of three stage delays. Each gate transition takes STAGE_DELAY_PS
// plus a uniformly distributed error of +/-JITTER_PS, which makes the phase
// perform a random walk like the thermal jitter of a real ring. The default
// stage delay gives about 1.07 GHz, inside the 1.02-1.13 GHz range measured on
// the device; the jitter size is this model's assumption, since the real
// accumulation rate lies far below the simulator's time resolution.
module ero_ring #(
  parameter int unsigned STAGE_DELAY_PS = 156,
  parameter int unsigned JITTER_PS      = 2
) (
  input  logic en,
  output logic osc
);

  logic nand_o = 1'b1;
  logic buf1   = 1'b1;
  logic buf2   = 1'b1;
  logic obuf   = 1'b1;

  function automatic int unsigned gate_delay();
    return STAGE_DELAY_PS - JITTER_PS + $urandom_range(2 * JITTER_PS);
  endfunction

  always @(en or buf2) nand_o <= #(gate_delay() * 1ps) ~(en & buf2);
  always @(nand_o)     buf1   <= #(gate_delay() * 1ps) nand_o;
  always @(buf1)       buf2   <= #(gate_delay() * 1ps) buf1;
  always @(buf2)       obuf   <= #(gate_delay() * 1ps) buf2;

  assign osc = obuf;

endmodule
