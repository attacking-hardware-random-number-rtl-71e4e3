// Behavioural model (not synthesizable logic): the bi-stable loop of the
// transition effect ring oscillator (TERO).
//
// The loop has two branches of one XOR gate, one AND gate and six buffers each.
// Raising `ctrl` releases both AND gates at once and two transitions start
// chasing each other around the loop; the output `osc` oscillates until the
// small delay mismatch between the branches, disturbed by gate noise, makes one
// transition catch the other and the loop settles. The number of periods is
// therefore random; its least significant bit is the TERO's random bit. Lowering
// `ctrl` forces the loop back to zero.
//
// The model does not simulate the gates. It tracks the width of the travelling
// pulse: it starts at W0_PS and shrinks per half period by MISMATCH_PS plus a
// uniform noise of +/-NOISE_PS; the oscillation stops when the width reaches
// zero. The branch structure is the document's; the decay law and all four
// numbers are this model's assumptions (about 40 periods on average).
module tero_loop #(
  parameter int unsigned HALF_PERIOD_PS = 1200,
  parameter int          W0_PS          = 160,
  parameter int          MISMATCH_PS    = 2,
  parameter int          NOISE_PS       = 3
) (
  input  logic ctrl,
  output logic osc
);

  int width;

  initial begin
    osc = 1'b0;
    forever begin
      @(posedge ctrl);
      width = W0_PS;
      while (ctrl && width > 0) begin
        #(HALF_PERIOD_PS * 1ps);
        if (ctrl) osc = ~osc;
        width = width - MISMATCH_PS - NOISE_PS + int'($urandom_range(2 * NOISE_PS));
      end
      wait (!ctrl);
      osc = 1'b0;
    end
  end

endmodule
