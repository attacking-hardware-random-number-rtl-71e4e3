// Read-out logic of the on-chip supply-voltage sensor.
//
// Every clock the launch flip-flop toggles, sending an edge into the tapped
// delay chain (sensor_delay_chain). At the next clock edge all taps are captured:
// taps the new edge has already passed hold the launched value, the others still
// hold the previous one. The captured thermometer code is reduced to the number
// of taps that were reached, 0..N_TAPS: a higher supply voltage gives faster
// gates and a higher number. A population count is used rather than a priority
// encoder so that a bubble in the code costs one count instead of a wrong value.
// The gate-delay principle and the 0..63 range are the document's; the launch /
// capture arrangement and the encoder are this design's choices.
//
// Timing: `value` reflects the edge launched two clocks earlier and is updated
// every clock from the third clock after reset on; `valid` marks that.
module voltage_sensor #(
  parameter int unsigned N_TAPS = 63
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic                        launch,
  input  logic [N_TAPS-1:0]           taps,
  output logic [$clog2(N_TAPS+1)-1:0] value,
  output logic                        valid
);

  localparam int unsigned VW = $clog2(N_TAPS + 1);

  logic [N_TAPS-1:0] reached;
  logic [1:0]        warm;
  logic [VW-1:0]     ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < N_TAPS; i++) ones = ones + VW'(reached[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      launch  <= 1'b0;
      reached <= '0;
      value   <= '0;
      valid   <= 1'b0;
      warm    <= '0;
    end else begin
      launch  <= ~launch;
      // A tap reached by the edge launched last clock equals `launch`.
      reached <= ~(taps ^ {N_TAPS{launch}});
      value   <= ones;
      if (warm != 2'd2) warm <= warm + 1'b1;
      valid   <= (warm == 2'd2);
    end
  end

endmodule
