// Behavioural model (not synthesizable logic): the delay chain of the on-chip
// supply-voltage sensor.
//
// A chain of N_TAPS buffers, each tapped. The edge launched at `launch` travels
// one stage per `stage_delay_ps` picoseconds. In silicon the gate delay grows as
// the supply voltage falls, so how far an edge gets within one clock period
// measures the voltage. The voltage itself is physical and is not modelled: the
// per-stage delay is an input, so a test can emulate a supply drop by raising
// it. That the sensor is a gate chain read out as a number from 0 to 63 comes
// from the document; buffers as the gate type are an assumption.
module sensor_delay_chain #(
  parameter int unsigned N_TAPS = 63
) (
  input  logic              launch,
  input  int unsigned       stage_delay_ps,
  output logic [N_TAPS-1:0] taps
);

  initial taps = '0;

  always @(launch) taps[0] <= #(stage_delay_ps * 1ps) launch;

  for (genvar i = 1; i < N_TAPS; i++) begin : g_stage
    always @(taps[i-1]) taps[i] <= #(stage_delay_ps * 1ps) taps[i-1];
  end

endmodule
