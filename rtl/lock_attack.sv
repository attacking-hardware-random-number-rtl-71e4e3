// Behavioural model (not synthesizable logic): the circuits of the ring
// oscillator locking attack.
//
// Two approaches are built side by side, each with its own enable.
// Frequency matching (`inject_en`): an injector ring designed identically to the
// ERO ring, placed where its frequency is closest to the target's, drives
// N_DELAY_LINES delay lines that end next to the target ring (six lines by
// default, the count that showed the largest effect). Identical rings
// (`ident_en`): N_IDENT_RO copies of the ERO ring placed around the target.
// Locking itself is an analog coupling and is not modelled; the outputs expose
// the injected signals; `inject` lets the injector frequency be measured. The structure and the six lines are the document's; the
// number of identical rings is an assumption.
module lock_attack #(
  parameter int unsigned N_DELAY_LINES = 6,
  parameter int unsigned N_IDENT_RO    = 8,
  parameter int unsigned LINE_STAGES   = 8
) (
  input  logic                     inject_en,
  input  logic                     ident_en,
  output logic [N_DELAY_LINES-1:0] lines,
  output logic [N_IDENT_RO-1:0]    ident_osc,
  output logic                     inject     // injector ring output
);

  ero_ring u_injector (.en(inject_en), .osc(inject));

  for (genvar i = 0; i < N_DELAY_LINES; i++) begin : g_line
    delay_line #(.N_STAGES(LINE_STAGES)) u_line (.din(inject), .dout(lines[i]));
  end

  for (genvar i = 0; i < N_IDENT_RO; i++) begin : g_ident
    ero_ring u_ro (.en(ident_en), .osc(ident_osc[i]));
  end

endmodule
