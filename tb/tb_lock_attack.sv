// Testbench for lock_attack: the injector signal reaches all delay lines only
// with inject_en, the identical rings run only with ident_en.
module tb_lock_attack;
  logic inject_en = 0, ident_en = 0;
  logic [5:0] lines;
  logic [7:0] ident_osc;
  int checks = 0, failures = 0;
  int le [6], ie [8];
  lock_attack dut (.inject_en, .ident_en, .lines, .ident_osc);
  for (genvar i = 0; i < 6; i++) begin : gl always @(lines[i]) le[i]++; end
  for (genvar i = 0; i < 8; i++) begin : gi always @(ident_osc[i]) ie[i]++; end
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic clear(); foreach (le[i]) le[i] = 0; foreach (ie[i]) ie[i] = 0; endtask
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #10ns; clear();
    inject_en = 1; #100ns;
    foreach (le[i]) check(le[i] > 150, $sformatf("line %0d carries injector (%0d edges)", i, le[i]));
    foreach (ie[i]) check(ie[i] == 0, "identical rings idle");
    inject_en = 0; #10ns; clear();
    ident_en = 1; #100ns;
    foreach (ie[i]) check(ie[i] > 150, $sformatf("ring %0d runs", i));
    foreach (le[i]) check(le[i] == 0, "lines idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
