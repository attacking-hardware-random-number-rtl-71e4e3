// Testbench for the attack_ro model: rests high when disabled, oscillates with
// the configured half period when enabled.
module tb_attack_ro;
  logic en = 0, osc;
  int checks = 0, failures = 0, edges = 0;
  attack_ro #(.HALF_PERIOD_PS(300)) dut (.en, .osc);
  always @(osc) edges++;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #5ns; check(osc == 1, "rests high"); edges = 0;
    #5ns; check(edges == 0, "no edges while disabled");
    en = 1; #30ns;
    check(edges >= 99 && edges <= 101, $sformatf("edges in 30 ns: %0d", edges));
    en = 0; #2ns; edges = 0; #5ns;
    check(edges == 0 && osc == 1, "stops and rests high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
