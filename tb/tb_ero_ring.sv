// Testbench for the ero_ring model: frequency inside the 1.02-1.13 GHz range,
// rest when disabled, and jitter making the period vary.
module tb_ero_ring;
  logic en = 0, osc;
  int checks = 0, failures = 0, rises = 0;
  realtime t0, tp, pmin = 1e9, pmax = 0;
  ero_ring dut (.en, .osc);
  always @(posedge osc) begin
    realtime p;
    p = $realtime - tp;
    if (rises > 1) begin if (p < pmin) pmin = p; if (p > pmax) pmax = p; end
    tp = $realtime; rises++;
  end
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    real f;
    #5ns; check(osc == 1, "rests high");
    en = 1; #2ns; rises = 0; t0 = $realtime;
    #1000ns;
    f = rises / 1.0e-6;
    check(f > 1.023e9 && f < 1.125e9, $sformatf("frequency %0.3f GHz", f / 1e9));
    check(pmax > pmin, "period varies (jitter)");
    en = 0; #3ns; rises = 0; #10ns;
    check(rises == 0 && osc == 1, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
