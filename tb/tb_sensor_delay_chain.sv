// Testbench for sensor_delay_chain: an edge reaches tap k after (k+1) stage
// delays, for two different stage delays.
module tb_sensor_delay_chain;
  logic launch = 0;
  int unsigned d = 100;
  logic [62:0] taps;
  int checks = 0, failures = 0;
  sensor_delay_chain dut (.launch, .stage_delay_ps(d), .taps);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int reached(logic v);
    int n = 0; foreach (taps[i]) if (taps[i] == v) n++; return n;
  endfunction
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #10ns; check(taps == '0, "idle");
    launch = 1; #2050ps;
    check(reached(1) == 20, $sformatf("20 taps after 2.05 ns at 100 ps, got %0d", reached(1)));
    check(taps[19:0] == '1 && taps[62:20] == '0, "thermometer code");
    #10ns; check(taps == '1, "edge through");
    d = 150; launch = 0; #2050ps;
    check(reached(0) == 13, $sformatf("13 taps at 150 ps, got %0d", reached(0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
