// Testbench for the tero_loop model: oscillates only after ctrl rises, stops by
// itself after a varying number of periods, and is forced low with ctrl low.
module tb_tero_loop;
  logic ctrl = 0, osc;
  int checks = 0, failures = 0, rises = 0, mn = 1000, mx = 0, sum = 0;
  tero_loop dut (.ctrl, .osc);
  always @(posedge osc) rises++;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #10ns; check(osc == 0 && rises == 0, "idle");
    for (int k = 0; k < 200; k++) begin
      rises = 0; ctrl = 1; #500ns;
      begin int r; r = rises; #50ns; check(rises == r, "settled"); end
      if (rises < mn) mn = rises; if (rises > mx) mx = rises; sum += rises;
      ctrl = 0; #2ns; check(osc == 0, "forced low"); #100ns;
    end
    $display("count min %0d max %0d mean %0d", mn, mx, sum / 200);
    check(mn > 0, "always oscillates");
    check(mx > mn + 3, "count varies");
    check(sum / 200 >= 30 && sum / 200 <= 50, "mean near 40");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
