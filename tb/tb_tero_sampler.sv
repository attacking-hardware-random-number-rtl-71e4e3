// Testbench for tero_sampler with a testbench-driven loop: the oscillation
// count is captured, its LSB is the bit, ctrl is high for 64 of every 128
// clocks and one result appears every 128 clocks.
module tb_tero_sampler;
  logic clk = 0, rst_n = 0, en = 0, ctrl, osc = 0, bit_o, valid;
  logic [7:0] count;
  int checks = 0, failures = 0, cyc = 0, last = -1, hi = 0, nres = 0;
  int q[$];
  tero_sampler dut (.clk, .rst_n, .en, .ctrl, .osc, .count, .bit_o, .valid);
  always #4ns clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; if (ctrl) hi++; end
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // Fake loop: after each ctrl rise, produce n pulses, n = 3 * k + 5 (wraps at 256).
  initial begin
    int k = 0;
    forever begin
      @(posedge ctrl);
      begin
        int n;
        n = (37 * k + 5) % 300;
        q.push_back(n % 256);
        for (int i = 0; i < n; i++) begin #0.7ns osc = 1; #0.7ns osc = 0; end
      end
      k++;
    end
  end
  always @(posedge clk) if (rst_n && valid) begin
    nres++;
    if (nres > 1) begin
      int e;
      e = q.pop_front();
      check(count == e[7:0], $sformatf("count %0d expected %0d", count, e));
      check(bit_o == e[0], "bit is LSB");
    end else void'(q.pop_front());
    if (last >= 0) check(cyc - last == 128, $sformatf("interval %0d", cyc - last));
    last = cyc;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; en = 1;
    repeat (128 * 20) @(posedge clk);
    hi = 0; repeat (128 * 10) @(posedge clk);
    check(hi == 640, $sformatf("ctrl high %0d of 1280 clocks", hi));
    check(nres == 30, $sformatf("%0d results", nres));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
