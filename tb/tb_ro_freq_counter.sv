// Testbench for ro_freq_counter: a testbench oscillator of known period is
// measured; the count must be within one of f * gate / (64 * f_clk), and the
// result must come GATE_CYCLES + 1 clocks after start.
module tb_ro_freq_counter;
  logic clk = 0, rst_n = 0, start = 0, osc = 0, busy, valid;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int unsigned half_ps = 470;
  ro_freq_counter dut (.clk, .rst_n, .start, .osc, .busy, .count, .valid);
  always #4ns clk = ~clk;
  always #(half_ps * 1ps) osc = ~osc;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int unsigned hp [4] = '{470, 444, 500, 1000};
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (hp[k]) begin
      int t0, t1;
      real expc;
      half_ps = hp[k];
      repeat (20) @(posedge clk);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t0 = int'($time / 8ns);
      check(busy, "busy during gate");
      @(posedge valid); t1 = int'($time / 8ns);
      expc = 8192.0 * 8000.0 / (2.0 * hp[k] * 64.0);
      check(real'(count) > expc - 1.5 && real'(count) < expc + 1.5,
            $sformatf("half %0d ps: count %0d expected %0.1f", hp[k], count, expc));
      check(t1 - t0 == 8192, $sformatf("gate %0d clocks", t1 - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
