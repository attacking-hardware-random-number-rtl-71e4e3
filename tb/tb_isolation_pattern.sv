// Testbench for isolation_pattern: the output follows an independent model of
// the LFSR, pauses with en low, has period 65535 and restarts on clr.
module tb_isolation_pattern;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, bit_o, valid;
  int checks = 0, failures = 0, errs = 0, nb = 0;
  logic [15:0] m = 16'hACE1;
  isolation_pattern dut (.clk, .rst_n, .clr, .en, .bit_o, .valid);
  always #4ns clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // Reference: Galois-free formulation, next = (m >> 1) | (feedback << 15).
  always @(posedge clk) if (rst_n && valid) begin
    nb++;
    if (bit_o != m[0]) errs++;
    m = {m[0] ^ m[2] ^ m[3] ^ m[5], m[15:1]};
  end
  initial begin #3ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk); check(nb == 0, "no bits while disabled");
    en = 1; repeat (1000) @(posedge clk); en = 0;
    repeat (10) @(posedge clk); check(nb == 1000, $sformatf("%0d bits", nb));
    en = 1; repeat (65535 - 1000) @(posedge clk); en = 0;
    repeat (3) @(posedge clk);
    check(errs == 0, $sformatf("%0d pattern errors", errs));
    check(m == 16'hACE1, "period 65535");
    en = 1; repeat (77) @(posedge clk); en = 0;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; m = 16'hACE1;
    en = 1; repeat (100) @(posedge clk); en = 0; repeat (3) @(posedge clk);
    check(errs == 0, "restart after clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
