// Testbench for ero_trng: one bit every 512 clocks, and a bit stream from the
// jittery ring that is neither constant nor grossly biased.
module tb_ero_trng;
  logic clk = 0, rst_n = 0, en = 0, bit_o, valid;
  int checks = 0, failures = 0, cyc = 0, last = -1, nbits = 0, ones = 0;
  ero_trng dut (.clk, .rst_n, .en, .bit_o, .valid);
  always #4ns clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (rst_n && valid) begin
    nbits++; ones += bit_o;
    if (last >= 0) check(cyc - last == 512, $sformatf("interval %0d", cyc - last));
    last = cyc;
  end
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; en = 1;
    repeat (64 * 512 + 2) @(posedge clk);
    check(nbits == 64, $sformatf("%0d bits", nbits));
    check(ones >= 16 && ones <= 48, $sformatf("%0d ones in 64 bits", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
