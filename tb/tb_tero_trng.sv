// Testbench for tero_trng: counts vary around the model's mean, and every bit
// equals the LSB of its count, one result per 128 clocks.
module tb_tero_trng;
  logic clk = 0, rst_n = 0, en = 0, bit_o, valid;
  logic [7:0] count;
  int checks = 0, failures = 0, n = 0, mn = 255, mx = 0, ones = 0, cyc = 0, last = -1;
  tero_trng dut (.clk, .rst_n, .en, .count, .bit_o, .valid);
  always #4ns clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (rst_n && valid) begin
    n++;
    if (n > 1) begin
      if (count < mn) mn = count; if (count > mx) mx = count;
      ones += bit_o;
      check(bit_o == count[0], "bit is count LSB");
      check(cyc - last == 128, "one result per 128 clocks");
    end
    last = cyc;
  end
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; en = 1;
    repeat (128 * 101 + 2) @(posedge clk);
    $display("counts %0d..%0d, ones %0d of 100", mn, mx, ones);
    check(mn >= 20 && mx <= 70 && mx > mn, "count spread");
    check(ones >= 25 && ones <= 75, "bits not constant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
