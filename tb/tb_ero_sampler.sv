// Testbench for ero_sampler with a deterministic oscillator input: one bit per
// 512 clocks (4.096 us at 125 MHz) and the bit equal to the input at the
// sampling edge.
module tb_ero_sampler;
  logic clk = 0, rst_n = 0, en = 0, osc = 0, bit_o, valid;
  int checks = 0, failures = 0, cyc = 0, last = -1, nbits = 0;
  ero_sampler dut (.clk, .rst_n, .en, .osc, .bit_o, .valid);
  always #4ns clk = ~clk;
  // Input pattern known to the testbench: a function of the cycle count.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    osc <= ((cyc + 1) / 512 * 7 + (cyc + 1)) % 3 == 0;
  end
  logic exp_bit;   // osc as seen at the previous clock edge
  always @(posedge clk) begin
    exp_bit <= osc;
    if (rst_n && valid) begin
      nbits++;
      checks++; if (bit_o !== exp_bit) begin failures++; $display("FAIL: bit mismatch"); end
      if (last >= 0) begin
        checks++; if (cyc - last != 512) begin failures++; $display("FAIL: interval %0d", cyc - last); end
      end
      last = cyc;
    end
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int first;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (10) @(posedge clk);
    checks++; if (valid) failures++;
    en = 1; first = cyc;
    @(posedge valid); #1;
    checks++; if (cyc - first != 512) begin failures++; $display("FAIL: first bit after %0d", cyc - first); end
    repeat (20 * 512 + 10) @(posedge clk);
    en = 0;
    checks++; if (nbits != 21) begin failures++; $display("FAIL: %0d bits", nbits); end
    repeat (2000) @(posedge clk);
    checks++; if (nbits != 21) begin failures++; $display("FAIL: bits while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
