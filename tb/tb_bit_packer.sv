// Testbench for bit_packer: random bits with random gaps come out as bytes,
// first bit in bit 0; clr drops a partial byte.
module tb_bit_packer;
  logic clk = 0, rst_n = 0, clr = 0, bit_i = 0, bit_valid = 0, byte_valid;
  logic [7:0] byte_o;
  int checks = 0, failures = 0;
  logic [7:0] exp_q[$];
  logic [7:0] acc; int n = 0;
  bit_packer dut (.clk, .rst_n, .clr, .bit_i, .bit_valid, .byte_o, .byte_valid);
  always #4ns clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (rst_n && byte_valid) begin
    if (exp_q.size() == 0) check(0, $sformatf("unexpected byte %h at %0t", byte_o, $time));
    else begin logic [7:0] e; e = exp_q.pop_front(); check(byte_o == e, $sformatf("byte %h expected %h", byte_o, e)); end
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // three bits, then clear
    repeat (3) begin @(negedge clk); bit_i = 1; bit_valid = 1; end
    @(negedge clk); bit_valid = 0; clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 8 * 40; i++) begin
      @(negedge clk);
      bit_valid = 0;
      if ($urandom_range(3) == 0) begin @(negedge clk); end
      bit_i = 1'($urandom); bit_valid = 1;
      acc[n] = bit_i; n++;
      if (n == 8) begin exp_q.push_back(acc); n = 0; end
    end
    @(negedge clk); bit_valid = 0;
    repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "all bytes delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
