// Testbench for capture_ram at its full 64 KiB size: fills every byte with a
// hashed address and reads all back with one clock latency.
module tb_capture_ram;
  logic clk = 0, we = 0;
  logic [15:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0, errs = 0;
  capture_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #4ns clk = ~clk;
  function automatic logic [7:0] h(int a); return 8'((a * 131) ^ (a >> 8) ^ 8'h5A); endfunction
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = h(a);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); raddr = 16'(a);
      @(posedge clk); #1;
      if (rdata != h(a)) errs++;
    end
    checks++; if (errs != 0) begin failures++; $display("FAIL: %0d read errors", errs); end
    // write and read the same address: read returns the old data
    @(negedge clk); we = 1; waddr = 16'h1234; wdata = 8'hC3; raddr = 16'h1234;
    @(posedge clk); #1;
    checks++; if (rdata != h(16'h1234)) begin failures++; $display("FAIL: read-during-write"); end
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    checks++; if (rdata != 8'hC3) begin failures++; $display("FAIL: new data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
