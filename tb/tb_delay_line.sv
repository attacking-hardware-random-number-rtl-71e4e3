// Testbench for delay_line: output equals input delayed by stages * delay.
module tb_delay_line;
  logic din = 0, dout;
  int checks = 0, failures = 0;
  delay_line #(.N_STAGES(8), .STAGE_DELAY_PS(150)) dut (.din, .dout);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #5ns; check(dout == 0, "idle low");
    din = 1; #1190ps; check(dout == 0, "not yet at 1.19 ns");
    #20ps; check(dout == 1, "arrived at 1.2 ns");
    din = 0; #600ps; din = 1; #600ps; din = 0;
    #10ps; check(dout == 0, "first low pulse passing");
    #600ps; check(dout == 1, "pulse shape kept");
    #2ns; check(dout == 0, "settles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
