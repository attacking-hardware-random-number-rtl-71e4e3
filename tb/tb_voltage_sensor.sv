// Testbench for voltage_sensor with the delay-chain model: readings at
// 8 ns clock period equal floor(8000 / stage delay) capped at 63, and fall
// when the emulated supply drops (stage delay rises).
module tb_voltage_sensor;
  logic clk = 0, rst_n = 0, launch, valid;
  logic [62:0] taps;
  logic [5:0] value;
  int unsigned d = 140;
  int checks = 0, failures = 0;
  sensor_delay_chain u_chain (.launch, .stage_delay_ps(d), .taps);
  voltage_sensor dut (.clk, .rst_n, .launch, .taps, .value, .valid);
  always #4ns clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int expect_v(int unsigned dd);
    int v = 8000 / dd; if (8000 % dd == 0) v--; return (v > 63) ? 63 : v;
  endfunction
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int unsigned ds [5] = '{140, 160, 200, 127, 100};
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); check(valid == 0, "not valid right after reset");
    foreach (ds[k]) begin
      d = ds[k];
      repeat (6) @(posedge clk); #1ns;
      check(valid == 1, "valid");
      check(value == expect_v(d), $sformatf("delay %0d: value %0d expected %0d", d, value, expect_v(d)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
