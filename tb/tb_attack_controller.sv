// Testbench for attack_controller: checks off, static and dynamic modes and
// the 15.24 kHz half period (4101 clocks at 125 MHz) of the dynamic mode.
module tb_attack_controller;
  import trng_pkg::*;
  logic clk = 0, rst_n = 0;
  attack_mode_e mode = ATTACK_OFF;
  logic active;
  logic [31:0] toggles;
  int checks = 0, failures = 0;
  localparam int HALF = (125_000_000 + 15_240) / (2 * 15_240);

  attack_controller dut (.clk, .rst_n, .mode, .active, .toggles);

  always #4ns clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t_rise, t_fall, t_rise2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    check(active == 0, "off mode keeps array off");
    mode = ATTACK_STATIC;
    repeat (3000) @(posedge clk);
    check(active == 1, "static mode keeps array on");
    check(toggles == 1, "static mode counts one activation");
    mode = ATTACK_OFF;
    repeat (5) @(posedge clk);
    check(active == 0, "off again");
    mode = ATTACK_DYNAMIC;
    @(posedge active); t_rise = int'($time / 1ns);
    @(negedge active); t_fall = int'($time / 1ns);
    @(posedge active); t_rise2 = int'($time / 1ns);
    check((t_fall - t_rise) == HALF * 8, $sformatf("high time %0d ns", t_fall - t_rise));
    check((t_rise2 - t_rise) == 2 * HALF * 8, $sformatf("period %0d ns", t_rise2 - t_rise));
    check(HALF == 4101, "half period rounds to 4101 clocks");
    repeat (5) @(posedge active);
    check(toggles == 8, $sformatf("toggle count %0d", toggles));
    mode = ATTACK_OFF;
    repeat (3) @(posedge clk);
    check(active == 0, "dynamic stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
