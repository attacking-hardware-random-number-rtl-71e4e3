// Testbench for attack_ro_array: every oscillator of a reduced array runs when
// enabled and rests when disabled.
module tb_attack_ro_array;
  localparam int N = 3 * 4;
  logic en = 0;
  logic [N-1:0] osc;
  int checks = 0, failures = 0;
  int edges [N];
  attack_ro_array #(.N_SLICES(3)) dut (.en, .osc);
  for (genvar i = 0; i < N; i++) begin : g
    always @(osc[i]) edges[i]++;
  end
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #5ns; check(osc == '1, "all rest high");
    foreach (edges[i]) edges[i] = 0;
    en = 1; #30ns; en = 0; #2ns;
    foreach (edges[i]) check(edges[i] >= 99 && edges[i] <= 102, $sformatf("ro %0d edges %0d", i, edges[i]));
    foreach (edges[i]) edges[i] = 0;
    #10ns;
    check(osc == '1, "all stop high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
