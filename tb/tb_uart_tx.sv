// Testbench for uart_tx: an independent receiver samples mid-bit and checks
// every byte, frame timing (10 * 136 clocks) and the ready handshake.
module tb_uart_tx;
  localparam int DIV = 136;   // round(125e6 / 921600)
  logic clk = 0, rst_n = 0, valid = 0, ready, txd;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];
  uart_tx dut (.clk, .rst_n, .data, .valid, .ready, .txd);
  always #4ns clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // receiver
  initial begin
    forever begin
      logic [7:0] r; realtime t0;
      @(negedge txd); t0 = $realtime;
      #(DIV * 8ns / 2);
      check(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin #(DIV * 8ns); r[i] = txd; end
      #(DIV * 8ns); check(txd == 1, "stop bit");
      if (sent.size() == 0) check(0, "unexpected frame");
      else begin logic [7:0] e; e = sent.pop_front(); check(r == e, $sformatf("rx %h expected %h", r, e)); end
    end
  end
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int t_hs, t_rdy;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    check(txd == 1 && ready == 1, "idle line high, ready");
    for (int k = 0; k < 20; k++) begin
      @(negedge clk); data = 8'($urandom); valid = 1; sent.push_back(data);
      @(posedge clk); while (!ready) @(posedge clk);
      t_hs = int'($time / 8ns);
      @(negedge clk); valid = 0;
      @(posedge ready); t_rdy = int'($time / 8ns);
      check(t_rdy - t_hs == 10 * DIV, $sformatf("frame %0d clocks", t_rdy - t_hs));
      repeat (k % 3) @(posedge clk);
    end
    repeat (DIV) @(posedge clk);
    check(sent.size() == 0, "all frames received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
