// Testbench for data_gatherer with 16-byte RAMs and a fast UART: a single-
// channel and a dual-channel run; the bytes received on the serial line must be
// the first 16 offered on channel 0 (then channel 1), in order; bytes offered
// after the RAM is full or outside a run are dropped.
module tb_data_gatherer;
  localparam int DIV = 4;   // 100 MHz / 25 MBd in this reduced setup
  logic clk = 0, rst_n = 0, start = 0, dual = 0;
  logic [7:0] b0 = 0, b1 = 0;
  logic b0_valid = 0, b1_valid = 0, txd, busy, capturing;
  int checks = 0, failures = 0;
  logic [7:0] expect_q[$];
  int rx_count = 0;
  data_gatherer #(.ADDR_W(4), .CLK_HZ(100), .BAUD(25)) dut (
    .clk, .rst_n, .start, .dual, .b0, .b0_valid, .b1, .b1_valid, .txd, .busy, .capturing);
  always #4ns clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial forever begin
    logic [7:0] r;
    @(negedge txd);
    #(DIV * 8ns / 2);
    for (int i = 0; i < 8; i++) begin #(DIV * 8ns); r[i] = txd; end
    #(DIV * 8ns);
    rx_count++;
    if (expect_q.size() == 0) check(0, "unexpected byte");
    else begin logic [7:0] e; e = expect_q.pop_front(); check(r == e, $sformatf("rx %h expected %h", r, e)); end
  end
  // Sources: channel 0 counts up from 8'h10, channel 1 from 8'h80, each byte every 3 clocks.
  task automatic run(bit d);
    int k = 0;
    @(negedge clk); dual = d; start = 1; @(negedge clk); start = 0;
    check(busy && capturing, "capture starts");
    for (int i = 0; i < 16; i++) expect_q.push_back(8'h10 + 8'(i));
    if (d) for (int i = 0; i < 16; i++) expect_q.push_back(8'h80 + 8'(i));
    while (k < 20) begin
      @(negedge clk); b0_valid = 0; b1_valid = 0;
      @(negedge clk);
      @(negedge clk); b0 = 8'h10 + 8'(k); b1 = 8'h80 + 8'(k); b0_valid = 1; b1_valid = 1; k++;
    end
    @(negedge clk); b0_valid = 0; b1_valid = 0;
    check(!capturing, "capture ended when full");
    wait (!busy);
    repeat (5) @(posedge clk);
    check(expect_q.size() == 0, "all bytes sent");
  endtask
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); b0 = 8'hEE; b0_valid = 1; @(negedge clk); b0_valid = 0;
    run(0);
    check(rx_count == 16, $sformatf("single run sent %0d bytes", rx_count));
    rx_count = 0;
    run(1);
    check(rx_count == 32, $sformatf("dual run sent %0d bytes", rx_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
