// End-to-end testbench for trng_attack_top at reduced size (2 attack slices,
// 8-byte RAMs, 12.5 MBd UART). It runs every experiment the chip supports and
// receives all data on the serial line:
//  - isolation test, single and dual RAM, under static attack: the data must
//    equal an independent model of the LFSR pattern;
//  - ERO capture under static attack, with the emulated supply drop showing on
//    the voltage sensor; the capture time must be 64 bits * 512 clocks;
//  - replica observation: ERO and replica captured into both RAMs;
//  - TERO bits and TERO oscillation counts under dynamic attack;
//  - both locking approaches switched on;
//  - ring frequency measurement of the victim ring and the injector ring.
// The supply network is emulated here: while the attack is active the sensor's
// gate delay rises from 140 ps to 175 ps.
module tb_trng_attack_top;
  import trng_pkg::*;
  localparam int ADDR_W = 3, NBYTES = 1 << ADDR_W, DIV = 10;
  logic clk = 0, rst_n = 0, start = 0;
  exp_cfg_t cfg;
  int unsigned dly;
  logic uart_txd, busy, capturing, attack_active, sensor_valid, attack_ro_probe;
  logic [31:0] attack_toggles;
  logic [5:0] sensor_value;
  logic [5:0] lock_lines;
  logic freq_start = 0, freq_sel = 0, freq_busy, freq_valid;
  logic [15:0] freq_count;
  int checks = 0, failures = 0;
  logic [7:0] rx[$];

  // mechanism counters
  int n_iso = 0, n_iso_dual = 0, n_ero = 0, n_replica = 0, n_tero_bit = 0, n_tero_cnt = 0;
  int n_static = 0, n_dynamic = 0, n_sensor_drop = 0, n_lock_inject = 0, n_lock_ident = 0, n_ram_full = 0, n_freq = 0;

  trng_attack_top #(.N_SLICES(2), .ADDR_W(ADDR_W), .BAUD(12_500_000)) dut (
    .clk, .rst_n, .cfg, .start, .supply_stage_delay_ps(dly), .uart_txd, .busy, .capturing,
    .attack_active, .attack_toggles, .sensor_value, .sensor_valid, .lock_lines, .attack_ro_probe,
    .freq_start, .freq_sel, .freq_busy, .freq_count, .freq_valid);

  always #4ns clk = ~clk;
  assign dly = attack_active ? 175 : 140;   // emulated supply network

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // UART receiver
  initial forever begin
    logic [7:0] r;
    @(negedge uart_txd);
    #(DIV * 8ns / 2);
    for (int i = 0; i < 8; i++) begin #(DIV * 8ns); r[i] = uart_txd; end
    #(DIV * 8ns);
    if (uart_txd != 1) check(0, "stop bit");
    rx.push_back(r);
  end

  // Runs one experiment; returns the capture time in clocks.
  task automatic run(output int cap_clocks);
    int t0;
    rx.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = int'($time / 8ns);
    wait (!capturing);
    cap_clocks = int'($time / 8ns) - t0;
    n_ram_full++;
    wait (!busy);
    #(DIV * 8ns * 2);
  endtask

  // Independent model of the isolation pattern, packed LSB first.
  function automatic void iso_bytes(int n, ref logic [7:0] q[$]);
    logic [15:0] m = 16'hACE1;
    for (int b = 0; b < n; b++) begin
      logic [7:0] v;
      for (int i = 0; i < 8; i++) begin v[i] = m[0]; m = {m[0] ^ m[2] ^ m[3] ^ m[5], m[15:1]}; end
      q.push_back(v);
    end
  endfunction

  int lock_edges = 0, ident_edges = 0;
  always @(dut.u_lock.ident_osc[0]) ident_edges++;
  always @(lock_lines[5]) lock_edges++;
  int sens_idle = 0, sens_attack = 0;
  always @(posedge clk) if (rst_n && sensor_valid) begin
    if (attack_active) sens_attack = sensor_value; else sens_idle = sensor_value;
  end

  initial begin #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int cap;
    logic [7:0] exp_q[$];
    cfg = '{source: SRC_ISOLATION, replica: 1'b0, attack_mode: ATTACK_OFF, lock_inject: 1'b0, lock_ident: 1'b0};
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (10) @(posedge clk);
    check(!busy && uart_txd, "idle after reset");
    check(sensor_value == 6'd57, $sformatf("sensor at nominal supply %0d", sensor_value));

    // 1. isolation test under static attack, single RAM
    cfg.attack_mode = ATTACK_STATIC;
    repeat (10) @(posedge clk);
    check(attack_active, "static attack on"); n_static++;
    check(sensor_value == 6'd45, $sformatf("sensor under attack %0d", sensor_value));
    if (sensor_value < 57) n_sensor_drop++;
    run(cap);
    iso_bytes(NBYTES, exp_q);
    check(rx.size() == NBYTES, $sformatf("isolation: %0d bytes", rx.size()));
    check(rx == exp_q, "isolation data intact");
    check(cap >= 8 * NBYTES && cap <= 8 * NBYTES + 6, $sformatf("isolation capture %0d clocks", cap));
    n_iso++;

    // 2. isolation, dual RAM
    cfg.replica = 1;
    run(cap);
    exp_q.delete(); iso_bytes(NBYTES, exp_q);
    check(rx.size() == 2 * NBYTES, "dual isolation: byte count");
    check(rx[0:NBYTES-1] == exp_q && rx[NBYTES:2*NBYTES-1] == exp_q, "dual isolation data intact");
    n_iso_dual++;

    // 3. ERO under static attack, single RAM
    cfg.source = SRC_ERO; cfg.replica = 0;
    run(cap);
    check(rx.size() == NBYTES, "ERO: byte count");
    check(cap >= 64 * 512 && cap <= 64 * 512 + 6, $sformatf("ERO capture %0d clocks (512 per bit)", cap));
    begin int ones = 0; foreach (rx[i]) ones += $countones(rx[i]); check(ones > 8 && ones < 56, $sformatf("ERO ones %0d/64", ones)); end
    n_ero++;

    // 4. replica observation with frequency-matched locking
    cfg.replica = 1; cfg.attack_mode = ATTACK_OFF; cfg.lock_inject = 1;
    lock_edges = 0;
    run(cap);
    check(rx.size() == 2 * NBYTES, "replica: byte count");
    check(lock_edges > 1000, "injector drives delay lines"); if (lock_edges > 1000) n_lock_inject++;
    check(rx[0:NBYTES-1] != rx[NBYTES:2*NBYTES-1], "target and replica differ");
    n_replica++;
    cfg.lock_inject = 0; cfg.replica = 0;

    // 5. TERO bits under dynamic attack with identical-ring locking circuit on
    cfg.source = SRC_TERO_BIT; cfg.attack_mode = ATTACK_DYNAMIC; cfg.lock_ident = 1;
    begin int tg = attack_toggles;
      run(cap);
      check(rx.size() == NBYTES, "TERO bits: byte count");
      check(cap >= 64 * 128 - 128 && cap <= 64 * 128 + 6, $sformatf("TERO capture %0d clocks", cap));
      check(ident_edges > 1000, "identical rings run"); if (ident_edges > 1000) n_lock_ident++;
      check(attack_toggles - tg >= 1, "dynamic attack toggled"); if (attack_toggles - tg >= 1) n_dynamic++;
    end
    n_tero_bit++;
    cfg.lock_ident = 0;

    // 6. TERO oscillation counts
    cfg.source = SRC_TERO_COUNT; cfg.attack_mode = ATTACK_OFF;
    run(cap);
    check(rx.size() == NBYTES, "TERO counts: byte count");
    foreach (rx[i]) check(rx[i] >= 15 && rx[i] <= 80, $sformatf("TERO count %0d", rx[i]));
    check(cap >= NBYTES * 128 - 128 && cap <= NBYTES * 128 + 6, $sformatf("TERO count capture %0d clocks", cap));
    n_tero_cnt++;

    // 7. ring frequency measurement: victim ERO ring, then injector ring
    for (int s = 0; s < 2; s++) begin
      real f;
      @(negedge clk); freq_sel = 1'(s); freq_start = 1; @(negedge clk); freq_start = 0;
      @(posedge freq_valid); #1;
      f = real'(freq_count) * 64.0 * 125.0e6 / 8192.0;
      check(f > 1.023e9 && f < 1.125e9, $sformatf("ring %0d frequency %0.3f GHz", s, f / 1e9));
      n_freq++;
    end
    check(n_freq == 2, "frequency measured");

    $display("mechanisms: iso=%0d iso_dual=%0d ero=%0d replica=%0d tero_bit=%0d tero_cnt=%0d static=%0d dynamic=%0d sensor_drop=%0d lock_inject=%0d lock_ident=%0d ram_full=%0d freq=%0d",
             n_iso, n_iso_dual, n_ero, n_replica, n_tero_bit, n_tero_cnt, n_static, n_dynamic, n_sensor_drop, n_lock_inject, n_lock_ident, n_ram_full, n_freq);
    check(n_iso > 0, "isolation ran"); check(n_iso_dual > 0, "dual isolation ran");
    check(n_ero > 0, "ERO ran"); check(n_replica > 0, "replica ran");
    check(n_tero_bit > 0, "TERO bit ran"); check(n_tero_cnt > 0, "TERO count ran");
    check(n_static > 0, "static attack happened"); check(n_dynamic > 0, "dynamic attack happened");
    check(n_sensor_drop > 0, "sensor saw drop"); check(n_lock_inject > 0, "injection happened");
    check(n_lock_ident > 0, "identical rings ran"); check(n_ram_full > 0, "RAM filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
