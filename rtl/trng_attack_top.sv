// Behavioural top level (it contains ring oscillators, which are not
// synthesizable logic): the test chip for attacking on-chip TRNGs from
// neighbouring logic of a shared FPGA.
//
// Victims: an elementary ring oscillator (ERO) TRNG, a replica ERO placed next
// to it (replica observation), and a transition effect ring oscillator (TERO)
// TRNG. Attacks: an array of attack ring oscillators that lowers the local
// supply voltage when activated, statically or as a 15.24 kHz square wave; and
// a locking attack, either a frequency-matched injector ring feeding delay lines
// next to the ERO or identical rings placed around it. A gate-delay voltage
// sensor next to the attack circuit shows the supply effect. The data path packs
// the selected source's bits into bytes, fills a 64 KiB block RAM (two RAMs
// with the replica), then sends it all to the host over a UART. An LFSR pattern
// can replace the TRNG bits to prove that the data path itself survives the
// attack (isolation test).
//
// The physical coupling between attacker and victim (supply network, substrate,
// routing) is not logic and is not modelled; the supply seen by the sensor
// enters as the per-stage delay `supply_stage_delay_ps`.
//
// Configuration: `cfg` (trng_pkg::exp_cfg_t) must be stable during a run. A run
// starts with `start`; `busy` stays high until the last byte has been sent. Only
// the TRNGs that feed the selected RAM inputs run, and only while capturing.
//
// Ring frequency measurement: a pulse on `freq_start` measures the victim ERO
// ring (`freq_sel` = 0) or the locking injector ring (`freq_sel` = 1) for 8192
// clocks; the selected ring runs during the measurement. The result is
// f = freq_count * 64 * 125 MHz / 8192, delivered with `freq_valid`.
module trng_attack_top
  import trng_pkg::*;
#(
  parameter int unsigned N_SLICES         = 400,
  parameter int unsigned N_DELAY_LINES    = 6,
  parameter int unsigned ERO_ACC_CYCLES   = 512,
  parameter int unsigned TERO_CTRL_HALF   = 64,
  parameter int unsigned ADDR_W           = 16,
  parameter int unsigned BAUD             = 921_600,
  parameter int unsigned SENSOR_TAPS      = 63
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  exp_cfg_t                          cfg,
  input  logic                              start,
  input  int unsigned                       supply_stage_delay_ps,
  output logic                              uart_txd,
  output logic                              busy,
  output logic                              capturing,
  output logic                              attack_active,
  output logic [31:0]                       attack_toggles,
  output logic [$clog2(SENSOR_TAPS+1)-1:0]  sensor_value,
  output logic                              sensor_valid,
  output logic [N_DELAY_LINES-1:0]          lock_lines,
  output logic                              attack_ro_probe,
  input  logic                              freq_start,
  input  logic                              freq_sel,
  output logic                              freq_busy,
  output logic [15:0]                       freq_count,
  output logic                              freq_valid
);

  // ---------------- attack: supply-voltage manipulation ----------------
  logic [N_SLICES*4-1:0] attack_osc;

  attack_controller u_attack_ctrl (
    .clk, .rst_n, .mode(cfg.attack_mode), .active(attack_active), .toggles(attack_toggles)
  );

  attack_ro_array #(.N_SLICES(N_SLICES), .LUTS_PER_SLICE(4)) u_attack_array (
    .en(attack_active), .osc(attack_osc)
  );

  assign attack_ro_probe = attack_osc[0];

  // ---------------- attack: ring-oscillator locking ----------------
  logic [7:0] ident_osc;
  logic       inject_osc, ero_osc, meas_ero, meas_inj;

  assign meas_ero = freq_busy && !freq_sel;
  assign meas_inj = freq_busy &&  freq_sel;

  lock_attack #(.N_DELAY_LINES(N_DELAY_LINES), .N_IDENT_RO(8)) u_lock (
    .inject_en(cfg.lock_inject || meas_inj), .ident_en(cfg.lock_ident),
    .lines(lock_lines), .ident_osc(ident_osc), .inject(inject_osc)
  );

  // ---------------- supply-voltage sensor ----------------
  logic                   sensor_launch;
  logic [SENSOR_TAPS-1:0] sensor_taps;

  sensor_delay_chain #(.N_TAPS(SENSOR_TAPS)) u_sensor_chain (
    .launch(sensor_launch), .stage_delay_ps(supply_stage_delay_ps), .taps(sensor_taps)
  );

  voltage_sensor #(.N_TAPS(SENSOR_TAPS)) u_sensor (
    .clk, .rst_n, .launch(sensor_launch), .taps(sensor_taps),
    .value(sensor_value), .valid(sensor_valid)
  );

  // ---------------- victims ----------------
  logic use_ero, use_tero, use_iso;
  logic ero_bit, ero_valid, rep_bit, rep_valid, tero_bit, tero_valid, iso_bit, iso_valid;
  logic [7:0] tero_count;

  assign use_ero  = capturing && (cfg.source == SRC_ERO);
  assign use_tero = capturing && (cfg.source == SRC_TERO_BIT || cfg.source == SRC_TERO_COUNT);
  assign use_iso  = capturing && (cfg.source == SRC_ISOLATION);

  ero_trng #(.ACC_CYCLES(ERO_ACC_CYCLES)) u_ero (
    .clk, .rst_n, .en(use_ero || meas_ero), .bit_o(ero_bit), .valid(ero_valid), .osc(ero_osc)
  );

  ero_trng #(.ACC_CYCLES(ERO_ACC_CYCLES)) u_ero_replica (
    .clk, .rst_n, .en(use_ero && cfg.replica), .bit_o(rep_bit), .valid(rep_valid), .osc()
  );

  tero_trng #(.CTRL_HALF_CYCLES(TERO_CTRL_HALF), .CNT_W(8)) u_tero (
    .clk, .rst_n, .en(use_tero), .count(tero_count), .bit_o(tero_bit), .valid(tero_valid)
  );

  isolation_pattern u_iso (
    .clk, .rst_n, .clr(!capturing), .en(use_iso), .bit_o(iso_bit), .valid(iso_valid)
  );

  // ---------------- ring frequency measurement ----------------
  ro_freq_counter u_freq (
    .clk, .rst_n, .start(freq_start), .osc(freq_sel ? inject_osc : ero_osc),
    .busy(freq_busy), .count(freq_count), .valid(freq_valid)
  );

  // ---------------- data path ----------------
  logic       pk0_bit, pk0_bv, pk1_bit, pk1_bv;
  logic [7:0] pk0_byte, pk1_byte, b0;
  logic       pk0_valid, pk1_valid, b0_valid;

  always_comb begin
    unique case (cfg.source)
      SRC_TERO_BIT:  begin pk0_bit = tero_bit; pk0_bv = tero_valid; end
      SRC_ISOLATION: begin pk0_bit = iso_bit;  pk0_bv = iso_valid;  end
      default:       begin pk0_bit = ero_bit;  pk0_bv = ero_valid;  end
    endcase
    // In the isolation test both RAMs receive the pattern.
    pk1_bit = (cfg.source == SRC_ISOLATION) ? iso_bit   : rep_bit;
    pk1_bv  = (cfg.source == SRC_ISOLATION) ? iso_valid : rep_valid;
    b0       = (cfg.source == SRC_TERO_COUNT) ? tero_count : pk0_byte;
    b0_valid = (cfg.source == SRC_TERO_COUNT) ? tero_valid : pk0_valid;
  end

  bit_packer u_pack0 (
    .clk, .rst_n, .clr(!capturing), .bit_i(pk0_bit), .bit_valid(pk0_bv),
    .byte_o(pk0_byte), .byte_valid(pk0_valid)
  );

  bit_packer u_pack1 (
    .clk, .rst_n, .clr(!capturing), .bit_i(pk1_bit), .bit_valid(pk1_bv),
    .byte_o(pk1_byte), .byte_valid(pk1_valid)
  );

  data_gatherer #(.ADDR_W(ADDR_W), .BAUD(BAUD)) u_gather (
    .clk, .rst_n, .start, .dual(cfg.replica),
    .b0, .b0_valid, .b1(pk1_byte), .b1_valid(pk1_valid),
    .txd(uart_txd), .busy, .capturing
  );

endmodule
