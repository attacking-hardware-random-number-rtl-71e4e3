# On-chip attacks on FPGA true random number generators: experiment RTL

In a multi-tenant FPGA, two users who never connect a wire to each other still
share the same silicon and the same power distribution network. This design is
the test chip for studying whether one tenant can degrade another tenant's true
random number generator (TRNG) from inside the fabric, with no physical access.
It holds two victim TRNGs, the attack circuits aimed at them, a supply-voltage
sensor, and a data path that records the generated bits on chip and sends them
to a host computer for statistical analysis.

The three attacks it supports:

* **Supply-voltage manipulation.** A large array of ring oscillators is switched
  on together. The current step lowers the local supply, which slows the gates of
  the victim's entropy source. *Static* mode keeps the array running, which gives
  a lasting IR drop. *Dynamic* mode toggles it at 15.24 kHz, a rate that excites a
  resonance of the supply network and gives both dips and overshoots.
* **Ring-oscillator locking.** A victim ring gathers less jitter if it is pulled
  into step with a nearby signal. Two ways of producing that signal are built.
  One is a set of rings identical to the victim placed around it. The other is a
  *frequency-matched* injector ring, placed where its frequency is closest to the
  victim's, whose output is brought next to the victim through delay lines.
* **Replica observation.** A second, identical ERO sits next to the victim, and
  both bit streams are recorded at the same time. The host XORs them and looks
  for bias, which would mean the replica leaks information about the victim.

## Block diagram

```
                     cfg.attack_mode                 supply_stage_delay_ps
                          |                                   |
  attack_controller ---active---> attack_ro_array     sensor_delay_chain <-> voltage_sensor --> sensor_value
  (off/static/15.24 kHz)          (400 slices x 4 LUT rings)

  cfg.lock_inject/ident --> lock_attack (injector ero_ring -> 6 x delay_line,
                                         8 identical ero_rings) --> lock_lines

                          +-- ero_trng (victim) ------+
                          +-- ero_trng (replica) -----+--> bit_packer x2 --+
  capturing & cfg.source -+-- tero_trng (bit, count) -+                    +--> data_gatherer --> uart_txd
                          +-- isolation_pattern ------+--------------------+    (2 x capture_ram, uart_tx)

  victim ERO ring / injector ring --freq_sel--> ro_freq_counter --> freq_count
```

`trng_attack_top` wires all of this. The coupling between attacker and victim
happens through the supply network, the substrate and the routing. None of that
is logic, so none of it is modelled. The one place where it enters is the
sensor's gate delay, which is a top-level input (`supply_stage_delay_ps`).

## The victims

### Elementary ring oscillator TRNG (`ero_ring`, `ero_sampler`, `ero_trng`)

The ring is a NAND gate and two buffers, one LUT each, closed into a loop. A
fourth LUT buffers the output so that all internal nets can be routed the same
way. The whole generator fits one four-LUT slice. The ring runs freely at about
1.0–1.1 GHz. Its phase wanders because of thermal jitter. After an accumulation
time of 2^9 clocks at 125 MHz (4.096 µs), the system clock samples the ring
output in a plain flip-flop, and that sample is the random bit. The sampling
flip-flop is deliberately not preceded by a synchroniser: it is the digitiser.

`ero_ring` is a timing model. Every gate transition takes 156 ps ± 2 ps,
uniformly distributed. The ring therefore runs at about 1.07 GHz and its phase
performs a random walk. The ring's real jitter accumulation rate (σ²/t of about
20 fs) is far below a 1 ps simulator resolution, so the model's jitter is
larger per edge than the silicon's. The bits it produces are random in
simulation, but their statistics mean nothing.

### Transition effect ring oscillator TRNG (`tero_loop`, `tero_sampler`, `tero_trng`)

The loop has two branches. Each branch is an XOR gate, an AND gate and six
buffers. Raising the control signal releases both AND gates, and two
transitions start chasing each other around the loop. The loop output
oscillates until the small delay mismatch between the branches, plus gate
noise, lets one transition catch the other. After that the loop is stable
again. A counter clocked by the loop output counts the oscillations. The least
significant bit of the count is the random bit. The full count is also
available, because the spread of the counts is the best measure of a TERO's
health and of what an attack does to it.

`tero_sampler` drives the control signal high for 64 clocks and low for 64
clocks. While the control signal is low, the oscillation counter is held in
reset. On the last clock of the high phase, the count is copied into the clock
domain. By then the loop must have settled, so the count is static and
crossing it with a single register is safe. One count comes out every
128 clocks (about 1 Mbit/s).

`tero_loop` does not simulate the gates. It tracks the width of the travelling
pulse instead. The width starts at 160 ps and shrinks by 2 ± 3 ps every half
period (1.2 ns), and the oscillation stops when the width reaches zero. This
gives about 40 oscillations on average, with a spread of roughly ±10. Those
numbers are the model's, not a property of any particular placement.

## The attack circuits

* `attack_controller`: makes the activation signal. Static mode holds it high.
  Dynamic mode makes a 50 % square wave with a half period of
  round(125 MHz / (2 × 15.24 kHz)) = 4101 clocks, which gives 15.238 kHz. It also
  counts activations.
* `attack_ro_array` / `attack_ro`: 400 slices × 4 LUT6_2 = 1600 single-LUT rings.
  Each LUT computes NAND(enable, own output) and feeds its output back to itself.
  The model uses a 300 ps loop delay.
* `lock_attack` / `delay_line`: the injector is an `ero_ring`, so it has the
  same design as the victim. It feeds six 8-stage buffer chains that end next
  to the victim ring. Eight further `ero_ring`s represent the identical-ring
  approach. The simulation does not model locking, because locking is analog
  coupling. The outputs only show that the injected signal is present.

## The supply sensor (`sensor_delay_chain`, `voltage_sensor`)

A flip-flop toggles every clock and launches an edge into a chain of 63
buffers. At the next clock edge all 63 taps are captured. Taps the edge has
already passed hold the new value and the rest hold the old one. The reading is
the number of taps the edge passed, from 0 to 63. The count is a population
count, not a priority encoder, so that a bubble in the thermometer code costs
only one count. A lower supply means slower gates and a smaller number. In
simulation the chain delay per stage comes from the `supply_stage_delay_ps`
input. With an 8 ns clock the reading is ⌊8000 / delay⌋, capped at 63: for
example 57 at 140 ps and 45 at 175 ps. The reading lags the launch by two
clocks.

## Measuring ring frequencies (`ro_freq_counter`)

The frequency-matched locking attack only works if the injector ring runs at
almost exactly the victim's frequency. Placements are therefore chosen by
measuring ring frequencies on the device. The counter divides the selected ring
by 64 with a prescaler clocked by the ring itself. It passes the prescaler's top
bit through a two-flop synchroniser and counts its rising edges for 8192 clocks.
The result gives f = count × 64 × 125 MHz / 8192, about 1.95 MHz per count.
At the top level, `freq_sel` picks the victim ERO ring (0) or the injector
ring (1), and a pulse on `freq_start` measures it. The selected ring is switched
on for the measurement.

## The data path and a run

Configuration is the packed struct `trng_pkg::exp_cfg_t`:

| field | meaning |
|---|---|
| `source` | RAM 0 input: `SRC_ERO`, `SRC_TERO_BIT`, `SRC_TERO_COUNT` (one byte per TERO measurement), `SRC_ISOLATION` |
| `replica` | also fill RAM 1: from the replica ERO, or with the isolation pattern |
| `attack_mode` | `ATTACK_OFF`, `ATTACK_STATIC`, `ATTACK_DYNAMIC` |
| `lock_inject`, `lock_ident` | switch the two locking circuits on |

A pulse on `start` begins a run, which goes through these steps:

1. **Capture.** The selected TRNGs start. `bit_packer` collects eight bits per
   byte, with the first bit in bit 0. `data_gatherer` writes the bytes to
   consecutive addresses of `capture_ram` (64 KiB, so 2^19 bits) until it is
   full. In replica mode RAM 1 fills at the same time.
   Bits are stored first and sent later so that the slow serial line never
   drops a bit and every run is 2^19 consecutive bits.
2. **Send.** RAM 0 is sent byte by byte in address order over `uart_tx`
   (8N1, LSB first, 921 600 baud, bit time 136 clocks). If RAM 1 was used, it is
   sent next.
3. `busy` falls after the last stop bit.

Before each attack experiment, an **isolation test** should be run with the
same attack settings and `SRC_ISOLATION`. This source is a 16-bit LFSR
(x^16 + x^14 + x^13 + x^11 + 1, seed 0xACE1) that restarts at every run and
produces one bit per clock. The host knows the exact sequence, so any bit the
attack corrupts in the capture or transmit logic shows up at once.

Durations at the default sizes: an ERO capture is 2^19 × 4.096 µs ≈ 2.15 s. A
TERO count capture is 65 536 × 1.024 µs ≈ 67 ms. Sending one RAM takes
65 536 × 10 × 136 clocks ≈ 0.71 s.

## Where this design makes its own choices

The experiment setup describes what each part does, but not how. The following
are choices made here:

* All scenarios share one top level, selected by `cfg`. A TRNG runs only while
  its data are being captured.
* How the 15.24 kHz activation is generated (a counter, 50 % duty), and the
  single-LUT NAND ring form.
* The sensor: the launch/capture arrangement, the use of the system clock, and
  the population-count encoder.
* The TERO control period (64 + 64 clocks), the 8-bit counter, and the capture
  on the last high clock.
* The byte-wide RAM, the bit order inside a byte, the dump order (RAM 0, then
  RAM 1), the UART frame and its baud rate.
* The isolation pattern (LFSR) and its restart per run.
* How ring frequencies are measured (prescaler, gate time).
* The number of identical locking rings (8) and the delay-line length (8 stages).
* One set of locking delay lines serves every experiment. It defaults to six
  lines, the count that worked best against the ERO. The replica-observation
  setup uses two lines next to the pair of EROs: set `N_DELAY_LINES = 2` for it.
* The dynamic toggle rate is 15.24 kHz. Other activation rates were also tried;
  set `TOGGLE_HZ` on `attack_controller` for those.
* Every delay in the behavioural models.

Not built, because they are not logic: the power network and the substrate
coupling, locking itself, and the host-side analysis (XOR of target and replica
streams, autocorrelation, min-entropy per byte, NIST SP 800-22). Dynamic-attack
TERO experiments keep only the bits produced during voltage minima. That
selection is also done on the host.

## Synthesizable and behavioural parts

Synthesizable: `attack_controller`, `voltage_sensor`, `ero_sampler`, `ro_freq_counter`,
`tero_sampler`, `isolation_pattern`, `bit_packer`, `capture_ram`, `uart_tx`,
`data_gatherer`, `trng_pkg`.

Behavioural, with `#` delays: `attack_ro`, `attack_ro_array`, `ero_ring`,
`tero_loop`, `sensor_delay_chain`, `delay_line`, and the wrappers that contain
them (`ero_trng`, `tero_trng`, `lock_attack`, `trng_attack_top`). On an FPGA
these are combinational loops and gate chains that must be hand-placed: one LUT
per gate, symmetric routing for the TERO, and the attack circuit right next to
the victim. A tool flow will not produce them from this code. Each model's
ports match the real part, so it can be replaced by a placed netlist.

`tero_sampler` clocks its oscillation counter from the loop output and resets
it asynchronously from `ctrl`, which is a flip-flop output. `ro_freq_counter`
clocks its prescaler from the measured ring. Both are intended. Timing analysis
has to treat each ring as its own clock domain.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M`. All need timing support. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_trng_attack_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/trng_pkg.sv tb/tb_trng_attack_top.sv
./obj_dir/Vtb_trng_attack_top
```

`tb_trng_attack_top` runs the whole chip end to end at reduced size: 2 attack
slices, 8-byte RAMs and a 12.5 MBd UART. The ERO accumulation time, the TERO
period, the sensor and the attack timing stay at their defaults. The test:

* runs the isolation test with one RAM and with two, under static attack, and
  compares the received data with an independent LFSR model;
* captures the ERO under static attack, checks 512 clocks per bit, and checks
  that the emulated supply drop moves the sensor from 57 to 45;
* runs replica observation with the injector and delay lines on;
* captures TERO bits under dynamic attack with the identical rings on;
* captures TERO counts;
* measures the frequencies of the victim ring and the injector ring, and checks
  that both fall in the 1.02–1.13 GHz range.

It counts each of these mechanisms and fails if any never happened. It takes
about two minutes. `tb_capture_ram` exercises the RAM at its full 64 KiB.

A single run of the whole chip at full size has not been simulated. With the
ring and sensor timing models active, the simulation advances about 5 µs of
chip time per second. One full run spans seconds of chip time (0.7 s for the
send alone), which would take days. The largest top-level configuration
simulated is the one above.

## Trust and limits

* The synthesizable blocks are checked against independent models in their
  testbenches: bit order, UART framing and bit time, RAM contents, LFSR
  sequence, sensor readings, ERO and TERO output rates, and attack period.
* The behavioural models reproduce structure and timing scale, not the physics.
  The simulation cannot show any attack degrading entropy. That effect exists
  only in silicon and is judged on the host from the recorded bits.
* The sensor's absolute reading depends on the chain delay relative to the
  clock period. On a device, calibrate it or give the chain an initial delay so
  that the nominal reading sits mid-range.
* The oscillator loops and the TERO counter clock need placement constraints
  and must be excluded from timing analysis. Nothing of that is included here.
