# Vernier-ring pre-bond TSV test circuit

Before wafer thinning, a through-silicon via (TSV) can be reached only from its
front side: its far end is still buried in the substrate. Electrically it is
then just a capacitor hanging on the net that drives it. Two common
manufacturing defects change that load:

- a **micro-void** in the fill puts a resistance partway down the via and hides
  part of the capacitance behind it (resistive open);
- a **pinhole** in the liner connects the via to the substrate (leakage).

Either way, a driver discharges the defective TSV faster than a good one. This
circuit measures that speed-up. It converts it into a digital code, in steps of
10 ps, using only standard logic gates. No probing and no analog circuitry are
needed. A fault-free TSV reads a small fixed code (4). A defective one reads
more, and the code grows with the severity of the defect. Sixteen TSVs share
one converter. Testing one TSV takes 13 test clock cycles, which is 650 ns at
20 MHz.

The converter is a **Vernier ring**. It is a pair of ring-shaped delay lines,
one slightly slower than the other. Two edges race around them, and the faster
ring gains 10 ps per stage on the slower one. The code is the number of stages
it takes to catch up. The ring shape lets eight stages be reused lap after lap.
A straight Vernier delay line would need one stage per code step.

## Signal path

```
 func_in[i] ─┐                                        ┌─> func_out[i]
             MUX(s_n[i]) ─> INV1 ─ TSV ─ INV2 ─ tsv_rcv[i]
 test_in ────┘                                  │
                                   16:1 MUX(sel)┘─> lead ─> slow ring (8 x 160 ps)
 test_in ─> reference cell (fault-free) ────────────> lag ──> fast ring (8 x 150 ps)
                                                              │
                                     phase-capture DFFs <─────┘ -> encoder -> 7-bit code
                                                                          -> scan register -> code_so
```

- **I/O TSV cell** (`tsv_io_cell`). This is the driver inverter, the TSV and
  the receiver inverter. A rising edge at the driver input reaches the receiver
  output after a delay set by the TSV load. In this RTL the cell is a delay
  model. Its delay is an input (`delay_ps`) that stands for the analog
  behaviour.
- **Pre-logic** (`pre_logic`). Each TSV driver has a 2:1 multiplexer. Its test
  enable `s_n[i]` chooses between the functional signal (1) and the test
  transition `test_in` (0). With all enables at 1 the chip is in normal mode.
  A 16:1 multiplexer addressed by the 4-bit `sel` takes the selected receiver
  output as the **lead** edge. A defective TSV is faster, so its edge arrives
  first. The **lag** edge comes from a fault-free reference cell that the same
  `test_in` drives.
- **Vernier ring core** (`vr_core`). The lead edge goes into the slow ring and
  the lag edge into the fast ring. The lead must use the slow ring, or the
  lag edge would never catch up.

## How a measurement is converted

Each ring is a NAND gate followed by eight buffers (`delay_ring`). The last
buffer feeds back into the NAND. The NAND's other input is the edge being
measured. While that input is low the ring rests with every tap high. A rising
edge starts an oscillation. Because the NAND inverts, the first lap carries a
falling edge, the second a rising one, and so on. Both NANDs have the same
delay, so only the buffers contribute to the resolution, R = 160 − 150 = 10 ps
per stage.

Each of the eight buffer outputs carries two flip-flops (`vr_phase_capture`).
The fast-ring tap is their clock and the slow-ring tap at the same position is
their data:

| chain | clock edge | data | records laps |
|---|---|---|---|
| type B (`qb`) | falling | inverted slow tap | 1, 3, 5, … |
| type A (`qa`) | rising | slow tap | 2, 4, 6, … |

A stored 1 means the lead edge had already passed this stage when the lag edge
arrived.

Call the interval between the two edges t_M. When the lag edge reaches stage n
(counted across laps, n = 1, 2, …), it is behind by t_M − n·R. The lead edge
therefore stays ahead for every n with n·R < t_M.

Two lap counters count fast-ring laps: one on the falling edges of the last
tap, one on the rising edges. At the end of each lap the last slow tap shows
whether the lag edge overtook the lead edge during that lap. If it did, a
`caught` flag is set and every flip-flop stops sampling. The chain of that
catch lap is then a thermometer code, with ones for the stages where the lead
edge was still ahead. `vr_code_encoder` forms

```
code = (laps − 1) · 8 + ones(catch-lap chain)  =  floor(t_M / R)
```

Here `laps` counts the fast laps up to and including the catch lap. The chain
used is `qb` if the catch lap is odd and `qa` if it is even. An interval that
is an exact multiple of R sits on a decision boundary. A lag edge that comes
first gives code 0.

The code saturates at 127 and sets `overflow` when no catch happens in time,
or when the count exceeds 7 bits.

**Range.** The flip-flops compare levels, not edges. A stage is read correctly
only while the lead edge is less than one slow lap ahead. Otherwise the slow
tap has already flipped a second time. One slow lap is 30 + 8·160 = 1310 ps.
That is more than the largest code (127 × 10 ps), so the whole code range is
unambiguous. If you change the ring delays, keep `NAND_PS + NS*TS_PS` above
`(2**CODE_W) * (TS_PS − TF_PS)`.

**Settling.** A full-scale code needs 17 fast laps, about 21 ns. That fits in
the 50 ns measurement cycle.

## Test sequence

`test_controller` runs each test on the test clock `tck`:

| cycles | phase | what happens |
|---|---|---|
| 4 | SELECT | the Sel code is shifted in from `sel_si`, MSB first (`sel_config_reg`) |
| 1 | INIT | all capture flip-flops are cleared, the rings come to rest |
| 1 | MEASURE | `test_in` rises; the code is loaded into the scan register at the end of the cycle |
| 7 | SCAN | the code leaves on `code_so`, MSB first, with `code_so_valid` high (`code_scan_reg`) |

After the last bit, `done` pulses for one cycle. If `test_req` is still high
at that point, the next test's SELECT phase follows immediately. A batch of
TSVs therefore costs exactly 13 cycles per TSV. From SELECT onwards the
enable of the addressed TSV is 0 and all others stay 1, so the other TSVs keep
carrying functional data during a test. In IDLE every enable is 1.

To drive a test, raise `test_req` for one cycle. Then present Sel bit 3, 2, 1,
0 on `sel_si` in the four following cycles. Read `code_so` in the seven cycles
where `code_so_valid` is high.

The clear comes after the selection, not before it. Changing `sel` moves the
ring input from one TSV's receiver to another's, and that can start the slow
ring. Clearing after the last change of `sel` guarantees the rings start the
measurement from rest. `test_in` and the clear come directly from flip-flops,
so the rings and the asynchronous clear never see a decoder glitch.

## Modules

| file | kind | role |
|---|---|---|
| `vr_pkg.sv` | package | sizes, gate delays, controller state type |
| `vr_tsv_test_top.sv` | structural | the whole test circuit |
| `tsv_io_cell.sv` | delay model | driver, TSV and receiver; delay as an input |
| `pre_logic.sv` | logic | mode multiplexers, 16:1 selection |
| `vr_core.sv` | structural | two rings, capture, encoder |
| `delay_ring.sv` | delay model | NAND plus eight buffers in a loop |
| `vr_phase_capture.sv` | logic (ring-clocked) | type A/B flip-flops, lap counters, freeze |
| `vr_code_encoder.sv` | logic | laps and thermometer to code |
| `sel_config_reg.sv` | logic | serial Sel register |
| `code_scan_reg.sv` | logic | parallel-in, serial-out code register |
| `test_controller.sv` | logic | 13-cycle sequencer |

Default parameters: 16 TSVs, 4-bit Sel, 8 stages per ring, 7-bit code,
buffers of 160 ps (slow) and 150 ps (fast), 30 ps NANDs.

## What is modelled and what is logic

The rings and the I/O TSV cells are delay models. In silicon they are standard
cells whose delays are set by sizing. Synthesis would see the rings as
combinational loops. In a real implementation they are placed as hand-built
cells.

The capture flip-flops are ordinary synthesizable flip-flops, but their clocks
are the ring taps. The lap counters and the freeze flags sit in those ring
clock domains too. `vr_phase_capture` relies on the freeze taking effect
within one NAND plus one buffer delay. This holds in simulation and has to be
met in layout. Everything clocked by `tck` is plain synchronous logic with an
asynchronous active-low reset.

The top-level inputs `tsv_delay_ps` and `ref_delay_ps` exist only for
simulation. They give each cell its propagation delay. Nothing here turns a
void resistance, a void position or a leakage resistance into a delay; that
needs circuit simulation of the TSV model. The testbench therefore states
defects directly as delay reductions.

## Choices this implementation makes

- The gate delays (160/150/30 ps) are chosen to give 10 ps resolution with an
  unambiguous range. Only the 10 ps difference and the eight stages are fixed
  by the scheme.
- The fault-free code of 4 comes from giving the reference path 45 ps more
  delay than a fault-free TSV. With that offset, a TSV slightly slower than
  nominal still gives a valid code instead of zero.
- The lap counters, the catch test at the end of each lap, the freeze and the
  saturating encoder are one concrete way of turning the ring into a
  multi-lap code. Other arrangements are possible.
- Selection is serial (one Sel bit per cycle), and the code leaves MSB first.
- Each ring is a NAND plus eight buffers, with one flip-flop pair per buffer,
  which gives 16 flip-flops in total.
- The 16:1 multiplexer is written as an indexed select. A gate-level version
  would be a tree of 15 2:1 multiplexers.
- `meas_overflow` is a live status output next to the scanned code.
- The converter's minimal gate budget is the rings plus 16 capture
  flip-flops. On top of that, this implementation adds two 4-bit lap
  counters, two catch flags, the encoder, a 7-bit scan register, a 4-bit Sel
  register and the sequencer. These are needed to read out codes beyond one
  lap and to run the test serially.

## Simulating

Every file in `rtl/` has a self-checking testbench `tb/<module>_tb.sv`. It
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
testbenches need Verilator 5 with timing support:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/vr_pkg.sv tb/vr_tsv_test_top_tb.sv --top-module vr_tsv_test_top_tb
./obj_dir/Vvr_tsv_test_top_tb
```

`vr_tsv_test_top_tb` runs the complete circuit at its default parameters. It
tests every one of the 16 TSVs through the serial interface and compares each
scanned code with floor(t_M/10 ps), computed independently. It checks that each
test takes 13 cycles and that normal mode works between tests and for the
untested TSVs during a test. It also counts that each mechanism happened: a
fault-free code, a catch on an odd lap and on an even lap, a zero code and an
overflow. It runs in well under a second.

`tsv_workload_tb` also runs at the default parameters. It sweeps the
speed-up of one TSV in 1 ps steps, from 60 ps slower than nominal to 900 ps
faster. That span covers codes 0 to 94, which includes the 4 to 86 range
expected for real open and leakage defects. It checks each code, checks that
the codes never decrease, and checks that every code value appears, so every
10 ps step is resolved. It then tests all 16 TSVs back to back and checks
that the batch takes 208 cycles, which is 650 ns per TSV at 20 MHz.

The block testbenches check the following:

- `delay_ring_tb`: tap timing to the picosecond over four laps.
- `vr_phase_capture_tb`: chain contents, lap counts and the lap limit, against
  stage arithmetic.
- `vr_code_encoder_tb`: every lap and stage combination.
- `vr_core_tb`: code against interval.
- The controller, register and multiplexer testbenches: cycle-exact sequences
  and random vectors.

## Limits

- The codes measured are those the delay models produce. How closely a real
  ring reaches 10 ps steps depends on matching the buffers and NANDs in
  layout, which this RTL cannot show.
- An interval longer than one slow lap (1310 ps) would be read modulo the ring
  period. The default sizes keep every 7-bit code below that. The reference
  path offset must keep real defects inside that range as well.
- The rings keep oscillating for the rest of the measurement cycle after the
  catch, because only the flip-flops are frozen. They stop when `test_in`
  falls at the start of the scan phase.
