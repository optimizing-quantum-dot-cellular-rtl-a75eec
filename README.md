# Reversible Hamming (6,3) code generator and error detector

This is a single-error-detecting code for three data bits, built entirely from
reversible 2×2 Feynman gates. A Feynman gate passes input A through and also gives
A xor B. The circuit was first laid out for quantum-dot cellular automata (QCA). QCA is
a transistor-free nanoscale logic family where the XOR-based reversible gate is cheap,
and where a circuit's delay is counted in clock zones. The RTL here keeps the circuit's
gate structure exactly. It adds a register pipeline that reproduces the latency of the
clock-zoned circuit: 2 zones for the generator and 3 for the detector.

There are two circuits, one at each end of a link:

* The **generator** turns D1 D2 D3 into a six-bit message with three parity bits.
  It uses 3 Feynman gates.
* The **detector** takes a received six-bit message and computes three
  error-detector parity bits, EDP1..EDP3. It uses 6 Feynman gates. All three EDP bits
  are zero for a valid message. Any single-bit error, and any double-bit error, makes
  at least one of them one.

## The code

Each parity bit is the xor of two data bits:

| parity | equation  | checks positions |
|--------|-----------|------------------|
| P1     | D1 ^ D2   | 3, 5             |
| P2     | D1 ^ D3   | 3, 6             |
| P3     | D2 ^ D3   | 5, 6             |

That gives the classic Hamming layout, with parity bits at the power-of-two positions:

```
position : 6  5  4  3  2  1
bit      : D3 D2 P3 D1 P2 P1        (codeword_t = logic [6:1])
```

The detector recomputes each check, including the parity bit itself:

```
EDP1 = P1 ^ D1 ^ D2      (positions 1, 3, 5)
EDP2 = P2 ^ D1 ^ D3      (positions 2, 3, 6)
EDP3 = P3 ^ D2 ^ D3      (positions 4, 5, 6)
```

Because of this layout, the number `{EDP3, EDP2, EDP1}` is the position of a single
flipped bit. For example, a flipped D2 gives 5. The testbenches check this for every
code word and every position. This design does not include a circuit that uses the
position to correct the bit. The `rx_edp_o` and `rx_data_o` ports carry everything such
a corrector would need.

## Gate structure

Generator (`hamming63_generator`): each gate takes two data bits, passes the first one
through, and produces a parity bit.

```
FG(D1, D2) -> D1, P1
FG(D2, D3) -> D2, P3
FG(D3, D1) -> D3, P2
```

The data bits the gates pass through go into the code word, so every output bit comes
from a gate.

Detector (`hamming63_detector`) has two stages of three gates each:

```
stage 1:  FG(D1, D2) -> D1, D1^D2      stage 2:  FG(D1^D2, P1) -> D1^D2, EDP1
          FG(D2, D3) -> D2, D2^D3                FG(D2^D3, P3) -> D2^D3, EDP3
          FG(D3, D1) -> D3, D3^D1                FG(D3^D1, P2) -> D3^D1, EDP2
```

The outputs that are not needed are the "garbage" outputs of the reversible circuit.
They are kept as ports: `data_o` carries the stage-1 pass-throughs, and `pair_o`
carries the stage-2 pass-throughs. The names describe what each output carries. The
original layout gives them no fixed numbering.

Each data bit feeds two gates. Strict reversible-logic practice forbids fan-out. The
equations need every data bit twice, so this design follows the published gate
diagram and allows the fan-out.

## Timing: clock zones as register stages

A QCA circuit moves its signals forward one clock zone per quarter of the QCA clock
cycle. The published latencies are 0.5 ns for the generator and 0.75 ns for the
detector. This design assumes a 1 ns QCA clock cycle of four 0.25 ns zones, so the
latencies are 2 and 3 zones. The zone period is this design's assumption.
`qca_zone_pipe` models the zones as a chain of registers clocked once per zone, with a
valid flag carried alongside the data:

* A word accepted on `tx_valid_i` at a rising edge appears on `tx_codeword_o` with
  `tx_valid_o` `GEN_ZONES` (= 2) edges later.
* A message accepted on `rx_valid_i` appears, checked, on `rx_edp_o`/`rx_data_o` with
  `rx_valid_o` `DET_ZONES` (= 3) edges later.
* Both sides accept one word per tick, with no stalls.
* `rst_n` is an active-low asynchronous reset. It clears every stage, valid flags
  included.

The gate logic is combinational. It sits in front of the pipeline, so the registers
only delay the result and do not split the gates across zones. Where the real layout
places its zone boundaries makes no difference to the function, so the model does not
try to copy them. The valid flags, the reset, and the one-register-per-zone model are
this design's choices.

## Files and interfaces

| file | contents |
|------|----------|
| `rtl/hamming63_pkg.sv` | `data_t` {d1,d2,d3}, `parity_t`, `edp_t`, `pair_t`, `codeword_t` (= `logic [6:1]`), the position constants `POS_*` |
| `rtl/feynman_gate.sv` | `p_o = a_i`, `q_o = a_i ^ b_i` |
| `rtl/hamming63_generator.sv` | `data_i` → `codeword_o`, `parity_o`; combinational |
| `rtl/hamming63_detector.sv` | `codeword_i` → `edp_o`, `data_o`, `pair_o`; combinational |
| `rtl/qca_zone_pipe.sv` | `WIDTH`, `STAGES`; `valid_i/data_i` → `valid_o/data_o` after `STAGES` clocks |
| `rtl/hamming63_top.sv` | both link ends with their zone pipelines; `GEN_ZONES = 2`, `DET_ZONES = 3` |

Conventions:

* In the structs the first member is the most significant bit. So `data_t` holds D3 in
  bit 0, and counting `data_t` from 0 to 7 steps D3 fastest.
* A logic 1 stands for a QCA cell polarisation of +1.

The top does not include the channel between the two ends. `tx_codeword_o` and
`rx_codeword_i` are separate ports, so a loopback, a real link, or an error injector
can be placed between them.

## Verification

Each testbench computes its expected values from the position rule of the code, not
from the design's modules. Each one ends with a `TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_feynman_gate` | full truth table of the gate; the four output pairs are all different |
| `tb_hamming63_generator` | all 8 data words; the worked example D=001 → P1 P2 P3 = 0 1 1; minimum distance 3 between code words |
| `tb_hamming63_detector` | all 64 messages; single-bit error → EDP names the position, for every code word; the example D=001, P=000 → EDP = 011 |
| `tb_qca_zone_pipe` | 0, 2 and 3 stages against a scoreboard; reset; random valid gaps |
| `tb_hamming63_top` | end to end at the default parameters (see below) |

`tb_hamming63_top` loops the transmit side back into the receive side through a
channel that flips 0, 1 or 2 bits at random on each tick. It then checks four things:

* both latencies, cycle by cycle;
* the code word of every accepted word;
* the EDP bits and the data bits passed through for every received message;
* that the data arrive unchanged when no bit was flipped.

It also counts how often each behaviour occurred: clean transfers, detected single and
double errors, back-to-back words, idle ticks, and a reset in mid-stream that must
flush both pipelines. A behaviour that never occurs counts as a failure.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_hamming63_top \
    rtl/hamming63_pkg.sv rtl/feynman_gate.sv rtl/hamming63_generator.sv \
    rtl/hamming63_detector.sv rtl/qca_zone_pipe.sv rtl/hamming63_top.sv \
    tb/tb_hamming63_top.sv -o sim
./obj_dir/sim
```

Every run takes well under a second.

## What this RTL does not cover

* **Bit correction.** A corrector that flips the bit at position
  `{EDP3,EDP2,EDP1}` belongs to the same coding scheme, but it is not part of the
  circuits this design is based on, so it is not included.
* **The physical QCA layout.** This RTL expresses nothing about the physical circuit:
  the quantum-dot cells, the fixed-polarisation cells inside each XOR, the coplanar
  wire crossings, or the four-phase clocking field. The same goes for the figures
  reported for it: 58 and 88 cells, 0.047 and 0.086 µm², and an energy dissipation of
  1.92·10⁻² and 3.00·10⁻² eV in total. Only the logic function and the latency in
  zones are modelled.
* **Zone period.** The mapping of 0.25 ns per zone is an assumption. To model a
  different clock, change `GEN_ZONES` and `DET_ZONES`. Setting either to 0 makes that
  side purely combinational.
