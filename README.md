# TESTCHIP: a weighted random pattern test controller

Testing a chip with deterministic patterns needs an expensive tester and a
long pattern-generation run. Random patterns avoid both, but plain random
patterns (every input 1 with probability 1/2) need very long tests for
circuits with hard-to-excite faults. Weighted random patterns fix this: each
input position gets its own probability of a 1, and several weight sets can
be applied one after another. TESTCHIP puts the whole tester into one chip
between a small host computer and the circuit under test (CUT). The CUT has
a scan path, or is purely combinational. The chip:

* generates weighted random patterns for the CUT's primary inputs (PIs) and,
  with an independent generator, for its scan path;
* clocks the CUT in test (scan) mode and in normal mode;
* compresses the responses from the primary outputs (POs) and the scan path
  into a 32-bit signature;
* runs up to 4 weight sets, each for 1 to 10^6 patterns, and signals the end
  of the test.

The host writes the CUT's sizes, the test lengths, the generator seeds and
the weight codes, starts the test, and compares the signature it reads back
with the fault-free signature it got from fault simulation.

This repository holds synthesizable SystemVerilog for the whole controller
at the published sizes: up to 127 PIs, 127 POs, 511 scan elements, 4 sets
and 10^6 patterns per set. It also holds self-checking testbenches. The
block structure and the test procedure follow the published architecture.
Everything the publication leaves open is a choice of this implementation,
and is marked as such below: polynomials, tap positions, weight functions,
bus protocol, register map and clocking details.

## Block structure

```
           host bus (addr 12, data 8, we, re)
                      |
               +--------------+
               | bus_interface|  parameter / status registers, RAM writes
               +--------------+
                 |  cfg, start
               +--------------+
               | control_unit |  windows, captures, set switching, test end
               +--------------+
     pos,set |          | pos,set        | shift/load        | step/enables
  +-----------+   +-----------+   +----------------+   +--------------------+
  |weight_ram1|   |weight_ram2|   | shift_register |   | signature_register |
  |4 x 128    |   |4 x 512    |   | 127 bits       |   | 32-bit, 2 inputs   |
  +-----------+   +-----------+   +----------------+   +--------------------+
     | code          | code          ^ si     |  ^ POs      ^ in_a   ^ in_b
  +-----------+   +-----------+      |        |  |          |        |
  |pattern_gen|---+-----------+------+    PIs v  |   so ----+        |
  |  1 (PIs)  |   |pattern_gen|--> SDI        CUT  ---------------> SDO
  +-----------+   | 2 (scan)  |
                  +-----------+        clock_gate --> cut_clk, cut_test_mode
```

| Module | File | Role |
|---|---|---|
| `testchip` | rtl/testchip.sv | top level: connects all blocks, CUT and host ports |
| `tc_pkg` | rtl/tc_pkg.sv | sizes, polynomials, weight function, config struct, register map |
| `pattern_gen` | rtl/pattern_gen.sv | 32-bit modular LFSR with three taps and a weight multiplexer |
| `weight_ram` | rtl/weight_ram.sv | 3-bit weight code per {set, position} |
| `shift_register` | rtl/shift_register.sv | serial-in PI register, parallel PO capture, serial out |
| `signature_register` | rtl/signature_register.sv | 2-input 32-bit MISR |
| `control_unit` | rtl/control_unit.sv | test sequencer |
| `bus_interface` | rtl/bus_interface.sv | host registers |
| `clock_gate` | rtl/clock_gate.sv | latch-based gate that makes the CUT clock |

## How one test runs

The sequencing is the least obvious part of the design, so it comes first.

**Windows and captures.** Let `S = max(n_pi, n_po, n_sc)`. Every pattern takes
one *window* of S shift cycles, followed by one *capture* cycle:

1. **Shift window (test mode, S cycles).** In cycle `j = 0 .. S-1`:
   * Generator 1 produces one weighted bit. It enters stage 0 of the shift
     register, and all stages move up by one.
   * Generator 2 produces one weighted bit. It is driven on SDI, and the
     CUT's scan path shifts.
   * The signature register takes two response bits of the *previous*
     pattern. One comes from shift-register stage `n_po-1`, and is valid for
     `j < n_po`. The other comes from SDO, and is valid for `j < n_sc`. An
     input with no valid bit in that cycle is forced to 0. The register
     steps only if at least one input is valid.
2. **Capture (normal mode, 1 cycle).** The CUT is clocked once in normal mode,
   so its scan path captures the response. On the same edge the shift
   register loads the POs: PO i goes to stage i.

After the last pattern, one more window unloads the final response (the
bits shifted in then are not used). The first window of a test has no
response to compress, so the signature register does not step during it.
Since every unit shifts for all S cycles, each keeps the *last* bits it
received:

* The bit generated in cycle j ends up at position `p = S-1-j`. That is
  shift-register stage p, which drives PI p, or scan element p counted from
  SDI. Bits for positions beyond a unit's length fall off its end.
* The weight RAMs are therefore addressed with `pos = S-1-j`. For the scan
  path, position p is the scan element p places from SDI. For the PIs it is
  PI p.
* POs leave in the order PO n_po-1, ..., PO 0. Scan bits leave in the order
  element n_sc-1 (the one next to SDO) down to element 0.

**Circuits without a scan path.** With `n_sc = 0` the chip tests a purely
combinational circuit: S = max(n_pi, n_po), SDO is never sampled and SDI
can be left open.

**Cycle count.** A test of P patterns (P = sum of the test lengths of sets
0..last_set) takes exactly `1 + P*(S+1) + S` cycles, counted from the cycle
after the start write to `test_end`.

**Weight sets.** Set 0 is active first. After `test_len[s]` captures, set
s+1 becomes active. After the last set (`last_set`), the final window runs
and the test ends. The generators are *not* reseeded between sets: they
run on from where they are.

**Clocking of the CUT.** `cut_clk` is the system clock, gated by a latch-based
clock gate. It pulses once per shift cycle and once per capture cycle, and
stays low otherwise. The CUT, the shift register, the generators and the
signature register therefore all act on the same rising edge:

* at a capture edge, the PIs the CUT samples are still the pattern;
* the POs the shift register samples are still the response to that pattern.

Deriving the CUT clock from a flip-flop instead would make the PIs change
right after the CUT clock edge (a hold race). `cut_test_mode` is registered.
It is low exactly during the capture cycle.

```
clk        _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_      (S = 3 shown)
state       SHIFT SHIFT SHIFT CAP SHIFT ...
cut_clk    _|‾|_|‾|_|‾|_|‾|_|‾|_ ...          one pulse per cycle while testing
test_mode  ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|___|‾‾‾‾‾‾        low only for the capture cycle
```

## Weighted pattern generators

Each generator (`pattern_gen`) is a modular (Galois) 32-bit LFSR. Every
step multiplies the state by x modulo the feedback polynomial. The two
generators use different primitive polynomials (`tc_pkg`):

| Generator | Polynomial (x^32 implicit) |
|---|---|
| 1 (PIs) | `32'h04C1_1DB7` |
| 2 (scan path) | `32'h6164_99C9` |

Stages 31, 20 and 9 are tapped as bits a, b and c. Both polynomials have
feedback terms between every pair of taps, so the three bits are practically
independent. A 3-bit code k from the weight RAM selects one of these
functions:

| code k | P(1) | function |
|---|---|---|
| 0 | 0 | constant 0 |
| 1 | 1/8 | a & b & c |
| 2 | 2/8 | a & b |
| 3 | 3/8 | a & (b \| c) |
| 4 | 4/8 | a |
| 5 | 5/8 | a \| (b & c) |
| 6 | 6/8 | a \| b |
| 7 | 7/8 | a \| b \| c |

Equivalently, the output is 1 when the 3-bit number `{a,b,c}` is at least
`8-k`.

Using two completely separate generators keeps the PI patterns and the scan
patterns statistically independent. Producing the PI pattern serially, one
weighted bit per cycle into a shift register, costs one weighting circuit in
place of 127. It costs no time either, because the scan path has to be
loaded serially anyway.

Seeds are programmable, and loaded when a test starts. A zero seed is
replaced by 1, because the all-zero state would lock the LFSR.

## Signature register

`signature_register` is a 2-input MISR (multiple-input signature register)
with the primitive polynomial x^32 + x^22 + x^2 + x + 1. Each step
multiplies the state by x, reduces it, and XORs in two bits: the
shift-register (PO) bit into stage 0, the SDO (scan) bit into stage 1.

A test clears the register when it starts. For long tests, the chance that
a faulty circuit gives the fault-free signature (aliasing) is about 2^-32.

## Host interface and register map

The bus is synchronous to `clk`:

* A write (`bus_we`) or a read (`bus_re`) is sampled at a rising edge.
  Never assert both in the same cycle; an assertion checks this.
* Read data is valid on `bus_rdata` in the following cycle.
* Multi-byte values are little endian.
* While a test runs, writes to parameters and RAMs are ignored.

| Address | R/W | Content |
|---|---|---|
| 0x000 | W | bit 0 = 1: start a test |
| 0x000 | R | status: bit 0 busy, bit 1 done, bits 3:2 active set |
| 0x001 | R/W | n_pi (1..127) |
| 0x002 | R/W | n_po (1..127) |
| 0x003, 0x004 | R/W | n_sc[7:0], n_sc[8] (0..511; 0 = no scan path) |
| 0x005 | R/W | last_set (number of sets - 1) |
| 0x010 + 4s + b | R/W | test length of set s, byte b = 0..2 (20 bits, 1..10^6) |
| 0x020..0x023 | R/W | seed of generator 1 |
| 0x024..0x027 | R/W | seed of generator 2 |
| 0x028..0x02B | R | signature |
| 0x400 + 128s + p | W | weight code of PI position p, set s |
| 0x800 + 512s + p | W | weight code of scan position p, set s |

The busy bit reads 1 from the cycle after the start write. The `test_end`
pin is `done`, and goes low as soon as a new start is written.

A host uses it in this order:

1. Write the sizes, `last_set`, the test lengths and the seeds.
2. Write the weight codes of every used position of every used set.
3. Write 1 to 0x000.
4. Wait for `test_end`, or poll the status register.
5. Read the four signature bytes.

## Sizes, parameters and performance

| Item | Value | Origin |
|---|---|---|
| PIs / POs (shift register) | 127 | published |
| scan path elements | 511 | published |
| weight sets | 4 | published |
| test length per set | 1..10^6 (20-bit counter) | published |
| LFSRs / signature | 32 bits | published |
| weight RAMs | 4 x 128 and 4 x 512 words of 3 bits | sized from the above |

`testchip` has one parameter, `SR_LEN`, whose default is 127. The other
sizes are constants in `tc_pkg`.

The design produces one bit per generator and one signature step per clock
cycle. At a 20 MHz clock that is the published rate of 2·10^7 bits/s.

For the ISCAS'89 circuit s1196 (14 PIs, 14 POs, 18 scan elements), four
sets of 30145, 49073, 49073 and 25313 patterns take 2,918,495 cycles. That
is 0.146 s at 20 MHz. The published test time for that case is 0.3 s, which
would correspond to about two clock cycles per bit. The publication does not
give the chip's clock frequency, so the difference cannot be resolved.

## What is not built, and where this design departs

* **External extension of the shift register, and cascading several
  chips.** The original allows both for CUTs beyond 127 PIs/POs. Neither
  the pins nor the protocol are described, so neither is implemented.
* **Own choices** (not published): polynomials; tap stages; the weight
  functions and code 0 = constant 0; the window length S shared by both
  generators; position mapping `S-1-j`; MISR input stages; clearing the
  signature at start; the gated CUT clock and the polarity of
  `cut_test_mode`; the bus protocol and the register map; ignoring writes
  while busy; combinational-read weight RAMs.
* The weight RAMs have no read-back path to the host.
* The weight RAMs are written as arrays. A real chip would use RAM macros.
  Their read is combinational, because the code must be ready in the same
  cycle as its address.
* The clock gate contains one intended latch.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block with a model written independently of it, and prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| tb_pattern_gen | both polynomials: every state against a stage-by-stage LFSR model; every bit against the `{a,b,c} >= 8-k` rule; zero-seed handling; hold; measured frequency of 1s per code within ±0.04 of k/8 |
| tb_weight_ram | full fill and read-back; random read/write mixes |
| tb_shift_register | random shift/load against a model; PI placement; PO output order |
| tb_signature_register | polynomial-arithmetic model; single-bit error detection; no short cycle |
| tb_control_unit | pulse counts, cycle count, position sequence and set at every capture, for four configurations up to 127/127/511 |
| tb_bus_interface | every register written and read back; start pulse; status; signature; RAM strobes; writes ignored while busy |
| tb_testchip | end-to-end through the bus with a behavioural scan-path CUT (`cut_model`, `cut_pkg`) against a bit-level reference model (`tc_ref_pkg`) |
| tb_testchip_s1196 | one complete s1196-sized test at default parameters, fault-free and faulty |
| tb_testchip_c880 | a combinational circuit of c880's size (60 PIs, 26 POs, no scan path): 660 weighted patterns in 4 sets, fault-free and faulty, and 37000 unweighted patterns |

`tb_testchip` covers these cases:

* S set by the POs, by the scan path and by the PIs;
* 1 to 4 sets;
* all 8 codes;
* a zero seed;
* an injected CUT fault, which must change the signature;
* back-to-back tests;
* writes during a test;
* the maximum sizes.

It counts each of these mechanisms, and fails if one never occurs.

`tb_testchip_s1196` uses the published s1196 weights and test lengths. The
real s1196 netlist is not used: `cut_model` has the same numbers of inputs,
outputs and scan elements, but different logic. The same holds for c880 in
`tb_testchip_c880`. Its weights are not published, so random codes stand in.

The reference model shares only the CUT's logic function (`cut_pkg`) with
the simulated CUT. It does not share the register-transfer structure of the
design. Its signatures therefore check the sequencing described above, and
not merely that the RTL agrees with itself.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/tc_pkg.sv tb/cut_pkg.sv tb/tc_ref_pkg.sv tb/tb_testchip.sv \
    --top-module tb_testchip -o sim && ./obj_dir/sim
```

Use the same command with another testbench as top. A block testbench
needs only `rtl/tc_pkg.sv` in front, for example
`rtl/tc_pkg.sv tb/tb_control_unit.sv --top-module tb_control_unit`.

`tb_testchip_s1196` simulates 2 x 2.9 million cycles, which takes a few
seconds. To change a size, edit `tc_pkg` and the width parameter of
`testchip`. Widths derived from them follow: `POS_W` must hold 0..S-1, and
`LEN_W` must hold the longest test.
