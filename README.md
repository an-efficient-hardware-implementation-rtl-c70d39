# Compact iterative KASUMI encryption core

KASUMI is the 64-bit block cipher, keyed with 128 bits, that sits inside the
3GPP confidentiality (f8) and integrity (f9) functions of UMTS, and inside
A5/3 and GEA3 for GSM and GPRS. This core encrypts one block every 16 clock
cycles using very little logic. It follows the architecture published as
"An Efficient Hardware Implementation of the KASUMI Block Cipher for Third
Generation Cellular Networks". That architecture uses three tricks:

1. **Reuse.** The FO function has three FI sub-rounds. Here it is built as one
   section holding two FI units, and that section runs twice.
2. **Shared dual-port S-box memories.** The two FI units of the section share
   two dual-port S9 memories and two dual-port S7 memories. The upper memories
   are clocked on the falling edge and the lower ones on the rising edge. This
   puts both lookup levels of an FI evaluation into a single clock cycle.
3. **A rotating key scheduler.** The key is kept as eight 16-bit subkeys, next
   to the eight key-schedule constants. Both arrays rotate by one subkey per
   round, stepped by a divide-by-two tick. The round keys then come from fixed
   wiring.

The result is one round every two cycles and eight rounds in 16 cycles. At
the original design's 41.14 MHz that is 64 × 41.14 / 16 ≈ 165 Mbit/s.

Only encryption is implemented. This is the direction that f8 and f9 use.

## The cipher in brief

KASUMI is an eight-round Feistel network. Round *i* maps (L, R) to
(R ⊕ f_i(L), L). The round function depends on the round's parity:

* in odd rounds, f_i = FO(FL(L));
* in even rounds, f_i = FL(FO(L)).

The sub-functions are:

* **FL** (32 bit) is linear. It uses AND, OR, XOR and 1-bit rotations, keyed
  by KL1 and KL2.
* **FO** (32 bit) is a three-round Feistel network of FI calls, keyed by
  KO1..3 and KI1..3. With input (L0, R0) and FIk = FI(· ⊕ KOk, KIk):
  * R1 = FI1(L0) ⊕ R0
  * R2 = FI2(R0) ⊕ R1
  * R3 = FI3(R1) ⊕ R2
  * result = (R2, R3)
* **FI** (16 bit) is a four-stage network over a 9-bit half and a 7-bit half.
  Its stages are S9, S7 (with KI mixed in), S9, S7.

Key schedule: K = K1..K8, with K1 in the top 16 bits, and K'j = Kj ⊕ Cj.
Indices are taken mod 8. Round *i* uses:

* KL1 = K_i <<< 1, KL2 = K'_{i+2}
* KO1 = K_{i+1} <<< 5, KO2 = K_{i+5} <<< 8, KO3 = K_{i+6} <<< 13
* KI1 = K'_{i+4}, KI2 = K'_{i+3}, KI3 = K'_{i+7}

The S-box tables, the constants C1..C8 and this schedule come from the KASUMI
specification (3GPP TS 35.202), not from the architecture description. They
are in `rtl/kasumi_pkg.sv`. Running the core on the published test vector
checks them:

* key 2BD6459F82C5B300952C49104881FF48
* plaintext EA024714AD5C4D84
* ciphertext DF1F9B251C0BF45F

## How FO folds into two iterations

FI1 depends only on L0, and FI2 depends only on R0. So the first two FO
sub-rounds can run side by side. The reusable section computes, from two
16-bit inputs A and B:

```
P = FI(A ^ KOa, KIa) ^ B
Q = FI(B ^ KOb, KIb) ^ P
```

| iteration | A, B           | KOa/KIa | KOb/KIb | produces             |
|-----------|----------------|---------|---------|----------------------|
| 0         | L0, R0 (input) | KO1/KI1 | KO2/KI2 | P = R1, Q = R2       |
| 1         | P, Q (fed back)| KO3/KI3 | KO2/KI2 | P = R3, Q is discarded |

The FO result is (B of iteration 1, P of iteration 1) = (R2, R3).

In iteration 1 the second FI has no counterpart in FO. It is what makes the
two halves of the unrolled FO identical, so one piece of hardware can serve
both. Multiplexers on A, B, KOa and KIa select the iteration
(`rtl/kasumi_fo.sv`).

## The dual-port FI unit and its two clock edges

This is the least obvious part of the design (`rtl/kasumi_fi_dual.sv`).

The first S7 lookup of FI reads only the input's 7-bit half. It does not
depend on the first S9 output, so the first S9 and the first S7 can be read
together. The same holds for the second pair. An FI evaluation is therefore
two levels of lookups:

```
            falling edge                         rising edge
x[15:7] -> S9 (upper) -+                 +-> S9 (lower) -+
x[6:0]  -> S7 (upper) -+-> nine, seven --+-> S7 (lower) -+-> {seven', nine'}
x[6:0], KI  -> regs ---+   (XOR with KI)  seven -> reg --+
```

* **Upper memories.** They sample on the falling edge. Alongside them, the
  7-bit input half and KI are registered. These are the "alignment"
  registers.
* **Middle.** The combinational middle forms `nine` and `seven`:
  * n = S9 ⊕ x[6:0] (zero-extended)
  * seven = S7 ⊕ n[6:0] ⊕ KI[15:9]
  * nine = n ⊕ KI[8:0]
* **Lower memories.** They sample these on the rising edge. `seven` is
  registered with them.
* **Output.** The output logic gives:
  * nine' = S9 ⊕ seven
  * seven' = S7 ⊕ nine'[6:0]
  * FI = {seven', nine'}

Port A of every memory serves the first FI and port B the second. This is why
two FI units need only four memories: 2 × S9 and 2 × S7, each dual-port.

What this means for timing:

* The memory registers are the only pipeline registers in the FI/FO path.
* An input applied before a falling edge gives its FI result just after the
  next rising edge.
* The FO section's own outputs (P, Q) are combinational functions of the
  lower memory registers. They are fed straight back as the next iteration's
  inputs, ahead of the next falling edge.
* The B operand goes through one falling-edge and one rising-edge register,
  so that it meets the FI result of its own iteration.

Critical paths are half-cycle paths:

* rising-edge memory outputs → FI output logic → FO XORs → (FL, round XOR,
  FL) → falling-edge memory address;
* falling-edge memory outputs → FI middle → rising-edge memory address.

## Round logic and schedule

`rtl/kasumi_round.sv` holds:

* the FO module;
* two FL units, one in front of FO and one behind it;
* the Feistel registers;
* the multiplexers.

Odd rounds use the front FL and even rounds use the back FL. Per cycle of a
block (`cnt` = 0..15, iteration = cnt[0], round = cnt[3:1] + 1):

| cycle | first half (before the falling edge) | falling edge | rising edge |
|-------|--------------------------------------|--------------|-------------|
| even (iteration 0) | Lnew = R ⊕ f and Rnew = L are formed from the last memory stage (round 1 takes the plaintext); the FO input is Lnew (through the front FL in odd rounds) | upper memories take FO iteration 0; Feistel registers take (Lnew, Rnew) | lower memories |
| odd (iteration 1) | the FO section feeds back (P, Q) | upper memories take iteration 1; KL and the round's parity are kept for the back FL | lower memories; the FO result is ready after this edge |
| 16 (`fin`) | Lnew/Rnew is the ciphertext | result register loads | `ct_valid` is set |

The round key for the back FL is held in a register. This is needed because
the key scheduler has already moved to the next round when that FL is
evaluated.

## Key scheduler and divider

`rtl/kasumi_keysched.sv` has two eight-entry arrays of 16-bit registers, K and
C. On `load` it takes the key and C1..C8. On `adv` both arrays rotate left by
one entry. Slot *j* then holds K_{i+j−1} in round *i*, and the round keys are
fixed functions of the slots. After eight advances the arrays are back where
they started, so the next block with the same key needs no reload. The core
reloads anyway on every start, which allows a new key per block.

`rtl/kasumi_clkdiv2.sv` is a toggle flip-flop. It makes a half-rate clock and
a `tick` in the second cycle of each period. The scheduler advances on `tick`.
The tick is a clock enable on the single core clock, not a second clock net.
The divider's phase is cleared whenever a block starts.

## Sequencer and interface

`rtl/kasumi_ctrl.sv` counts the 16 cycles and handles the handshake.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | core clock; both edges are used |
| `rst_n` | in | 1 | asynchronous reset, active low (controller, divider, key registers) |
| `start` | in | 1 | start a block; sampled on the rising edge |
| `ready` | out | 1 | `start` will be accepted: when idle, or in the last cycle of a block |
| `key` | in | 128 | key; K1 = key[127:112] |
| `pt` | in | 64 | plaintext |
| `ct` | out | 64 | ciphertext; holds until the next result |
| `ct_valid` | out | 1 | one-cycle pulse |

Timing:

* A block accepted on rising edge E0 has `ct_valid` set by edge E17.
* Blocks may follow each other with no gap. Their results are then 16 cycles
  apart.
* A `start` while `ready` is low is ignored.
* Assertions in the sequencer check that a result is flagged 17 edges after
  each accepted start.

## Files

| file | contents |
|------|----------|
| `rtl/kasumi_pkg.sv` | round-key struct, constants C1..C8, S7 and S9 tables |
| `rtl/kasumi_s9_rom.sv`, `rtl/kasumi_s7_rom.sv` | dual-port synchronous S-box ROMs; the `FALLING` parameter selects the edge |
| `rtl/kasumi_fi_dual.sv` | two FIs per cycle on four dual-port memories |
| `rtl/kasumi_fl.sv` | FL |
| `rtl/kasumi_fo.sv` | two-iteration FO section |
| `rtl/kasumi_round.sv` | round logic |
| `rtl/kasumi_keysched.sv`, `rtl/kasumi_clkdiv2.sv`, `rtl/kasumi_ctrl.sv` | key scheduler, divider, sequencer |
| `rtl/kasumi_top.sv` | the core |
| `tb/kasumi_ref_pkg.sv` | untimed reference model of KASUMI |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Memory sizing

The memories hold:

* two S9 tables of 512 × 9 bits (4608 bits each);
* two S7 tables of 128 × 7 bits (896 bits each).

On an FPGA whose block RAMs hold 4096 bits, such as the Virtex-E family the
original targeted, that takes six blocks:

* each S9 table needs two blocks;
* each S7 table fits in one.

In the RTL each S-box memory is an array initialised with its table and read
through two registered ports, so synthesis infers one two-port ROM of
4608 bits (S9) or 896 bits (S7), 11008 bits in all. The split of an S9 table
over two physical RAM blocks is left to the tool.

Generic synthesis of the whole core gives 11008 memory bits and 581 register
bits besides the memory output registers. The original FPGA implementation
reported 566 flip-flops and six block RAMs, so the two are of the same size.

## Verification

Every testbench compares with values computed independently of the block. It
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_kasumi_top` is the end-to-end test, with the core at its default
  configuration:
  * the 3GPP vector, then 199 random key/plaintext pairs;
  * blocks back to back, with idle gaps, and with ignored starts;
  * each result is checked for value, for a latency of 17 edges and for
    16-cycle spacing;
  * it counts how often each mechanism occurs and fails if one never does.
    The mechanisms are the front FL, the back FL, the second FO iteration,
    key advances, back-to-back starts, ignored starts and idle cycles.
* `tb_kasumi_round` drives the round logic with a model of the sequencer and
  the reference round keys.
* `tb_kasumi_fo` runs 1000 FO operations back to back.
* `tb_kasumi_fi_dual` runs 2000 pairs of FI evaluations.
* The ROM testbenches check every entry, the spot values of the
  specification, the permutation property, and which edge each copy updates
  on.
* The key scheduler is checked against the reference schedule over two full
  rotations.
* The sequencer and the divider are checked against cycle models.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/kasumi_pkg.sv tb/kasumi_ref_pkg.sv tb/tb_kasumi_top.sv \
    --top-module tb_kasumi_top -o sim
./obj_dir/sim
```

Replace `tb_kasumi_top` with any other testbench name to run that one.

## Departures and choices

These choices are this design's own. The architecture description does not
fix them.

* **Grouping of the FI sub-rounds.** The four FI sub-rounds are grouped into
  two parallel lookup levels, the upper (falling-edge) S9 + S7 pair and the
  lower (rising-edge) pair. This is a reconstruction from the description of
  the upper memories on the falling edge and the lower ones on the rising
  edge.
* **The dummy FI of FO iteration 1.** It is fed with B ⊕ KO2 and KI2, and its
  output is discarded.
* **Registers on the falling edge.** The Feistel registers and the ciphertext
  register load on the falling edge. The round-1 plaintext is registered on
  the start edge.
* **Handshake and latency.** The `start`/`ready`/`ct_valid` handshake is this
  design's own. The result appears 17 edges after start: 16 cycles of rounds,
  plus the cycle in which the last round's output is formed and stored.
* **Divider as a clock enable.** The divide-by-two divider drives a clock
  enable rather than a derived clock.
* **Reset.** Only the controller, the divider and the key registers are
  reset. The data registers need none, because every value is written before
  it is read.
* **No decryption.** There is no decryption path.
* **Not modelled.** The f8 and f9 modes built around KASUMI, and the physical
  split of S9 into two 4096-bit RAM blocks, are not included.
