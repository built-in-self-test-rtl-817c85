# Built-in self-test for the ICAP and Frame ECC of Virtex-4 / Virtex-5 FPGAs

Virtex-4 and Virtex-5 FPGAs contain two hard cores that SEU mitigation
schemes rely on:

* The **ICAP** (internal configuration access port) lets fabric logic write
  and read the configuration memory.
* The **Frame ECC** checks each configuration frame as it is read back, using
  11 Hamming bits and an overall parity bit stored in the frame.

If either core is faulty, SEUs in the configuration memory are missed or
"repaired" wrongly. This RTL is an off-line self-test for the two cores. It is
loaded into the fabric as a configuration of its own, so the user design pays
nothing in area or speed.

The method is simple and slow:

1. Take one configuration frame that holds nothing but routing.
2. Write it through the ICAP with a test pattern.
3. Read it back through the ICAP. The Frame ECC computes the syndrome of the
   frame while it is read.
4. Compact everything the ICAP returns into one 32-bit MISR, and every
   syndrome into a second MISR.
5. Repeat for all patterns, then compare both signatures with known-good
   values. The result is one pass/fail bit, TDO.

The patterns are every frame with exactly one 1 and every frame with exactly
two 1s. For a parity tree of unknown structure, this set detects all single
and multiple stuck-at faults and all bridging faults. It also exercises the
Frame ECC's word counter, masks and accumulators, and every ICAP data line.
For N = 1312 frame bits the count is N + N(N-1)/2 = (N² + N)/2 = **861,328
patterns**. At 318 clock cycles per pattern a run takes 273.9 M cycles,
**2.739 s at 100 MHz**.

The repository also contains an RTL model of the Frame ECC checker itself,
built the way such a checker can be built with little logic: sequentially, one
32-bit word at a time. The top level includes it as the Frame ECC under test.

## Block diagram

```
                 +-----------+  32  +------+
 Start --------->|    TPG    |----->|      |
                 | 2x1312 SR |      | 2:1  |  32   +--------+ ICAP_O  +-----------+
                 | 1312 OR   |      | mux  |------>|  ICAP  |-------->| ICAP MISR |--> Scan_Out
                 | 64:1 mux  |      |      | ICAP_I| (port) |         +-----------+
                 +-----------+      |      |       +--------+               ^ scan
                 +-----------+  32  |      |                                |
                 | instr RAM |----->|      |  frame read-back   +---------+ | 12 +-----------+
                 | 512 x 32  |      +------+  --cfg_word_i----->|Frame ECC|--+-->| ECC MISR  |<-- Scan_In
                 +-----------+                                  +---------+ SYNDROMEVALID = enable
                       ^ controller: addresses, selects, CE/WRITE,                  |
                         TPG step, MISR enables, Done                      compare with good
                                                                           signatures, OR TDI --> TDO
```

| module            | role |
|-------------------|------|
| `frame_ecc_bist`  | top: the BIST plus the Frame ECC checker under test |
| `bist_controller` | sequencer: Start handling, the three counters, ICAP control, Done |
| `tpg`             | test pattern generator (two shift registers, OR gates, word multiplexer) |
| `instr_rom`       | 512 × 32 instruction block RAM with the configuration packets |
| `frame_ecc`       | sequential Hamming / parity checker (SYNDROME, ERROR, SYNDROMEVALID) |
| `misr`            | 32-bit MISR with scan mode (used twice) |
| `result_check`    | signature comparators and the TDO OR gate |
| `bist_pkg`        | shared types, packet encodings, Hamming positions, ROM layout |

The ICAP and the configuration memory are silicon. They are not in the RTL,
and their signals are ports of the top. `tb/icap_model.sv` is a behavioural
model of them for simulation.

## The sequential Frame ECC checker (`frame_ecc`)

A frame is 41 words of 32 bits. Its ECC field has 12 bits and sits in bits
[11:0] of the middle word, word 20:

* H1..H11 are in bits [10:0].
* The overall parity bit is in bit 11.

All the other 1300 bits are data. Each data bit is given a **Hamming
position**. Walk the counting sequence 1, 2, 3, … and skip the powers of two,
which belong to the Hamming bits. The first data bit gets position 3, the
second 5, then 6, 7, 9, … Hamming bit Hk is the XOR of the data bits whose
position has bit k-1 set. Hence the syndrome of a single flipped data bit is
its position.

Computing the 12 check bits over 1312 bits in parallel takes about 8,500 XOR
gates. The checker does it word by word instead:

```
word_i --+--> AND with mask[wc][h] --> 12 x 32-input XOR trees --> XOR into 12 FFs (acc)
         |            ^                                                  |
         |        mask LUT (indexed by the word counter wc)              v
         +--> capture bits [11:0] when wc = 20 ------------------> XOR --> SYNDROME[11:0]
```

* **Mask LUT.** For word w, Hamming tree h gets a mask. Bit b of that mask is
  bit h of the position of frame bit 32w+b. The parity tree's mask is all
  ones except for the stored parity bit. The Hamming trees skip the whole
  stored field. The table is computed at elaboration (`build_mask_lut`).
* **Accumulators.** Twelve flip-flops accumulate the tree outputs. They
  restart on word 0.
* **Syndrome.** After word 40 the flip-flops hold the regenerated bits.
  `SYNDROME = acc ^ stored` is valid in the cycle SYNDROMEVALID is high,
  which is the cycle after the last word.
  * `SYNDROME[10:0]` is the Hamming syndrome.
  * `SYNDROME[11]` is the overall parity error.
  * `ERROR` is the OR of all twelve bits.

| condition in the SYNDROMEVALID cycle         | meaning |
|----------------------------------------------|---------|
| SYNDROME = 0                                 | no error |
| SYNDROME[10:0] ≠ 0 and SYNDROME[11] = 1       | single-bit error at position SYNDROME[10:0] (correctable) |
| SYNDROME[10:0] ≠ 0 and SYNDROME[11] = 0       | double-bit error (not correctable) |

The capture of the stored field is an enabled flip-flop, where a latch would
also do. The checker does not model the masking of LUT-RAM and flip-flop bits
that the real core applies. The BIST's target frame holds no such bits.

## Test patterns (`tpg`)

Two 1312-bit shift registers, A and B, each hold at most one 1. The pattern is
`A | B`, through 1312 OR gates. A registered 32-bit, 64-to-1 multiplexer hands
it out word by word.

The sequence starts with the single one in bit 0. From pattern i (a single one
in bit i), the next step loads B with A shifted up one bit, and the steps after
that shift B up. This gives the pairs (i, i+1) … (i, 1311). Once B's 1 is in
the top bit, the next step shifts A up and empties B. The last pattern is the
single one in bit 1311, and `last_o` flags it. A one-bit flag tracks whether B
is occupied, so no 1312-input OR is needed.

## One pattern, cycle by cycle

Every pattern takes exactly 318 cycles. Each word sent to the ICAP takes one
cycle, and the read window has a fixed length:

| cycles | source | content |
|-------:|--------|---------|
| 9   | instruction RAM | CMD ← RCRC; IDCODE ← device ID; CMD ← WCFG; FAR ← target frame; FDRI header, 82 words |
| 41  | TPG             | the test pattern |
| 45  | instruction RAM | 41 zero pad words (a second frame that pushes the first into the array); 2 NOOPs; CRC ← 0x0000DEFC |
| 5   | instruction RAM | CMD ← RCFG; FAR ← target frame; FDRO read header, 82 words |
| 216 | read window     | ICAP in read mode (WRITE = 0) |
| 2   | instruction RAM | 2 NOOPs |

What happens in the read window:

* The ICAP returns 82 words. Every cycle with BUSY low carries one of them.
* The first 41 words are the pad frame and are discarded.
* The next 41 words are the test frame and are compacted into the ICAP MISR.
* The read-back also passes both frames through the Frame ECC. Its MISR takes
  the syndrome each time SYNDROMEVALID pulses, twice per pattern.

The window is long enough for any read-back latency up to about 130 cycles.

A run also starts with three preamble words (dummy, sync word 0xAA995566,
NOOP), so it lasts 3 + 861,328 × 318 = 273,902,307 cycles.

The packets are standard Type 1 configuration packets: register addresses
CRC=0, FAR=1, FDRI=2, FDRO=3, CMD=4 and IDCODE=12, and commands WCFG=1,
RCFG=4 and RCRC=7. The device ID check protects against a bitstream meant for
another device, so the ID in the instruction RAM must match the device.
Without it, the device refuses the frame writes.

## The controller (`bist_controller`)

A small state machine (`PRE → WH → WPAT → WT → RH → RWIN → RT`, back to `WH`
or on to `DONE`) drives:

* ICAP CE and WRITE;
* the TPG/RAM multiplexer;
* the TPG load and step;
* the MISR clear and the ICAP MISR enable;
* Done.

It has three counters:

* the instruction address;
* the TPG word select, which also counts read words;
* the read window timer.

The block RAM has one cycle of read latency, and so does the TPG's word
register. For that reason addresses and selects are issued one cycle early,
and CE, WRITE and the multiplexer select are registered to line up with the
data.

**Start** is asynchronous and active high. It goes through a two-flop
synchroniser and an edge flop, so it must be held for at least three clock
cycles. A rising edge while idle or done does three things: it clears both
MISRs, reloads the TPG and starts a run. Tying Start to 1 runs the BIST once
after reset. Dropping Start and raising it again after Done reruns the BIST
from clear MISRs.

## Signatures and the pass/fail output

Both MISRs are Galois LFSRs with the primitive polynomial
P(x) = x³² + x²⁸ + x²⁷ + x + 1, taps 0x18000003. The response is XORed into
all bits:

* The Frame ECC MISR takes `{20'b0, SYNDROME}`.
* The ICAP MISR takes the 32 ICAP output pins.

The aliasing probability is about 2⁻³².

`TDO = TDI | (ecc_sig ≠ GOOD_ECC_SIG) | (icap_sig ≠ GOOD_ICAP_SIG)`.
The tester uses it after Done as follows:

1. Drive TDI low and read TDO. It must be 0.
2. Drive TDI high and read TDO. It must be 1.

The second step shows that TDO is not stuck at the passing value.

With `Scan_Mode` high, the two MISRs form one shift register:
Scan_In → Frame ECC MISR → ICAP MISR → Scan_Out. Each rising edge of
`Scan_Clock` shifts it by one bit. `Scan_Clock` is sampled by `Clock`, so
each level must last at least two clock cycles. Sixty-four shifts bring out
the ICAP signature MSB first, then the Frame ECC signature. The same shifts
can load signatures.

**Good signatures.** The defaults of `GOOD_ECC_SIG` and `GOOD_ICAP_SIG` are
the signatures measured on real silicon:

| family   | Frame ECC  | ICAP       |
|----------|------------|------------|
| Virtex-4 | 0x9BC92CDB | 0xB3FFB18B |
| Virtex-5 | 0x969C47DD | 0x31D989BD |

A simulation of this RTL against `tb/icap_model.sv` does not give these
values. The checker's exact bit layout, the hidden read-back behaviour of the
real ICAP and the pattern order all affect the signature. At the defaults
(Virtex-4, 41-word frame) the simulated run ends with Frame ECC signature
**0x1DEFD0C8** and ICAP signature **0xFABE0A66**. With `FAMILY = VIRTEX5`
the Frame ECC signature is the same and the ICAP signature is
**0xDCAA7E65**, because only the ICAP words are byte-swapped. Therefore TDO reads 1 at
the end of a default simulation. To see a passing TDO in simulation, set the
two parameters to the simulated values. On hardware, the signatures of a
known-good device are the ones to use.

## Virtex-4 and Virtex-5

`FAMILY` (`VIRTEX4` by default, or `VIRTEX5`) selects four things:

* the byte order of ICAP words: Virtex-5 byte-swaps every word in and out;
* the default device ID: XC4VFX12 0x01E58093 or XC5VLX30T 0x02A56093;
* the default target frame address: the leftmost I/O column, bottom half,
  row 0, giving 0x00400000 for Virtex-4 and 0x00100000 for Virtex-5;
* the default good signatures.

For any other device, set `DEVICE_ID` and, if needed, `FRAME_ADDR`. The BIST
must be placed away from the target frame, in the right half of the device, so
that it cannot overwrite its own configuration.

## Top-level ports (`frame_ecc_bist`)

| port | dir | meaning |
|------|-----|---------|
| `Clock` | in | BIST clock: up to 100 MHz from a system clock, or 50 MHz from boundary scan |
| `Reset` | in | synchronous reset, standing for the global reset of a configuration download |
| `Start`, `TDI` | in | start request; pass/fail test input |
| `Scan_Mode`, `Scan_Clock`, `Scan_In` | in | MISR scan chain (for verification) |
| `Done`, `TDO`, `Scan_Out` | out | run complete; pass/fail; scan chain output |
| `icap_i_o[31:0]`, `icap_ce_o`, `icap_write_o` | out | to the ICAP's I, CE and WRITE inputs (WRITE = 1 writes, 0 reads) |
| `icap_o_i[31:0]`, `icap_busy_i` | in | from the ICAP's O and BUSY outputs (BUSY low marks a read word) |
| `cfg_word_i[31:0]`, `cfg_word_valid_i` | in | configuration words as they are read back, into the Frame ECC checker |

## Simulating

Everything is plain SystemVerilog and runs with Verilator 5. Each testbench
is a top of its own. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bist_pkg.sv tb/bist_ref_pkg.sv tb/frame_ecc_bist_tb.sv --top-module frame_ecc_bist_tb
./obj_dir/Vframe_ecc_bist_tb
```

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it does |
|-----------|--------------|
| `frame_ecc_tb` | random frames, clean or with 1 or 2 flipped bits, against an independent syndrome model; SYNDROMEVALID timing |
| `tpg_tb` | every word of every pattern of a 96-bit frame (each single and pair once); the full 1312-bit generator stepped through all 861,328 patterns |
| `instr_rom_tb` | all 512 words against the packet list written out by hand |
| `misr_tb` | MISR against a bit-level model of P(x); clear, scan, 200,000 autonomous steps |
| `result_check_tb` | comparators and the TDO OR gate |
| `bist_controller_tb` | issue schedule cycle by cycle over four 318-cycle patterns; MISR enables, Start, Done, restart |
| `frame_ecc_bist_tb` | end to end with 3-word frames (4,656 patterns), Virtex-4 and Virtex-5 side by side: pattern contents, periods, scanned-out signatures against a reference, TDO pass and fail, restart |
| `frame_ecc_bist_full_tb` | one complete run at the defaults: 861,328 patterns, 273,902,311 cycles from Start to Done; about 2.5 minutes |
| `frame_ecc_bist_v5_full_tb` | the same complete run for `FAMILY = VIRTEX5`, with byte-swapped ICAP words; about 2.5 minutes |

`tb/bist_ref_pkg.sv` holds the reference models: Hamming positions, syndromes
and the MISR step, written independently of the RTL. `tb/icap_model.sv` models
the ICAP and one frame of configuration memory. It handles:

* sync detection and Type 1 packets;
* the IDCODE check, which rejects frame writes after a wrong device ID;
* frame writes that commit the first frame once the pad frame arrives;
* read-back that returns a zero pad frame and then the stored frame.

It gives 2 cycles of read latency, and BUSY is low only on cycles that carry
a read word.

## Where this RTL goes beyond, or differs from, the original BIST

* The original controller is a small custom processor whose instruction set
  is not published. Here a state machine with the same three counters does
  the job. The 318-cycle pattern period is reproduced by giving the read
  window a fixed length (`RD_WIN = 216`).
* The instruction RAM is addressed with 9 bits, enough for its 512 words.
  The original drawing shows a 10-bit counter.
* The original design enables its ICAP MISR whenever the ICAP is in read
  mode. This one compacts only the 41 words of the test frame that the ICAP
  returns, leaving out the pad frame and idle read cycles.
* The original read sequence compacts Frame ECC results only while the test
  frame is read, but its block diagram drives the MISR enable from
  SYNDROMEVALID. This RTL follows the block diagram. The Frame ECC MISR takes
  every syndrome the checker reports, so the pad frame's syndrome goes in
  too. For a working checker that syndrome
  is zero, but it still steps the MISR.
* The Frame ECC checker here is one possible sequential design. The real
  core's internal structure, bit numbering and ECC field layout are not
  public. Hence the published silicon signatures are not reproduced (see above).
* Packet encodings, device IDs, frame addresses, ICAP pin polarities, the
  scan-clock sampling and the `Reset` port are this design's choices, taken
  from the families' public configuration interface where one exists.
* Not included: the boundary scan primitive that can supply the clock and
  carry TDI/TDO, and switching between the upper and lower ICAP within one
  run (one ICAP is tested per run).
