# Low-transition scan BIST with a bit-swapping LFSR

Shifting pseudo-random patterns into a scan chain toggles every scan flip-flop
and the logic behind it. Test power then runs far above what the circuit draws in
normal operation. This design is a built-in self-test (BIST) whose pattern
generator is made to switch the scan input rarely. It has two parts:

* **Low-transition patterns.** A 4-bit LFSR with a bit-swapping output stage
  drives an AND gate. The AND gate drives a toggle flip-flop, and that flip-flop
  feeds the scan chain. The scan input changes only when the AND gate fires,
  about one shift in four. Neighbouring scan cells therefore mostly hold equal
  values. These patterns catch the easy faults.
* **Weighted patterns.** After that, a small adder-based 3-weight generator
  takes over. It can pin any scan cell to 0 or to 1, or leave it random. This
  targets the random-pattern-resistant faults the first phase leaves.

The scan cells are also stitched in an order chosen to cut transitions. The
example circuit under test (CUT) is the ISCAS-89 benchmark s27, with a 4-cell
chain. A serial signature register compacts the responses. A comparator against
the expected signature then gives the good/faulty verdict.

```
            +---------------------------- bist_tpg ----------------------------+
            |  bs_lfsr          O1,O2   lt_bist                                |
 init ----->|  Q0..Q3 --swap--> ----->  AND --> T-FF ---- lt_q ---\            |
            |     |                                               MUX --> scan_in
            |     +-- Q3 (Cn) --> a3wr_bist: DFF -> FA -> DFF -- wr_q /  ^      |
            |                 wr_sel[i], wr_reset[i] -----^           src      |
            +------------------------------------------------------------------+
 scan_in --> scan_chain (FF3 -> FF1 -> FF4 -> FF2) --> scan_out --> ora_sisr --> signature_comparator --> fault
                 |  ^                                                   golden_sig ---^
     input_isolation |  cut_resp (capture)
                 v  |
               [ CUT: outside this design ]
 test_controller: start -> shift/capture x 32 patterns -> unload -> compare -> done
```

## The bit-swapping LFSR (`bs_lfsr`)

The register is a plain shift register Q0 -> Q1 -> Q2 -> Q3. Stage 0 is loaded
with Q0 xor Q3, which gives the polynomial x^4 + x^3 + 1 and period 15. Two 2:1
multiplexers on stages 0 and 1 are steered by the last stage, Cn = Q3:

| Cn | O1 | O2 | meaning |
|----|----|----|---------|
| 0  | Q1 | Q0 | swapped |
| 1  | Q0 | Q1 | passed straight |

Seeded with 1010 (Q3 is the most significant bit), the register steps through
`a 5 b 6 c 9 2 4 8 1 3 7 f e d` (hex) and repeats. The swapped outputs
`{Q3, Q2, O2, O1}` give exactly the same 15 patterns in a different order. But
O2 changes only 4 times per period, where Q1 changes 8 times. Swapping halves the
switching on that bit at the cost of two multiplexers. The all-zero pattern
never occurs: an XOR LFSR cannot reach it.

## The low-transition stage (`lt_bist`)

A K-input AND gate drives the T input of a toggle flip-flop. The flip-flop output
is the scan-in bit. A K-input AND gate is 1 in roughly one cycle of 2^K, so with
K = 2 the scan input changes in about a quarter of the shift cycles. Over the 64
shifts of the default low-transition phase the scan input changes 17 times. The
plain LFSR bit Q3 changes 35 times over the same shifts.

K = 2, and the AND inputs are the two swapped outputs O1 and O2. Note one
consequence: O1 AND O2 equals Q0 AND Q1 whichever way the bits are swapped. The
swap therefore does not change the low-transition stream itself. It matters for
the parallel outputs `lfsr_out` (see the previous section). A larger K, or a
different choice of AND inputs, is a parameter and wiring change in `bist_tpg`.

## The 3-weight weighted cell (`a3wr_bist`)

The cell has one full adder and two D flip-flops. The first flip-flop samples the
random bit Cn from the LFSR. The full adder adds the weight control `sel_i`, the
inverted control `reset_i` and that random bit. The second flip-flop registers
the carry-out:

| sel_i | reset_i | carry = maj(sel_i, ~reset_i, r) | weight |
|-------|---------|---------------------------------|--------|
| 1     | 0       | 1                               | 1      |
| 0     | 1       | 0                               | 0      |
| 0     | 0       | r                               | 1/2    |
| 1     | 1       | r                               | 1/2    |

Only the carry of the full adder is used. The output is registered, so the weight
of a bit must be presented one cycle before the bit reaches the scan input. The
controller handles this: its `wr_cell` output always names the scan cell that the
next shifted bit will end up in. The top then indexes the per-cell weight inputs
`wr_sel[]` and `wr_reset[]` with it.

## Scan chain and its order (`scan_chain`)

The four s27 scan cells are FF1..FF4. Cell k drives CUT input k and captures CUT
response k, whatever its position in the chain. The chain order comes from four
deterministic s27 test vectors and their responses:

| row | FF1 | FF2 | FF3 | FF4 |
|-----|-----|-----|-----|-----|
| V1  | 1 | 0 | 0 | 1 |
| R1  | 0 | 1 | 0 | 0 |
| V2  | 0 | 1 | 0 | 1 |
| R2  | 0 | 0 | 1 | 0 |
| V3  | 1 | 1 | 1 | 1 |
| R3  | 1 | 0 | 1 | 1 |
| V4  | 1 | 0 | 1 | 0 |
| R4  | 1 | 0 | 0 | 1 |

The cost of placing two cells next to each other is the number of rows in which
they differ. For FF1-FF2 it is 6, FF1-FF3 3, FF1-FF4 2, FF2-FF3 5, FF2-FF4 4 and
FF3-FF4 5. The cheapest chain through all four cells is **FF3 - FF1 - FF4 -
FF2**, costing 3 + 2 + 4 = 9 against 16 for the natural order. The greedy
procedure (start from the cheapest pair, extend at the cheaper end) reaches the
same order. FF3 sits next to scan-in and FF2 drives scan-out.

This order is the default of the `ORDER` parameter, `'{2, 0, 3, 1}` in
`bist_pkg::SCAN_ORDER_DEF`. Entry p is the 0-based cell at chain position p. Two
chains shift those vectors and responses in lock step. The flip-flops of the
reordered chain toggle 25 times in total, against 53 in the natural order.

A shift has priority over a capture. With neither `scan_en` nor `capture` high,
the chain holds.

## Test sequence and timing (`test_controller`, `lt_bs_bist_top`)

Pulse `start` for one cycle. The controller then runs:

1. N_LT = 16 low-transition patterns, followed by N_WR = 16 weighted patterns.
   Each pattern takes L = 4 shift cycles and 1 capture cycle. While a pattern
   shifts in, the previous response shifts out into the signature register. The
   LFSR and the toggle flip-flop advance only in shift cycles.
2. 4 unload cycles move the last response into the signature register.
3. 1 compare cycle registers `fault` (1 = signature differs from `golden_sig`).

`busy` is high for (N_LT + N_WR)(L + 1) + L + 1 = 165 cycles. After that `done`
and `fault_valid` stay high until the next `start`, and so does `fault`. The
signature register ignores scan-out while the first pattern shifts in, because
the chain then holds only its reset value. `test_mode` is high while busy. It
switches the CUT inputs from `sys_in` to the scan cells through
`input_isolation`.

The controller carries assertions for its protocol rules. Shift and capture are
never asserted together, the generator advances only while shifting, and the
compare strobe lasts one cycle.

The signature register (`ora_sisr`) is 4 bits wide. Bit 0 takes
`si ^ sig[3] ^ sig[2]` on each enabled edge. A single wrong bit in the response
stream always changes the signature. Multiple errors can alias, with probability
about 1/16 for random errors.

Reset (`rst`) is synchronous and active high. It loads the seed `init` into the
LFSR and clears everything else. Hold it at least one cycle, then leave at least
one idle cycle before `start`: the weighted cell's random flip-flop samples the
seeded LFSR in that cycle.

## Top-level interface (`lt_bs_bist_top`)

| port | dir | width | use |
|------|-----|-------|-----|
| clk, rst | in | 1 | clock, synchronous reset |
| start | in | 1 | start pulse |
| init | in | N | LFSR seed |
| wr_sel, wr_reset | in | L | per-cell weights for the weighted phase: sel holds a cell at 1, reset holds it at 0 |
| golden_sig | in | W | expected fault-free signature |
| sys_in | in | L | CUT inputs in normal mode |
| cut_in | out | L | to the CUT |
| cut_resp | in | L | from the CUT, captured into the cells |
| scan_in, scan_out, signature | out | | chain ends and the current signature |
| test_mode, busy, done, fault, fault_valid | out | 1 | status and verdict |
| ctrl_state, tpg_src, lfsr_state, lfsr_out, swap, lt_and, lt_toggle, lt_q, wr_q | out | | internal state brought out for observation |

Parameters (defaults): N = 4 LFSR stages, K = 2 AND inputs, L = 4 scan cells,
W = 4 signature bits, N_LT = N_WR = 16 patterns, ORDER as above. The feedback
taps of the LFSR (Q0, Q(N-1)) and of the signature register (top two bits) are
fixed. Other sizes work, but the sequences are then not maximal in general.

## What is outside the design

* **The circuit under test.** s27 is an external benchmark, so the top brings
  `cut_in` and `cut_resp` out. The testbench has a stand-in, `tb/s27_tb_pkg.sv`
  and `tb/cut_s27_model.sv`: the s27 gate equations with inputs G0..G3 from
  FF1..FF4, state lines G5..G7 held at 0, responses G17, G10, G11, G13, and an
  optional stuck-at fault.
* **The signature ROM.** The expected signature depends on the CUT, so it comes
  in on `golden_sig`.
* **The parallel LFSR with state-space transformation** (matrices A_pT, B_pT and
  T around a p-bit-parallel BCH/CRC LFSR). It appears only as the earlier
  high-speed design the generator is compared with. Its polynomial, parallelism
  and matrices are not given, so no RTL is provided for it.

## How far this follows the source design

These parts come from the source: the 4-stage LFSR and its seed 1010, the XOR
feedback from Q0 and Q3, the swap rule and multiplexer numbering, and the AND
gate into a toggle flip-flop. So do the parts list of the weighted cell (one full
adder, two D flip-flops, SEL[i], RESET[i]), the two-phase order (low-transition
first, weighted second, chosen by one multiplexer) and the four-cell s27 chain
with its vectors and transition counts.

These are this design's own choices:

* the printed feedback polynomial is unreadable, so the taps follow the
  schematic;
* the AND width K = 2 and its inputs follow the pattern-generator schematic. The
  text speaks of an L- or K-input AND gate without a number;
* the wiring of the weighted cell (majority of SEL, NOT RESET and a registered
  random bit) is an interpretation;
* the chain order is computed here; the source gives only the costs;
* the controller protocol, both pattern counts (16 each, after "16 combinations"
  of the 4-bit LFSR), the signature register type and width, the registered
  verdict, synchronous reset and all port encodings.

The source reports FPGA results (a 4.04 ns clock-to-output path from a flip-flop
to the fault pin, about 0.08 W). `fault` is registered to match. No timing or
power claim is made for this RTL.

## Simulation

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of cycles
if something hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/bist_pkg.sv tb/s27_tb_pkg.sv tb/tb_lt_bs_bist_top.sv --top-module tb_lt_bs_bist_top
./obj_dir/Vtb_lt_bs_bist_top
```

Other testbenches are built the same way with their own file and top name; only
the system testbench needs `tb/s27_tb_pkg.sv`.

| testbench | what it shows |
|-----------|---------------|
| `tb_lt_bs_bist_top` | Full test at default size with a cycle-by-cycle reference of the whole datapath. Checks every shifted bit, the 165-cycle run, the signature, both verdicts (fault-free and an injected stuck-at fault) and normal-mode isolation. Every mechanism must occur at least once (swap, straight, toggle, phase switch, three weights, capture, unload), and the low-transition stream must switch less than a plain LFSR bit. |
| `tb_bs_lfsr` | Sequence against a recurrence model, period 15, swap rule, hold |
| `tb_bs_lfsr_switching` | Equal pattern sets; O2 switches 4 times against Q1's 8 per period |
| `tb_lt_bist` | AND/toggle behaviour under random inputs |
| `tb_a3wr_bist` | The three weights and the one-cycle control timing |
| `tb_bist_tpg` | The whole generator under random enables, sources and weights |
| `tb_scan_chain` | Shift, capture, hold, unload order FF2, FF4, FF1, FF3 |
| `tb_scan_reorder_s27` | The s27 vectors through natural and reordered chains: 53 against 25 toggles |
| `tb_test_controller` | Every strobe in every cycle of a 3 + 2 pattern run, and restart |
| `tb_ora_sisr`, `tb_signature_comparator`, `tb_input_isolation` | Unit behaviour |

## Files

`rtl/bist_pkg.sv` holds the shared types (scan-in source, controller states) and
the default chain order. There is one module per file: `bs_lfsr`, `lt_bist`,
`full_adder`, `a3wr_bist`, `bist_tpg`, `scan_chain`, `input_isolation`,
`test_controller`, `ora_sisr`, `signature_comparator` and the top
`lt_bs_bist_top`. `tb/` holds the testbenches and the CUT stand-in.
