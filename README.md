# Feed-forward-cutset-free pipelined accumulators and MAC

A neural-network accelerator spends most of its arithmetic in multiply-accumulate
(MAC) units, and the carry propagation in the accumulator is usually what limits the
clock. Pipelining the accumulator's adder shortens that path, but the textbook rule
for pipelining (put a flip-flop on every edge of a *feed-forward cutset*) forces a
whole register array into the datapath: a two-stage 32-bit accumulator needs 33 extra
flip-flops, an n-stage one 33(n-1).

This RTL uses a relaxation of that rule. In a MAC that computes a dot product,
nobody looks at the intermediate accumulator values, only at the final one. Addition
is order-free, so the final value is right as long as **every input bit of every
adder is added once and only once**, in whatever cycle. It is then enough to
register only the carry that crosses each pipeline cut. An n-stage accumulator needs
n-1 extra flip-flops instead of 33(n-1), and intermediate outputs are simply not
valid.

Three units are built on this idea, all from a ripple-carry adder whose full adder is
the XOR/multiplexer type:

| unit | module | default size |
|---|---|---|
| FCF pipelined accumulator (FCF-PA) | `fcf_pa` | 32-bit, two 16-bit stages |
| modified FCF accumulator for signed inputs (MFCF-PA) | `mfcf_pa` | 4-bit signed inputs, 16-bit sum, four 4-bit stages |
| FCF multiply-accumulate unit (FCF-MAC) | `fcf_mac` | 8 x 8 unsigned, 16-bit accumulator |

`fcf_top` places the three side by side on one clock and reset.

## The FCF accumulator

```
 A ──► [A_Reg] ──┬─ A_Reg[31:16] ──► RCA[31:16] ──► [S[31:16]] ──┐
                 │                     ▲   ▲                     │
                 │                  [c_ff] └──── S[31:16] ◄──────┘
                 │                     ▲
                 └─ A_Reg[15:0]  ──► RCA[15:0]  ──► [S[15:0]] ───┐
                                       ▲                         │
                                       └──────── S[15:0] ◄───────┘
```

`fcf_adder` splits the addition into `STAGES` equal ripple-carry segments. The carry
out of a segment goes into one flip-flop (`c_ff`) and enters the next segment one
cycle later, together with whatever operand bits that segment sees then. `fcf_pa`
wraps it with an input buffer `A_Reg` and an output buffer `S` that feeds back. The
critical path is one segment (16 bits by default) instead of the full 32.

Worked example (inputs 7325AB2C, 4823F135, 2823F432, then zeros). The value in
brackets is the carry held in `c_ff`:

| cycle | A_Reg | S (FCF) | S (conventional two-stage) |
|---|---|---|---|
| 1 | 7325AB2C | 00000000 | 00000000 |
| 2 | 4823F135 | 7325AB2C | 00000000 |
| 3 | 2823F432 | BB48 9C61 [1] | 7325AB2C |
| 4 | 00000000 | E36C 9093 [1] | BB49 9C61 |
| 5 | 00000000 | E36D 9093 | E36D 9093 |

In cycle 3 the FCF output is not the running sum 7325AB2C + 4823F135 = BB499C61: the
carry is still in flight. It arrives in cycle 4, the next carry in cycle 5, and the
final value equals the conventional one in the same cycle.

**Using it.** Assert `rst` (synchronous, active high) for one clock to clear all
registers and start a new sum. Apply one value per clock on `a`. After the last value,
hold `a` at zero. If the last value reached `A_Reg` at the clock edge of cycle c, `s`
holds the exact sum (modulo 2^W) from cycle c + `STAGES` on, and stays there while
`a` is zero. This is the same latency as a conventional `STAGES`-stage pipelined
accumulator. The sum wraps modulo 2^W, because the carry out of the top segment is
dropped.

## Signed inputs and the MFCF logic

With 2's complement inputs, a negative value is sign-extended with ones over the upper
segments. In a plain FCF accumulator those ones arrive in the upper segments one
cycle *before* the carry from the lower segment that cancels them. Accumulating
+7 and then -4 in an 8-bit, two-segment accumulator, the upper half goes
0000 → 1111 → 0000, although the true sum never changes sign. The result is still
right, but the extra toggles cost power.

`mfcf_pa` merges the two contributions for the upper part before they reach it.
`mfcf_logic` looks at the sign bit of the input in `A_Reg` and at the stored carry
out of the lowest segment:

| sign | stored carry | a_fix | carry_fix | net effect on the upper part |
|---|---|---|---|---|
| 0 | 0 | 0 | 0 | nothing |
| 0 | 1 | 0 | 1 | +1 |
| 1 | 0 | 1 | 0 | -1 (all ones) |
| 1 | 1 | 0 | 0 | -1 + 1 = 0, nothing added |

`a_fix` replaces the sign bit as the sign extension of every upper bit. `carry_fix`
replaces the carry into the lowest upper segment. Since -a_fix + carry_fix always
equals -sign + carry, every sign bit and every carry still counts exactly once.

```
 a (K bits) ─► [A_Reg] ─► RCA[K-1:0] ─► S[K-1:0]
                  │            │cout
                  │         [carry_ff]
                  │ sign       │ carry
                  └──────► mfcf_logic ── a_fix ──► sign extension of all upper bits
                                    └─ carry_fix ─► [carry_fix_ff] ─► cin of the upper fcf_adder
 upper fcf_adder: STAGES-1 segments over S[N-1:K], one carry flip-flop between segments
```

Points to understand before relying on this unit:

* **Two flip-flops in the carry path.** The lowest segment's carry is registered
  before it meets the sign bit, and `carry_fix` is registered again. This keeps the
  critical path at one segment plus one gate. The cost is that the stored carry meets
  the sign bit of the *next* input, not of its own. It also adds one cycle of latency:
  the final value is ready at c + `STAGES` + 1, one cycle later than `fcf_pa`.
* **Where it helps.** Cancellation happens when a negative input follows an input
  whose low-part addition carried out. On a random stream of 4-bit values of both
  signs, the upper 12 bits toggle about 18% less than in a plain FCF accumulator of
  the same size (2022 against 2462 bit flips over 1000 inputs in `tb_mfcf_pa`). It
  does not remove the transition in the +7, -4 example above, where the cancelling
  carry belongs to the last input. On a stream of only negative values the plain FCF
  accumulator is already quiet, because its continual sign extensions pair with
  continual carries; there the modified one toggles more.
* Sizes: K-bit inputs (K = lowest segment width), N-bit sum, `STAGES` segments in
  all; (N-K) must be a multiple of `STAGES`-1. Defaults K=4, N=16, STAGES=4.

## The FCF multiply-accumulate unit

`fcf_mac` merges the multiplier and the accumulator, so there is only one carry
propagation per cycle:

1. **Input buffer.** A and B are registered.
2. **Stage 1.** Eight AND-gate partial-product rows, each `ACC_W` bits wide. The
   first column-addition level is two rows of 4:2 compressors (`compressor_row`),
   which reduce them to four rows.
3. **Pipeline boundary.** The four rows are registered, except in the `FCF_COLS`
   (4) least-significant columns. Those bits cross without flip-flops and reach the
   accumulator one cycle before the rest of their product. This is the same
   once-and-only-once argument applied to the column addition: a conventional
   pipeline would need a flip-flop on every one of those edges too.
4. **Stage 2.** One more 4:2 compressor row (four rows to two). A carry-save row
   (`csa_row`) adds the fed-back accumulator `S`. An `fcf_adder` (two 8-bit segments
   and one carry flip-flop) produces the next `S`, stored in the output buffer.

Final value: if the last operand pair was in the input buffer at cycle c, and zeros
follow it, `s` is exact from cycle c + `STAGES` + 1 on (c + 3 by default). Operands
are unsigned and `AW` may be 1 to 8; the tree is written for eight rows.

## Building blocks

* `xor_mux_fa`: full adder. `sum = (a^b)^cin`. The carry is a 2:1 multiplexer
  selected by p = a^b: it passes `a` when p = 0 and `cin` when p = 1. Every adder
  in the design uses it.
* `half_adder`: used in column 0 of a compressor row, where there is no horizontal
  carry-in.
* `compressor_4_2`: two full adders. x1+x2+x3+x4+cin = sum + 2(carry+cout), and
  cout does not depend on cin, so a row of them does not ripple.
* `rca`: ripple-carry adder of `xor_mux_fa` cells.
* `dff_array`: register with synchronous active-high reset. It serves as every
  buffer, pipeline register and carry flip-flop.
* `fcf_pkg`: default sizes.

## What follows the source description and what does not

Taken from the published FCF scheme:
* the two-stage 32-bit accumulator with one carry flip-flop, and its timing;
* the worked example above;
* the XOR/MUX full adder;
* the MFCF truth tables, and the MFCF-PA sizes (4-bit inputs, 16 bits in four
  segments);
* the use of 4:2 compressors and FCF pipelining in the MAC's column addition;
* merged multiply and accumulate.

Choices of this design, where the description is silent or incomplete:
* synchronous active-high reset as the only way to start a new sum;
* no output-valid flag; the user counts cycles as described above;
* wrap-around (modulo 2^W) on overflow;
* the placement of the two MFCF flip-flops, read from the block diagram;
* MAC operand and accumulator widths (8 x 8 → 16);
* unsigned MAC operands;
* the MAC stage split and the number of flip-flop-free columns (4);
* building the column addition from rows of 4:2 compressors. The description also
  shows a Dadda-style tree with half and full adders; the compressor rows are used
  instead.

The conventional pipelined accumulator, the CLA-based accumulator, and the XNOR-based
full adder are only comparison points and are not included; nor is the three-tap FIR
filter that serves only to illustrate cutset pipelining. The register count of
the MAC does not match the one reported for the original implementation, whose
internal structure is not described.

## Simulating

Every file is one module or package named after its file. With Verilator 5, for
example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv rtl/fcf_pkg.sv \
          tb/tb_fcf_top.sv --top-module tb_fcf_top -Mdir obj -o sim
./obj/sim
```

Each testbench compares against values worked out independently (the arithmetic sum
of the inputs, or the worked example), checks the cycle in which the final value
appears, and ends with `TB_RESULT checks=N failures=M`. `tb_fcf_top` runs the whole
top at its default sizes. It also counts how often each mechanism fired: held
carries, invalid intermediate sums, the three MFCF cases, and MAC bits crossing the
boundary without a flip-flop. It reports a failure for any mechanism that never
fired. Unit testbenches: `tb_xor_mux_fa`, `tb_half_adder`, `tb_compressor_4_2`,
`tb_compressor_row`, `tb_csa_row`, `tb_rca`, `tb_dff_array`, `tb_fcf_adder`,
`tb_fcf_pa`, `tb_mfcf_logic`, `tb_mfcf_pa`, `tb_fcf_mac`.

To change a size, override the unit's parameters (`W`/`STAGES` for `fcf_pa`;
`N`/`K`/`STAGES` for `mfcf_pa`; `AW`/`ACC_W`/`STAGES`/`FCF_COLS` for `fcf_mac`).
Segment widths must divide evenly. An elaboration-time `$error` reports sizes the
structure does not support.
