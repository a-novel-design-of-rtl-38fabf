# 16-bit multiply-accumulate unit with a hybrid carry skip adder

A multiply-accumulate (MAC) unit computes `y <= y + a*b` once per clock, the inner
step of FIR filters, transforms and dot products. This unit has two combinational
halves in front of one register:

```
 a[15:0] ─┐
          ├─ 16x16 Vedic multiplier ── p[31:0] ─┐
 b[15:0] ─┘                                     ├─ 32-bit carry skip adder ── {cout, s} ─ AND ~rst ─ D ─┬─ y[32:0]
                         y[31:0] ───────────────┘                                                       │
                            ▲────────────────────────────────────────────────────────────────────────────┘
```

* The multiplier is a **Vedic (Urdhva-Tiryakbhyam, "vertically and crosswise")**
  multiplier: a recursive tree in which every N×N block is four N/2×N/2 blocks and
  three N-bit adders, bottoming out in a 2×2 block of four AND gates and two half
  adders.
* The adder is a **carry skip adder (CSKA)**. Three versions are provided; the
  default, and the point of the design, is the **hybrid** one: a
  concatenation-incrementation CSKA whose stages vary in size and whose middle
  stage is an 8-bit Brent-Kung parallel prefix adder.
* The accumulator is a 33-bit register that is cleared synchronously while `rst`
  is high.

Everything is plain synthesizable SystemVerilog. All arithmetic is unsigned.

## Timing of the MAC

`mac16` has ports `clk`, `rst`, `a[15:0]`, `b[15:0]`, `y[32:0]` and `two_cycle`.
Operands are sampled at the rising edge together with `rst`:

* `rst = 1` at an edge: `y` becomes 0.
* `rst = 0` at an edge: `y` becomes `{cout, (y[31:0] + a*b) mod 2^32}`.

The result is visible one clock after the operands; a new product can be taken
every clock. Only `y[31:0]` is fed back, so `y[32]` is a per-step overflow flag
(the carry out of the latest addition), not a 33rd accumulator bit. A run from
reset with `a*b = 325*512`, then `24*22`, then `14*12` gives `y = 166400`, `166928`,
`167096`.

`two_cycle` is combinational and describes the addition about to be clocked in:
it is the group propagate of the adder's nucleus (bits 19:12 of the two adder
operands all differ). In a variable-latency system this is the signal that would
grant the addition a second clock cycle. This MAC accumulates every clock
regardless; the signal is only brought out.

Parameter `ADDER` (type `mac_pkg::adder_kind_e`) selects the adder:
`ADD_HYBRID` (default), `ADD_CI`, `ADD_CONV`. With the latter two `two_cycle` is 0.

## The Vedic multiplier

`vedic_2x2`: bit 0 is `a0·b0`; the crosswise pair `a1·b0 + a0·b1` goes through a
half adder (sum bit 1, carry `c1`); `a1·b1 + c1` goes through a second half adder
(bit 2 and bit 3).

`vedic_4x4`, `vedic_8x8`, `vedic_16x16` share one arrangement. Split
`a = {aH, aL}`, `b = {bH, bL}` into halves of h bits and form
`q0 = aL·bL`, `q1 = aL·bH`, `q2 = aH·bL`, `q3 = aH·bH` (2h bits each). Then

1. adder 1: `sum1, ca1 = q1 + q2` (the crosswise terms);
2. adder 2: `sum2, ca2 = sum1 + q0[2h-1:h]`; `sum2[h-1:0]` is product bits 2h-1..h;
3. adder 3: `sum3 = q3 + {ca1|ca2, sum2[2h-1:h]}`; `sum3` is the top 2h bits;
4. product bits h-1..0 are `q0[h-1:0]`.

The three adders are ripple carry adders (`rca`). Two details:

* The carry of adder 2 must enter adder 3 at the same weight as `ca1`. It can be
  set, e.g. when `q1 + q2` lands just below `2^2h`. The two carries can never both
  be 1 (`q1 + q2 + q0_high < 2^(2h+1)`), so an OR merges them.
* Adder 3's carry out is always 0, since the product fits in 4h bits; it is left
  unconnected (the only lint warnings in the design).

## The carry skip adders

All three take `a[31:0]`, `b[31:0]`, `cin` and give `s[31:0]`, `cout`, purely
combinationally.

### Conventional CSKA (`conv_cska`)

There are 8 stages of 4 bits. Each stage is an RCA fed by the previous stage's carry.
At its output a 2:1 multiplexer selects either the incoming carry, when every bit of
the stage propagates (`P = AND(a_i ^ b_i)`), or the RCA's own carry. The worst case
is stage 1's ripple, then the muxes, then the last stage's ripple. It is the
reference point and is kept as a choice.

### Concatenation-incrementation CSKA (`ci_cska`, `ci_cska_stage`)

Two changes make the skip chain faster.

* **Concatenation.** Every stage except the first runs its RCA from a carry in of
  0. It produces an intermediate sum `Z` and its own carry `C_j` at once, without
  waiting for lower stages.
* **Incrementation.** An incrementer then adds the carry that arrives along the
  skip chain to `Z`, giving the stage's sum bits.

The skip chain computes `C_o,j = C_j + P_j · C_o,j-1` with a single compound gate
per stage. It uses no multiplexer and no inverter. Stages alternate between two gates:

| stage | gate | carry in | carry out |
|-------|------|----------|-----------|
| even  | AOI  | true     | complemented, `~(C_j + P_j·C)` |
| odd   | OAI  | complemented | true, `~((~P_j + ~C)·~C_j)` |

`ci_cska_stage` has the parameter `AOI`. Its `c_in` and `c_out` are in the
polarity the table gives, and the incrementer takes the true carry. Stage 1 is a
plain RCA fed by `cin`. If the last stage is an AOI stage, one inverter gives
`cout`. In the default 8 × 4-bit configuration, stage 8 is such a stage.

### Hybrid variable-latency CSKA (`hybrid_cska`, `bk_nucleus`)

The stage sizes are 3, 4, 5, **8**, 5, 4, 3 (stage 1 first). Stage 1 is an RCA.
Stage 4, the nucleus, is `bk_nucleus`. The other stages are CI stages. The nucleus
is the largest stage. It lies on both long paths: from stage 1 into the skip
chain, and from the skip chain into the top incrementer. Making it a prefix adder
shortens both.

`bk_nucleus`, bits numbered 1..8 in its comments:

1. Preprocessing: `P_i = A_i ^ B_i`, `G_i = A_i · B_i`.
2. Brent-Kung network, using the cell
   `(G,P)_hi∘(G,P)_lo = (G_hi + P_hi·G_lo, P_hi·P_lo)`.
   * The forward tree builds 2:1, 4:3, 6:5 and 8:7, then 4:1 and 8:5, then 8:1.
     The group terms `G_8:1` and `P_8:1` are therefore ready first.
   * The backward tree then adds 6:1, and after it 3:1, 5:1 and 7:1.
3. Skip logic: one AOI gate, `c_out_n = ~(G_8:1 + P_8:1·C_in)`. The nucleus is
   stage 4, an even stage, so this matches the CI polarity rule.
4. Added level: `G_i:0 = G_i:1 + P_i:1·C_in` for i = 1..7. This folds the
   incoming carry into every prefix. It plays the part of the incrementer of a
   CI stage.
5. Postprocessing: `S_1 = P_1 ^ C_in` and `S_i = P_i ^ G_i-1:0`.

`P_8:1` is also brought out as `p_all`, and from the adder as `two_cycle`.
* When `P_8:1` is 0, the nucleus's carry out is its own `G_8:1`. No carry path
  through the whole adder is active, so one short cycle suffices.
* When `P_8:1` is 1, the carry from stage 1 may skip all the way to the top.

## Where this design fills in or departs

The architecture fixes the block structure, the cell equations of the prefix
nucleus, the AOI/OAI alternation and the MAC's datapath. The following are choices
made here:

* **Stage sizes.** The source gives none for the 32-bit adders. The conventional
  CSKA and the CI-CSKA use 8 × 4 bits. The hybrid adder uses 3,4,5,8,5,4,3, which
  rises to the 8-bit nucleus and falls after it. Change them in `mac_pkg`
  (`HYB_SIZES`, `HYB_NUC`) or through the adders' parameters.
* **Multiplier adders.** The multiplier uses ripple carry adders, as its block
  diagrams show. One description instead speaks of the "proposed" 16-bit adder
  there. Swapping in a CSKA only changes the three `rca` instances.
* **Third-adder carry.** Feeding adder 2's carry into adder 3 is a completion.
  Without it the product is wrong for some operands.
* **Accumulator width and feedback.** The accumulator is 33 bits wide, with bit 32
  the adder's carry. The adder's carry-in is tied to 0. Only bits 31:0 are fed back.
* **Reset.** The reset is synchronous and active high. The register has no other
  reset.
* **No cycle stretching.** The variable-latency control is not built, since the
  source shows only its input. `two_cycle` is exposed, and nothing stretches a
  cycle.
* **What the RTL does not reproduce.** The source compares the adders by FPGA slices,
  LUTs and delay. These are properties of a synthesis flow, not of the RTL, and
  are not reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_vedic_2x2`, `tb_vedic_4x4`, `tb_vedic_8x8` | all operand pairs |
| `tb_vedic_16x16` | corners, the example products, 50 000 random pairs |
| `tb_rca` | 4-bit exhaustive, 16-bit random |
| `tb_ci_cska_stage` | AOI and OAI stage, all inputs, carry polarity |
| `tb_bk_nucleus` | all 2^17 inputs: sum, complemented carry, `P_8:1` |
| `tb_conv_cska`, `tb_ci_cska`, `tb_hybrid_cska` | example sums 2159+9542 and 325+438; every generate-then-propagate run (bit g generates, bits g+1..h-1 propagate); 50 000 random; the hybrid one also checks `two_cycle` |
| `tb_accumulator` | load and synchronous clear |
| `tb_mac16` | default configuration end to end, see below |
| `tb_mac16_adders` | the three adder choices in lockstep against one model |

`tb_mac16` runs the MAC with its default parameters:
* the example sequence from reset;
* 20 000 random steps, compared with a reference model.

It counts each mechanism and fails if one never happens: clear by reset,
accumulation, 32-bit overflow into `y[32]`, and a carry skipping the nucleus
(`two_cycle`).

Every testbench also fails against a deliberately broken copy of its module. Each
copy was tried once.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/tb_mac16.sv --top-module tb_mac16
./obj_dir/Vtb_mac16
```

Replace `tb_mac16` with any other testbench name. All run in well under a second.

## Files

| file | content |
|------|---------|
| `rtl/mac_pkg.sv` | adder selection enum, widths, hybrid stage sizes |
| `rtl/mac16.sv` | top: multiplier, selected adder, accumulator |
| `rtl/accumulator.sv` | 33-bit register with synchronous clear |
| `rtl/vedic_16x16.sv`, `vedic_8x8.sv`, `vedic_4x4.sv`, `vedic_2x2.sv`, `half_adder.sv` | multiplier tree |
| `rtl/rca.sv` | ripple carry adder |
| `rtl/conv_cska.sv` | conventional CSKA |
| `rtl/ci_cska.sv`, `rtl/ci_cska_stage.sv` | CI-CSKA and its stage |
| `rtl/hybrid_cska.sv`, `rtl/bk_nucleus.sv` | hybrid CSKA and its prefix nucleus |
