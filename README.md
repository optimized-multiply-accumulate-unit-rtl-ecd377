# Signed multiply-accumulate unit with a self-correcting carry-lookahead adder

This is a 32-bit signed multiply-accumulate (MAC) unit. On every clock edge where
`en` is high it adds the product `a * b` to a 64-bit running sum:

    out <= out + a * b      (en = 1)
    out <= 0                (en = 0)

It follows the architecture published as *Optimized Multiply-Accumulate Unit
Design Featuring Self-Error Correction and Accumulation Mechanism*. That
architecture is a loop of three parts:

    a, b ──► radix-4 Modified Booth multiplier ──► partial-product rows
                                                        │
             ┌──────────────────────────────────────────▼───────────┐
    out ───► │ error-correctable carry-lookahead adder (EC-CLA) chain│
     ▲       └──────────────────────────────────────────┬───────────┘
     │                                                  ▼
     └──────────────── accumulator register (data storage) ──► out

The Booth multiplier halves the number of rows to add. The adder uses carry
lookahead rather than a ripple chain. The adder also detects and corrects its
own carry errors, so the result is exact every cycle. The register holds the
sum and feeds it back.

The original description gives the block structure, the operand and result
widths, the port list, the flip-flop count and one reference simulation. It
says what each block does, but it says almost nothing about how the blocks work
inside. The inside of each block here is therefore this implementation's own
design. See "Where this departs from, or fills in, the description" below.

## Files

| file | contents |
|---|---|
| `rtl/mac_pkg.sv` | default width `MAC_N = 32`, Booth digit types, the recoding function |
| `rtl/booth_mbm.sv` | radix-4 Booth recoder and partial-product rows |
| `rtl/ec_cla.sv` | error-correctable carry-lookahead adder |
| `rtl/data_storage.sv` | accumulator register |
| `rtl/mac_top.sv` | the MAC unit (top) |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Top-level interface (`mac_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; the design uses the rising edge |
| `en` | in | 1 | 1: accumulate `a*b` on the edge. 0: clear `out` to 0 on the edge |
| `a` | in | N | multiplicand, two's complement |
| `b` | in | N | multiplier, two's complement |
| `out` | out | 2N | running sum, two's complement, wraps modulo 2^(2N) |

Parameters: `N = 32` (operand width, must be even) and `BLK = 8` (block size
of the adders, must divide 2N).

The interface totals 130 pins: clk, en, 32 + 32 operand bits and 64 result
bits. The only storage is the 64 bits of `out`. There is no reset pin.
Holding `en` low for one clock clears the accumulator, and this is how a new
accumulation starts.

**Timing.** The multiplier and adder chain are combinational. The `a`, `b` and
`en` present before a rising edge decide the `out` that appears just after it.
That gives one accumulation per clock and a latency of one clock. There is no
pipelining. The whole Booth-plus-adder-chain path must settle within one clock
period.

Reference run (checked by the testbench): start with one cycle of `en = 0`.
Then hold (8,17) for two clocks, (17,7) for two, (17,17) for two and (5,2) for
four. `out` then reads 136, 272, 391, 510, 799, 1088, 1098, 1108, 1118, 1128.

## Radix-4 Booth rows (`booth_mbm`)

The N-bit multiplier `b` is read in N/2 overlapping three-bit groups
`{b[2i+1], b[2i], b[2i-1]}`, with `b[-1] = 0`. Each group becomes one digit
`d_i = -2*b[2i+1] + b[2i] + b[2i-1]`, which lies in {-2, -1, 0, +1, +2}.
Then `b = Σ d_i · 4^i` holds for signed `b`, so the product is the sum of
N/2 rows `d_i · a · 4^i` instead of N rows.

Each row selects 0, `a` or `2a` as an (N+1)-bit signed value. A negative digit
inverts that value, which gives `-|d|·a - 1`. The missing +1 of every
negative row is not added inside the row. Instead, bit 2i of one extra
*correction row* is set. The rows' +1s sit at different even positions, so one
row can hold them all. Every row is sign-extended to 2N bits and shifted left
by 2i. The module therefore outputs N/2 + 1 = 17 rows. Their sum modulo
2^(2N) is `a*b`, and adding them is left to the adder chain.

Groups 000 and 111 both give digit 0 (zero row, no correction bit).

## The error-correctable carry-lookahead adder (`ec_cla`)

This is the part with the most behaviour of its own. The original description
calls for a carry-lookahead adder "with error correction" and gives no more
detail. This implementation chose a *carry-speculating* lookahead adder that
detects and corrects its own speculation errors in the same cycle.

The W-bit adder (W = 64) is cut into W/BLK blocks of BLK = 8 bits.

1. **Bit signals.** For every bit, `g = a & b` (generate) and `p = a ^ b`
   (propagate).
2. **Lookahead inside a block.** Every carry inside a block is the flat
   sum of products `c_k = g_{k-1} | p_{k-1} g_{k-2} | … | p_{k-1}…p_0 c_in`.
   The carries are computed in parallel, with no ripple chain. The same
   formula with `c_in = 0` gives the block generate `G_j`. The AND of the
   block's `p` gives the block propagate `P_j`.
3. **Speculation.** Block 0 starts from `cin`. Block j > 0 does not wait for
   the true carry from below. It assumes its carry-in is `G_{j-1}`, the carry
   block j-1 would produce with no carry into it. This gives the speculative
   sum `s_spec`.
4. **Detection.** A block-level lookahead network over (`G_j`, `P_j`, `cin`)
   computes the true carry `C_j` into every block, in parallel with step 3.
   The speculation can only be too low: if `G_{j-1}` = 1 then `C_j` = 1. So
   block j is in error exactly when `C_j = 1` and `G_{j-1} = 0`. That happens
   when a carry enters block j-1 and every bit of block j-1 propagates it.
   `err_blk[j]` flags this, and `err` is the OR of the flags.
5. **Correction.** A flagged block is short by exactly one at its lowest bit.
   Its BLK-bit field of `s_spec` is therefore incremented, modulo 2^BLK. A
   wrap out of that increment needs no further handling, because the next
   block's carry-in comes from the true `C_j`, not from this block.

The result `sum`, and `cout = C_{W/BLK}`, always equal `a + b + cin`. The flags
report how often the fast path was wrong. An immediate assertion in the module
checks that a speculated carry never exceeds the true one.

With uniformly random operands, a given block boundary is in error only when
a carry arrives and all 8 bits of the block below propagate it (≈ 2^-9). Long
runs of propagating bits are common in accumulation with sign-extended
negative rows, so the correction is exercised regularly inside the MAC. The
end-to-end test sees it in roughly one cycle in eight.

## The adder chain and the accumulator (`mac_top`, `data_storage`)

`mac_top` adds the stored sum and the 17 Booth rows with a chain of 17 EC-CLAs:
`part[0] = out`, `part[i+1] = part[i] + pp[i]`. `part[17]` goes to the
register. The description has the multiplier's rows entering the EC-CLA, and
its block diagram has the stored sum fed back into the same adder. The chain
does both. It is long (17 adders in series), and a carry-save tree in front
of a single EC-CLA would be much faster. That tree would be a change of
architecture, so it is not done here.

`data_storage` is a plain 64-bit register. It loads the chain's result on each
rising edge while `en` is high and clears to zero while `en` is low. The
accumulator has no guard bits and no saturation: a sum beyond the signed
64-bit range wraps.

`mac_top` keeps the per-adder correction flags in the internal vector
`ec_err`. This vector is not a port, so the interface stays at the 130 pins
above. Verilator's lint therefore reports it as unused. The end-to-end
testbench reads it through the hierarchy to count corrections.

## Where this departs from, or fills in, the description

These follow the description:

- block structure: Booth multiplier, carry-lookahead adder with the fed-back
  sum, storage register
- N = 32 and a 64-bit output
- ports clk, en, a, b, out
- 64 flip-flops
- one accumulation per clock, with the reference values above
- signed operands
- radix-4 recoding

These are this implementation's own choices:

- **Error correction.** The description names the mechanism only. The
  speculate / detect / increment scheme above, and `BLK = 8`, are design
  choices.
- **Clear on `en = 0`.** There is no reset pin. In the reference simulation the
  output becomes 0 while `en` is still low. Here that is read as a synchronous
  clear.
- **Partial-product accumulation by a chain of two-input EC-CLAs.** This is one
  way to let the adder take both the rows and the feedback. How the rows are
  reduced is not specified.
- **Correction row for negative Booth digits,** and full sign extension of
  every row.
- **No pipelining.** The description mentions that storage units "enable
  pipelining", but the reported flip-flop count (64) and the one-per-clock
  reference run leave room for no register other than the accumulator.
- **Only radix 4.** The description claims "scalability to different radices"
  without describing other radices.
- **Wrap-around on overflow.** Overflow is not addressed in the description.

The description's FPGA figures (LUT count, power, delay) are not targets of this
RTL and were not reproduced.

## Verification

Each testbench checks against values it computes on its own and prints
`TB_RESULT checks=<n> failures=<n>`.

- `booth_mbm_tb`: corner operands and 2,000 random pairs. It checks the sum of
  the rows against the signed product. It also checks every row against
  `d_i·a·4^i`, with `d_i` worked out arithmetically from the bits.
- `ec_cla_tb`: 6,000 additions, random and built to run carries through whole
  blocks. It checks `sum`, `cout` and every `err_blk` flag against a reference
  formed from the true and block-local carries. It fails if no correction
  occurred.
- `data_storage_tb`: random data and enable, checking load and clear.
- `mac_top_tb`: the top at its default size. It replays the reference run, runs
  about 4,000 random signed cycles with occasional clears, then runs long
  same-sign runs of extreme products. It checks `out` after every edge against
  a model. It also counts accumulations, clears, negative products, adder
  corrections and accumulator wraps, and fails if any of them never happened.

Each testbench was also run against a deliberately broken copy of its module,
and failed every time. The broken copies were:

- a correction row left empty
- the corrector removed
- a register that holds instead of clearing
- the feedback path cut

## Simulating

With Verilator 5 (the package must come first):

    verilator --binary --timing --assert -Irtl rtl/mac_pkg.sv tb/mac_top_tb.sv \
        --top-module mac_top_tb -Mdir obj_mac && obj_mac/Vmac_top_tb

Replace `mac_top_tb` with `booth_mbm_tb`, `ec_cla_tb` or `data_storage_tb` for
the block tests. `-Irtl` lets Verilator find the modules by file name. Each
test finishes in well under a second.

## Changing it

- **Operand width:** set `N` on `mac_top` (even, ≥ 4). The rows, adder width
  (2N) and register follow. `BLK` must divide 2N.
- **Adder block size:** `BLK` trades the speculative block's lookahead size
  against the number of block boundaries where speculation can fail.
- **The recoding table** is `booth_recode()` in `mac_pkg`.
