# Two-stage pipelined 4x4 array multiplier

An array multiplier forms every bit product `p_j·q_k` with an AND gate and
sums each product column with full adders. Without registers, every input
change ripples through the whole adder array: the critical path crosses the
array vertically and then along the last row, about `2n` full-adder delays
for `n`-bit operands, and the uneven path lengths make internal nodes glitch
several times per operation, which costs dynamic power.

This design cuts that path with two ranks of pipeline registers. It accepts
one operand pair per clock and delivers one product per clock, two clocks
after the operands. Shorter logic between registers means fewer spurious
transitions per operation and a shorter clock period, at the price of the
register area.

Two pipelined multipliers are provided; they share only clock and reset:

| module | what it is | operands | result |
|---|---|---|---|
| `pipelined_array_mult` | 4x4 multiplier built from four 2x2 products, carry-save reduction, final CPA | 4 x 4 bits, unsigned | 8 bits, after the 2nd register rank through one CPA |
| `row_pair_pipe_mult` | N x N AND array whose rows are summed in pairs (stage 1) and then together (stage 2) | N x N bits (default 4) | 2N bits, registered |
| `pipelined_mult_top` | both of the above side by side | | |

## The 4x4 multiplier from 2x2 products

Split each operand into 2-bit digits, `p = 4·pH + pL` and `q = 4·qH + qL`.
Then

    p·q = pL·qL + 4·(pL·qH + pH·qL) + 16·pH·qH

and each 2x2 product `a·d` (a, d in 0..3) is one of `0, a, 2a, 3a`. Only
`3a` needs an adder; `2a` is a wire shift. This turns the multiplier into
three kinds of simple blocks:

```
              p (4 bits)
                 |
           +-----------+
           |triple_gen | 3·pL, 3·pH   (one CPA: two 3-bit ripple chains, 6 FA)
           +-----------+
  {0,a,2a,3a} for a = pL and a = pH
      |        |        |        |
   pp_mux   pp_mux   pp_mux   pp_mux     sel = qL, qH, qL, qH
    pp00     pp01     pp10     pp11      (4 bits each)
 ===========================================  register rank 1 (16 data bits)
   csa #1 : pp00[3:2] + pp01 + pp10          columns 2..7, 6 FA
   csa #2 : sum1 + (carry1<<1) + (pp11<<2)   columns 2..7, 6 FA
 ===========================================  register rank 2 (sum, carry, pp00[1:0])
   cpa    : sum2 + (carry2<<1)               columns 2..7, 6 FA (ripple)
                 |
   product = { cpa result, pp00[1:0] }
```

Column bookkeeping is the subtle part. All three adder rows work on a 6-bit
slice that holds product columns 2..7 (slice bit `i` is column `i+2`):

* `pp00` sits at column 0, so its two low bits are product bits 1..0
  directly and never go through an adder; only `pp00[3:2]` enters the slice.
* `pp01` and `pp10` have weight 4 and start at slice bit 0; `pp11` has
  weight 16 and enters the second CSA shifted by two.
* A CSA's carry word has the weight of the next column, so it is shifted
  left one slice bit before the next adder. The top carry bit (column 8) is
  dropped; it is always zero because the slice total is at most
  `2 + 9 + 9 + 4·9 = 56 < 64` (the product fits in 8 bits). Two
  concurrent assertions in `pipelined_array_mult` check this in simulation.

Every CSA and CPA row is six full adders. The carry-save adders have no
carry propagation, so stage 2 is two full-adder delays deep; the ripple
through the final CPA is the longest path and lies after the last register.

### Timing

* Clock: rising edge. Reset: `rst_n`, asynchronous, active low; clears all
  register bits, including the valid bits.
* Operands sampled with `in_valid` at edge `k` give `out_valid` and
  `product` just after edge `k+2`. `product` is combinational from the
  second register rank (the final CPA is not followed by a register), so a
  consumer should register it.
* Throughput: one operand pair per clock, no stalls, no back-pressure.
  `in_valid` may be low in any cycle; that cycle produces a bubble.

## The row-pair pipelined multiplier

`row_pair_pipe_mult` is the plain array view of the same pipelining. Row `k`
is `a & {N{b[k]}}`, shifted left `k` places (one `bit_product` AND gate per
bit). Stage 1 adds rows `2m` and `2m+1` and registers the `N/2` pair sums;
stage 2 adds the pair sums and registers the product. Same latency (2) and
throughput (1 per clock) as the other multiplier, but the output is a
register. `N` must be even; the adders are written as `+` operators and left
to synthesis.

## Files

`rtl/` (one module or package per file):

* `mult_pkg.sv` – sizes (operand 4, digit 2, partial product 4, adder row 6,
  product 8) and the register-rank structs `pp_set_t` and `cs_pair_t`.
* `full_adder.sv`, `cpa.sv` (ripple, `WIDTH` = 6), `csa.sv` (`WIDTH` = 6),
  `triple_gen.sv`, `pp_mux.sv`, `pipe_reg.sv` (register rank with valid bit),
  `bit_product.sv`.
* `pipelined_array_mult.sv`, `row_pair_pipe_mult.sv`, `pipelined_mult_top.sv`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_signal_prob_workload.sv`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

* Combinational blocks are checked exhaustively (the 6-bit CPA over all
  8192 input combinations) or, for the CSA, against XOR/majority on 4000
  random triples.
* The multiplier testbenches compare each output with the pair driven
  exactly two cycles earlier, so a wrong latency or a dropped cycle fails.
  They cover all 256 operand pairs back to back, random traffic with
  bubbles, and reset with data in flight. `tb_pipelined_array_mult` also
  counts clock edges: 256 back-to-back products take 2 + 255 = 257 cycles.
* `tb_pipelined_mult_top` runs the top at its default parameters and
  fails if any of these never happened: pipeline fill, back-to-back results,
  bubbles, every multiplexer choice (0, a, 2a, 3a) at both digit positions,
  a non-zero carry word reaching the final CPA, reset while busy.

## Switching-activity workload

`tb_signal_prob_workload` drives the 4x4 multiplier with seven streams of
1000 random operand pairs each, in which every input bit is 1 with
probability P = 1/8, 2/8, ..., 7/8. It checks every product and the
measured probability, and prints the 1→0 transitions per vector on the two
register ranks and the product. Dynamic power is proportional to
`Σ C_i · Vdd² · (1→0 transitions of node i) / vectors`, so these counts are
the activity half of a power estimate; capacitances, gate-level glitches and
power itself are not modelled by RTL simulation. One run gave:

| P | rank 1 | rank 2 | product |
|---|---|---|---|
| 0.125 | 0.28 | 0.28 | 0.28 |
| 0.500 | 2.54 | 1.88 | 1.69 |
| 0.625 | 3.14 | 2.22 | 1.87 |
| 0.750 | 3.59 | 2.59 | 1.97 |
| 0.875 | 3.18 | 2.43 | 1.56 |

Activity rises with P up to about 0.625–0.75 and falls again as the inputs
become mostly ones.

## Running

With Verilator 5 (the package must come first):

    verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv \
        tb/tb_pipelined_mult_top.sv --top-module tb_pipelined_mult_top -o sim
    ./obj_dir/sim

Replace the testbench name for any other test. Every test finishes in well
under a second.

## Choices made here, and limits

* Operands are unsigned. There is no signed (two's complement) mode.
* Which operand feeds the triple generator (the multiplicand `p`) and
  which supplies the multiplexer selects (the multiplier digits of `q`), the
  order of multiplexer inputs, the assignment of partial products to the two
  CSAs and the column slice 2..7 are this design's own choices consistent
  with a six-full-adder row per CSA/CPA.
* The 3x generator is two independent 3-bit ripple chains (`3a = a + 2a`);
  together they are the six full adders of one CPA.
* Valid bits and reset are additions; the pipelining itself has no
  handshake.
* Half adders are not used explicitly: full adders with a constant-zero
  input are left for synthesis to reduce.
* Only the two-register-rank form is built. A variant with a single
  register rank, and the unpipelined multiplier it is compared with, are
  not included; their register placement is not defined here.
* `row_pair_pipe_mult` defaults to 4x4. At N = 8 it has four pair registers;
  the testbench also runs that size.
