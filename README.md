# Block transpose-form FIR filters: reconfigurable and fixed-coefficient

A transpose-form FIR filter multiplies each new input sample by all N
coefficients at once and pushes the products down a chain of adders and
registers. That makes it naturally pipelined, and because one operand (the
sample) meets a whole set of constants, the multiplications can be shared as
*multiple constant multiplication* (MCM). This design applies the same idea to
*block* processing: every clock cycle the filter takes a block of L samples and
delivers a block of L outputs, so the throughput is L samples per cycle.

Two filters are built from one formulation:

* **`rfir`, reconfigurable** – P channel filters are held in coefficient
  tables and one is chosen by a select input. Products are formed by
  multipliers.
* **`mcm_fir`, fixed-coefficient** – one filter fixed at elaboration.
  Multipliers and tables are replaced by shift-and-add MCM blocks.

`fir_top` puts both side by side. Default sizes: block size L = 4, filter
length N = 16, 8-bit samples and coefficients, 16-bit outputs, P = 4 filters.

## The block formulation

Number the blocks k = 0, 1, .... Block k is the L newest samples, **newest
first**:

    x_k = [ x(kL), x(kL-1), ..., x(kL-L+1) ]        port x[l] = x(kL-l)

The output block uses the same order, `y[l] = y(kL-l)`. (With samples counted
from 0, block k holds stream samples kL..kL+L-1, so the "kL" here is really
the block's newest sample. Testbenches index the stream this way.)

The coefficients are cut into M = N/L short weight vectors

    c_m = [ h(mL), h(mL+1), ..., h(mL+L-1) ],   m = 0..M-1

and the current block plus the L-1 samples before it form an L x L input
matrix with row l

    S0k[l][j] = x(kL-l-j),   j = 0..L-1

For L = 4:

    | x(4k)   x(4k-1) x(4k-2) x(4k-3) |
    | x(4k-1) x(4k-2) x(4k-3) x(4k-4) |
    | x(4k-2) x(4k-3) x(4k-4) x(4k-5) |
    | x(4k-3) x(4k-4) x(4k-5) x(4k-6) |

Each weight vector gives a block of L *partial outputs*, r_m(k) = S0k · c_m.
The filter output is the transposed-form sum over successive blocks:

    y_k = r_0(k) + r_1(k-1) + r_2(k-2) + ... + r_{M-1}(k-M+1)
        = z^-1( ... z^-1( z^-1 r_{M-1} + r_{M-2} ) ... ) + r_0

Element l of this sum is exactly sum_i h(i) x(kL-l-i) over all N taps. The
recurrence is what the **pipeline adder unit** (`pau`) computes: a chain of
M-1 block adders and M-1 block registers. The partial block of c_{M-1} enters
at the far end. Each stage adds the partial block of a lower-index weight
vector one cycle later. The sum that leaves the c_0 stage is the output.

Only 2L-1 distinct samples appear in S0k, x(kL) down to x(kL-2L+2). The L-1
oldest of them belong to the previous block. The **register unit** (`ru`)
keeps them in L-1 registers.

## Reconfigurable filter (`rfir`)

    sel ──► csu ──c_0..c_{M-1}──┐
                                ▼
    x ────► ru ──S0k──► ipu (i = 0..M-1, weight c_{M-1-i}) ──r_m──► pau ──► y

* **`csu`, coefficient selection unit.** N small read-only tables, one per
  tap, each with P words. All N are read at address `sel` on every clock edge,
  so the selected filter's whole coefficient set arrives in one cycle, as M
  weight vectors. The read is registered: a change of `sel` in cycle t
  governs blocks presented from cycle t+1 on. Table contents come from
  `fir_pkg::rom_coef()` (see below).
* **`ru`, register unit.** Forms S0k from the current block and the held
  samples. This is combinational; the held samples update when a valid block
  is accepted.
* **`ipu`, inner-product unit.** There are M of them. Unit i multiplies S0k
  by weight vector c_{M-1-i}. Each holds L **`ip_cell`s** (one per row of
  S0k), and each cell has L multipliers. The L products are reduced to two
  by levels of 3:2 carry-save compressors (two levels for L = 4), and one
  carry-propagate adder adds the last two. That is L-1 word-level adders,
  and only one of them propagates carries.
* **`pau`** as above. This design registers the final sum too, so `y` is a
  register output.

**Switching filters.** The chain in `pau` holds partial sums that were
computed with the coefficients in force when they were made. The M-1 output
blocks after a switch therefore mix old and new filters, exactly as the
transposed structure does. After that, the output is purely the new filter.
The testbenches model this block by block and check the mixed blocks too. To
get a clean switch, flush with M-1 blocks or reset.

Cost at the defaults: L·N = 64 multipliers, and L(N-1) = 60 adders
(48 in the IP cells and 12 in the PAU). Registers: 3 x 8 bits in `ru`,
3 x 4 x 16 bits in the chain, 4 x 16 output bits, and 16 x 8 coefficient
bits in `csu`. The critical path is one multiplier, the compressor levels,
the carry-propagate adder of the IP cell and one PAU adder.

## Fixed-coefficient filter (`mcm_fir`)

When the filter is fixed, `csu` and the multiplier-based `ipu`s go away.
Product x(kL-l-j)·h(mL+j) comes from sample number l+j (counting down from
the newest) and coefficient *group* j, where group g = {h(g), h(g+L), ...,
h(g+(M-1)L)}. Each sample therefore meets only some groups. For L = 4:

| sample   | groups it is multiplied by |
|----------|----------------------------|
| x(4k)    | 0                          |
| x(4k-1)  | 0, 1                       |
| x(4k-2)  | 0, 1, 2                    |
| x(4k-3)  | 0, 1, 2, 3                 |
| x(4k-4)  | 1, 2, 3                    |
| x(4k-5)  | 2, 3                       |
| x(4k-6)  | 3                          |

In general, sample j meets groups max(0, j-L+1) .. min(j, L-1). The filter has
one **`mcm_block`** per sample (2L-1 = 7 of them). Each forms all the
products that its sample needs. The **`mcm_adder_net`** then adds them into
the inner products r_m[l] = sum_g x(kL-l-g)·h(mL+g). The same `ru` and `pau`
as in `rfir` complete the filter, with the same one-cycle timing.

**Inside an MCM block.** Every constant is written as ±f·2^s with f odd. Each
distinct odd factor f is built once, as a shift-add chain from the canonical
signed-digit (CSD) recoding of f. Every product is then its factor shifted by
s, negated if the constant is negative. A symmetric filter has equal
coefficients within a group (for the default set, group 1 is
{-5, -13, -13, -5}), and such products cost no extra adders. All of this is
worked out at elaboration from the parameter `H`. Different odd factors do
not share sub-terms with each other. A full common-subexpression search would
save more adders and could replace the body of `mcm_block` without touching
its ports.

## Number format and coefficient tables

* Samples and coefficients are two's complement (B = 8, BC = 8 bits).
* Products, inner products, the chain and the outputs are BA = 16 bits
  (B + BC). Everything wraps modulo 2^16, with no saturation. A 16-tap filter
  at full scale can exceed 16 bits, and the testbenches drive such inputs on
  purpose. Widen `BA` if your data need it.
* `fir_pkg::rom_coef(p, n)` gives the `csu` tables:
  * filter 0 starts with 32, 40, -109, 83, 67, then ((37n) mod 128) - 64;
  * filter 1 is a triangular smoother, 8(n+1) rising to 64 and falling back;
  * filter 2 is the alternating high-pass (-1)^n·4(16-n);
  * filter 3 is 0, 1, 2, 3, 4, 5 followed by zeros, so a constant input of 1
    settles at 15;
  * any further filter (P > 4) is ((29p + 11n) mod 255) - 127.

  Change the function to load your own filters. Values must fit in BC bits.
* `fir_pkg::FIXED_H`, the default `H` of `mcm_fir`, is a symmetric 15-tap
  example set {3, -5, -7, 2, 11, -13, -19, 66, -19, -13, 11, 2, -7, -5, 3}
  padded with a zero tap. Its sum is 10, so a constant 1 input settles at 10.
  Override `H` (N entries) for a real filter.

## Interface and timing

`fir_top` ports (`r_` = reconfigurable side, `f_` = fixed side):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset of both filters |
| `r_sel` | in | clog2(P) | filter select, registered into `csu` every cycle |
| `r_blk_valid`, `f_blk_valid` | in | 1 | a block is present this cycle |
| `r_x[L]`, `f_x[L]` | in | B each | input block, `x[l] = x(kL-l)` |
| `r_y[L]`, `f_y[L]` | out | BA each | output block, `y[l] = y(kL-l)` |
| `r_out_valid`, `f_out_valid` | out | 1 | `y` holds a new block |

* **Throughput.** One block of L samples per cycle, with no stalls inside
  the filter.
* **Latency.** A block accepted at a clock edge produces its output block,
  with `out_valid` high, right after that edge. In cycle counts, input in
  cycle k gives output in cycle k+1.
* **Idle cycles.** When `blk_valid` is low, `ru` and the `pau` chain hold
  their contents and `out_valid` drops for one cycle. This hold is this
  design's addition; the filter itself assumes a block every cycle.
* **Reset.** Reset clears the held samples, the chain and the outputs, so
  samples before the first block count as zero. The `csu` tables and their
  output register are not reset.

## What is taken from the reference and what is chosen here

Taken from the reference design:

* the block formulation and the L = 4, N = 16 example;
* the reconfigurable structure (CSU with N tables of P words, RU with L-1
  registers, M IPUs of L cells of L multipliers each, with the (i+1)-th IPU
  taking c_{M-1-i}, and a PAU of M-1 adders and registers);
* the per-sample MCM grouping of the fixed filter;
* the 8-bit data, 8-bit coefficients and 16-bit partial sums;
* the two small experiments: coefficients 0..5 giving 15 for an input of 1,
  and a 15-coefficient fixed filter giving 10.

Chosen here:

* signedness, wrap-around arithmetic, reset and the valid/idle handshake;
* the registered table read and the output register after the PAU;
* the value of P and every coefficient apart from the five leading
  coefficients of filter 0 and the 0..5 set;
* the MCM algorithm (CSD with odd-factor sharing);
* one MCM block for each of the 2L-1 samples, following the reference's
  sample table (its prose also speaks of six blocks for L = 4);
* the order of samples within a port (newest first).

The reference reports FPGA area and delay (about 1.2 ns, and 241 or 60
LUTs + flip-flops). Those figures were not reproduced.

## Files

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | default sizes, coefficient tables, CSD and grouping functions |
| `rtl/fir_top.sv` | both filters side by side |
| `rtl/rfir.sv`, `csu.sv`, `ru.sv`, `ipu.sv`, `ip_cell.sv`, `pau.sv` | reconfigurable filter |
| `rtl/mcm_fir.sv`, `mcm_block.sv`, `mcm_adder_net.sv` | fixed filter (also uses `ru`, `pau`) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_paper_workloads.sv` | the two step-response experiments and filter 0's leading taps |

## Simulating

Every testbench checks its outputs against values it computes itself, by
direct convolution or plain multiplication. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops. A watchdog ends a hung run as
a failure.

`tb_fir_top` runs the whole design at its default parameters. It covers:

* impulse responses of every filter;
* about 3000 cycles of random blocks, with idle cycles on both sides;
* about 200 filter switches, including blocks computed across a switch;
* full-scale blocks that make the sums wrap;
* a reset in mid-stream.

It counts each of these and fails if any never happened. It also checks
`out_valid` against the one-cycle latency in every cycle.

With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
        rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top -Mdir obj_top
    ./obj_top/Vtb_fir_top

Replace `tb_fir_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/fir_pkg.sv rtl/<module>.sv`.
`fir_pkg.sv` must come first, because every module takes its defaults from it.
