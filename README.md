# SFG-II: a fully systolic, bit-serial Montgomery multiplier

RSA spends almost all of its time in modular multiplications `A*B mod N` of
512- to 2048-bit numbers. A multiplier built around an l-bit adder gets slower
as l grows, because its carry chain grows with it. This design avoids that. It
is a linear array of l+1 one-bit processing cells. Every signal that passes
from one cell to the next goes through a flip-flop, so the critical path is one
cell (a 4:1 multiplexer and a full adder) whatever the modulus length. The
operands enter one bit per clock, least significant bit first. The product
leaves the same way:

| quantity | value (l = modulus length) |
|---|---|
| cells | l + 1 |
| first result bit | clock 2l + 1 after the first input bit (latency) |
| last result bit | clock 3l + 1 (execution time) |
| throughput | one result bit per clock |
| result | `A*B*2^-(l+1) mod N`, not fully reduced: `0 <= P < 2N`, l+1 bits |

The array is the "SFG-II" structure. It comes from projecting the dependence
graph of the bit-level Montgomery algorithm along the iteration axis: each
cell runs one iteration, and the bits of the operands stream through the
cells. The published FPGA implementation of this array runs at a nearly
constant 5.8 ns clock on a Virtex-II from 256-bit to 1024-bit moduli (5.4 ns
at 128 bits). That comes to about 18 us per 1024-bit multiplication.

## The arithmetic

For an odd modulus N, operands `A, B < N` and `A = sum a_i 2^i`, every cell i
performs one step of radix-2 Montgomery multiplication:

```
q_i = (P + a_i*b_0) mod 2               -- makes the sum below even
P   = (P + a_i*B + q_i*N) / 2
```

The cell does not multiply. It adds one of four words, chosen by `(a_i, q_i)`,
with `NB = N + B` computed once in advance:

| a_i | q_i | added word |
|---|---|---|
| 0 | 0 | 0 |
| 0 | 1 | N |
| 1 | 0 | B |
| 1 | 1 | NB |

There are l+1 iterations, one more than the bits of A; cell l sees `a_l = 0`.
Hence the Montgomery constant is `R = 2^(l+1)` and the result satisfies
`P * 2^(l+1) = A*B (mod N)`. The partial product stays below 2N after every
step, so P fits in l+1 bits. There is no final "subtract N if P >= N" step.
A user who needs the fully reduced value must do that one comparison and
subtraction outside the array.

## How the bits move through the array (the part to read carefully)

Every operation occupies l+2 consecutive bit positions at the input of
cell 0. Position j is the j-th clock of the operation:

| position j | b, n, nb streams | select1 (sel_a) | select2 (sel_cdef) |
|---|---|---|---|
| 0 | b_0, n_0, nb_0 | 1 | 0 |
| 1 .. l | b_j, n_j, nb_j (b_l = n_l = 0; nb_l is the carry of N+B) | 1 | 1 |
| l + 1 | 0, 0, 0 | 0 | 1 |

Two delays set up the schedule:

* The operand stream (b, n, nb, select1, select2) is delayed **two** clocks
  per cell. Cell i therefore sees position j of an operation on clock 2i + j.
* The partial product is delayed **one** clock per cell. Cell i produces
  sum bit s_j on clock 2i + j, and that bit reaches cell i+1 on clock
  2i + j + 1. Cell i+1 is then at position j - 1, so cell i+1 adds cell i's
  bit j as its own bit j - 1. That shift down by one bit *is* the
  division by two. No shifter exists anywhere.

So each cell sees the new partial product already halved. Its position-0
input bit is the LSB of the current P, which is exactly what `q_i` needs.
The sum bit a cell produces at position 0 is always 0, because `q_i` was
chosen to make the sum even. The one-clock path delivers that bit to the next
cell one clock before that cell's position 0, where the previous operation's
`select1 = 0` discards it.

Position l+1 exists to let the last carry out. The sum `P + a_i*B + q_i*N`
can need l+2 bits. At position l+1 no operand bits arrive, select1 = 0 masks
whatever is on the partial-product input, and the adder emits the stored
carry as the top bit.

The result leaves the last cell (cell l) on clocks 2l + 1 + k, k = 0 .. l,
LSB first. An operation of length l thus finishes on clock 3l + 1. Operations
can enter cell 0 back to back, every l + 2 clocks. The one constraint is the
multiplier bits: cell i latches `a_i` on the clock it sees position 0
(clock 2i). `a_in[i]` must therefore hold the operation's bit on that clock.
It may change on any other clock.

## Inside a cell

Each cell (`sfg2_cell`) holds these parts; the letters name the multiplexers:

* **Input registers** (all cells but cell 0): two flip-flops on each of b, n,
  nb, select1 and select2, and one on the partial product.
* **MUX A**: the partial-product bit, or 0 when select1 = 0.
* **MUX D, MUX E, MUX C**: at position 0 (select2 = 0) they take the new
  `q_i = p_0 XOR (a_i AND b_0)`, the `a_i` input and a carry-in of 0. On
  every later position they take the values held in the cell's q, a and carry
  flip-flops.
* **MUX B**: picks 0, b_j, n_j or nb_j by `(a_i, q_i)`, as in the table above.
* **Full adder**: partial-product bit + MUX B output + carry. The sum bit is
  the cell's output and the carry goes to the carry flip-flop.

That is 14 flip-flops per cell, plus a few gates. The cell's combinational
path runs from its input flip-flops through MUX A, the q logic, MUX B and the
full adder, into the next cell's input flip-flop. It does not depend on l.
The first cell takes its inputs directly from the array ports. The last cell's
sum bit is the array output `rout0`. All flip-flops have an asynchronous,
active-high reset.

## Where this RTL departs from the published cell

* **Where q_i comes from.** In the published cell, the position-0 sum bit
  is sent through a demultiplexer onto a separate path with two flip-flops
  (P0), and the next cell forms `q` from that bit. That bit is the always-zero
  LSB of the even sum. A bit-level model of that dataflow does not give the
  Montgomery product for most operands. Here `q_i` is formed from the LSB of
  the halved partial product, which arrives on the one-clock path at
  position 0. The P0 path, its two flip-flops and the demultiplexer are left
  out. An assertion in each cell checks that the position-0 sum bit is zero.
  Everything else in the cell keeps the published structure: the 2-clock and
  1-clock delays, MUX A to E, the a, q and carry flip-flops, and the select
  registers.
* **Framing.** The exact select1/select2 sequence and the extra position l+1
  are this design's own. With them the published latency (2l+1) and
  execution time (3l+1) come out exactly.
* **Interface.** The published array takes serial streams and a parallel A
  straight from its pins, and NB is precomputed off-chip. `mont_mult_top`
  adds its own parallel front end, described below.

## The top level: `mont_mult_top`

`mont_mult_top #(L)` wraps the array (L = modulus length, default 1024) in
a parallel interface:

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; asynchronous active-high reset |
| start | in | 1 | load a, b, n and start; taken on a clock where ready = 1 |
| a, b, n | in | L | A < N, B < N, odd N |
| ready | out | 1 | a start is accepted this clock |
| done | out | 1 | one-clock pulse, result valid |
| result | out | L+1 | `A*B*2^-(L+1) mod N`, `< 2N`; held until the next done |

On start, the top loads A, B and N into registers and computes NB = N + B
with one adder. From the next clock (position 0) it shifts B, N and NB into
the array with the framing above, and holds `{0, A}` on the cells' a inputs.
It shifts the serial result into a register as it leaves the last cell.
Timing, counted from the start edge:

* result bit 0 leaves the array on clock 2L + 1 after position 0;
* done is set on the edge 3L + 2 after the start edge;
* ready returns after 2L clocks, so the next start edge can come 2L + 1
  clocks after the previous one. At that point the last cell has latched its
  bit of A and the registers may be reloaded. The new operation's input then
  overlaps the previous operation's output. This follows the original
  suggestion that the array be reused as soon as the first result bit
  appears.

Taking operations every l + 2 clocks instead would need A skewed per cell
(cell i needs its bit 2i clocks later), which costs about l^2 flip-flops. The
top does not do that; the bare `sfg2_array` allows it if the user supplies
the skew.

Size after generic synthesis, at L = 1024: the array has 14,339 flip-flops
(14 per cell, 1025 cells) and the top 20,514, including its 1025-bit
operand and result registers.

## Files

| file | contents |
|---|---|
| `rtl/sfg2_pkg.sv` | `stream_t` (the b/n/nb/select bundle) and `addend_e` (the four-row table) |
| `rtl/sfg2_cell.sv` | one processing element; `FIRST = 1` gives the register-less first cell |
| `rtl/sfg2_array.sv` | `L + 1` cascaded cells, serial ports |
| `rtl/mont_mult_top.sv` | parallel front end around the array (top level) |
| `tb/tb_sfg2_cell.sv` | cell against integer arithmetic, both cell variants, all four table rows |
| `tb/tb_sfg2_array.sv` | array at L = 24: back-to-back and gapped operations, non-zero initial P, random `a_in` outside the capture clock |
| `tb/tb_mont_mult_top.sv` | top at L = 32, overlapped starts, exact comparison and timing |
| `tb/tb_mont_mult_full.sv` | top at its default L = 1024 |
| `tb/tb_mont_mult_sizes.sv`, `tb/mm_runner.sv` | L = 4, 128, 256, 512, 768, each timed for 3L + 1 |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sfg2_pkg.sv tb/tb_mont_mult_top.sv --top-module tb_mont_mult_top
./obj_dir/Vtb_mont_mult_top
```

Replace the testbench name to run any of the others. The full-size run
(`tb_mont_mult_full`, 1025 cells, 12 operations of 1024 bits) builds in
about half a minute and runs in a few seconds.

The testbenches check results in two independent ways. One is a bit-level
software model of the Montgomery loop, which must match exactly. The other is
wide integer arithmetic: `P * 2^(L+1) mod N == A*B mod N` and `P < 2N`. Cycle
counts are checked against 2L + 1 and 3L + 1. The end-to-end test counts
each mechanism and fails if one never happened: the four table rows, an
unreduced result `P >= N`, an overlapped start, a carry out of `N + B`, a
start from idle, and a reset in the middle of an operation.

## How far it can be trusted

* Verified by simulation at L = 4, 24, 32, 128, 256, 512, 768 and 1024. The
  4-bit case includes the example operands A = 11, B = 3, N = 7. It gives
  P = 3, with the last bit on clock 13 = 3l + 1.
* Not simulated: L = 2048, the largest RSA size in common use. It is a
  parameter change.
* Clock rate and area on an FPGA are not reproduced here. The RTL keeps the
  one-cell critical path, but the published figures depend on that device and
  on placement.
* The array needs N odd and `A, B < N`. It also works with a non-zero initial
  partial product `p_init < N`, giving `(p_init + A*B) * 2^-(L+1) mod N`.

## Not included

* **Modular exponentiation.** RSA (`M^e mod N`) needs repeated squarings and
  multiplications, and conversion into and out of Montgomery form. It also
  needs operands kept below N between steps. Feeding an unreduced result
  (< 2N) straight back into this (l+1)-cell array does not keep it below 2N.
  Only the multiplier is designed here.
* **IDEA.** The 16-bit block cipher of the hybrid RSA/IDEA scheme is not
  implemented. Its modulus 2^16 + 1 is odd, so this array can compute its
  products in Montgomery form, but the cipher datapath is absent.
* **SFG-I**, the other projection of the same dependence graph, is not
  implemented. It has simpler cells but about 4(l+1) ports and 50 % cell
  utilisation.
