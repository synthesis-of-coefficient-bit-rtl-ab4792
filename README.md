# Folded bit-plane FIR filter with a coefficient bit reordering module

A bit-plane FIR filter computes `y[m] = c[0]*x[m] + c[1]*x[m-1] + ... + c[kc-1]*x[m-kc+1]`
one coefficient *bit* at a time. Each operation multiplies the input word (weighted by a
power of two) by a single coefficient bit and adds the result to a running sum. One output
needs `L = kc*mc` such operations, where `kc` is the number of coefficients and `mc` their
length in bits.

The folded array runs these `L` operations on only `K` hardware sections. Each section
handles `N = L/K` operations per output period. Many different (`kc`, `mc`) pairs give the
same `L`, so one fixed array can serve all of them: for `K=3`, `N=4` it can run 2
coefficients of 6 bits, 3 of 4, 4 of 3, 6 of 2 or 12 of 1.

The difficulty is feeding the array. In each cycle every section needs one particular
coefficient bit, and which bit that is follows a modulo rule. The **coefficient bit
reordering module (CBRM)** solves this with nothing but wiring. It is a small 2-D shift
register: coefficient bits go in serially in their natural order and come out in the
order the sections need.

## The operation schedule

Number the operations of one output `p = 0 .. L-1`. They run in this order: bit 0 to bit
`mc-1` of `c[kc-1]`, then the bits of `c[kc-2]`, and so on down to `c[0]`. Operation `p`
uses bit `p mod mc` of coefficient `c[kc-1-p/mc]`.

Operation `p` is assigned to:

    folding set (section)  s = p mod K
    folding order (slot)   r = p mod N      (the cycle within each N-cycle period)

When `K` and `N` are coprime, every (s, r) pair receives exactly one `p` (Chinese remainder
theorem). Take `K=3`, `N=4`, `kc=2`, `mc=6`, and write `cJ^b` for bit `b` of coefficient
`cJ`. The bit each section needs in each slot is then:

| section \ order | 0     | 1     | 2     | 3     |
|-----------------|-------|-------|-------|-------|
| S0              | c1^0  | c0^3  | c0^0  | c1^3  |
| S1              | c1^4  | c1^1  | c0^4  | c0^1  |
| S2              | c0^2  | c1^5  | c1^2  | c0^5  |

## How the CBRM reorders (`rtl/cbrm.sv`)

The CBRM is a `K x N` array of one-bit cells `[a, b]`. Rows are numbered `a = 1..K` from
the bottom and columns `b = 1..N` from the right. It has two modes.

* **Initialization** (`K*N` cycles, one bit per cycle). The next serial bit enters cell
  `[1,1]`. At the same time every stored bit moves one row up and one column left
  (`[a,b] <- [a-1,b-1]`), wrapping from row `K` to row 1 and from column `N` to column 1.
  After `t` cycles, a bit has moved `t` steps along both axes at once. The bit that entered
  as number `p` therefore ends in row `K - (p mod K)` and column `N - (p mod N)`. The walk
  computes both remainders at once, and no two bits collide because `K` and `N` are coprime.
  After the last bit, row `K - s` holds exactly the bits section `s` needs, with the bit for
  order 0 in the leftmost column. That is the table above, read row by row.
* **Run**. Each row rotates right to left. Its leftmost cell drives `cbit[s]` for section
  `s = K - a`, so in each cycle every section sees the bit for the current order. The
  pattern repeats every `N` cycles, one period per output.

The CBRM does not depend on `kc` or `mc`. They only change what the serial stream means.
Changing the filter's shape therefore means reloading the bits, not changing hardware.

## The folded array (`rtl/fbpa.sv`)

The `K` sections form a ring. Each output is built by a **chain**, a partial sum that
starts at section S0 in order 0. The chain then moves one section to the right per cycle,
from S(K-1) back to S0, for `L` cycles. A new chain starts every `N` cycles, so `K` chains
are in flight at any time, each on its own section.

Each section registers four values for the chain passing through it:

* the partial sum;
* the current weighted input word `x * 2^i`;
* the bit index `i`;
* the address of that input word in a small history buffer.

In each cycle, a section does one of two things with the weighted word:

* it doubles the word it received, for the next bit of the same coefficient;
* at bit 0 of a new coefficient, it loads the next input word from the history instead.

It then adds the word to the sum if `cbit[s]` is 1. At order 0 the chain leaving S(K-1)
is complete and becomes `y`, and S0 starts a new chain from zero.

Input words are written to the history once every `N` cycles. Word `x[m]` is written at
the (m+1)-th chain start. `y[m]` appears at the (m+K)-th chain start, `L - N` cycles later,
and after that one result follows every `N` cycles. For the example sizes
(`L=12`, `N=4`), `y[0] = c0*x0` comes 8 cycles after `x0`, and `y[1] = c1*x0 + c0*x1`
comes 4 cycles after that.

Constraints, checked by assertions:

* `kc * mc = K * N`;
* `(kc-1) * mc >= N`, so that a word is in the history before the first chain that needs
  it reads it. This rules out `kc = 1`.

Arithmetic is unsigned, at full width `YW = XW + K*N`.

## Control and top level (`rtl/fbpa_ctrl.sv`, `rtl/fbpa_top.sv`)

`fbpa_ctrl` has three states: IDLE, INIT and RUN.

* `load` starts INIT, which lasts exactly `K*N` cycles; `loaded` then rises.
* `start`, when in IDLE and loaded, pulses `clear` (which empties the array) and enters RUN.
* `stop` returns to IDLE. A later `start` runs again with the same coefficients.
* `load` during RUN reloads the coefficients.

The folding order counter advances only in RUN, like the CBRM rows, so the two never drift
apart.

Using `fbpa_top`:

1. Pulse `load`. In each of the next `K*N` cycles, present one bit on `coef_bit`: the bits
   of `c[kc-1]` LSB first, then `c[kc-2]`, ..., then `c[0]`.
2. Set `kc` and `mc`, then pulse `start`.
3. In every cycle where `x_take` is high, present the next input word on `x_in`. The first
   `x_take` comes `N` cycles after the first chain start.
4. Read `y_out` in the cycles where `y_valid` is high.

All signals are synchronous to the rising edge of `clk`. `rst_n` is a synchronous,
active-low reset.

Defaults: `K=3`, `N=4`, `XW=5` (5-bit input words). `K` and `N` must be coprime; `cbrm`
checks this at elaboration.

## Where this RTL departs from, or fills in, the original architecture

* The array is modelled at **word level**. The original folded bit-plane array is a
  bit-level carry-save grid: cells with inputs `a`, `x`, `b`, `c` and `s`, controlled by
  two clocks `ck0` and `ck1`, followed by a final adder. The logic of those cells is not
  available, so it is not reproduced here. This RTL keeps the same section ring, the same
  schedule and the same latency and throughput, but uses ordinary adders. The truncation
  of low-order bits done by the bit-level array is not modelled either.
* The input-word **history buffer**, with an address carried along by each chain, is this
  design's own way to supply the right word at each coefficient boundary.
* In the CBRM, the original **storage cells are latches**. Here they are flip-flops, with
  a synchronous reset and an added hold (IDLE) mode.
* The **controller**, its load/start/stop protocol and the `N`-cycle wait before the
  first input word are this design's own.
* The filter handles **unsigned** data and coefficients.

## Files and simulation

| file | content |
|------|---------|
| `rtl/fbpa_pkg.sv` | mode enum and reference helpers |
| `rtl/cbrm.sv` | coefficient bit reordering module |
| `rtl/fbpa.sv` | word-level folded array |
| `rtl/fbpa_ctrl.sv` | controller |
| `rtl/fbpa_top.sv` | top level |
| `tb/tb_cbrm.sv` | checks the published 3x4 layout bit by bit, plus random streams for K=2/N=5 and K=5/N=3 |
| `tb/tb_fbpa.sv` | drives the array with an ideal bit feed, covering all five splits of 12, random stalls and exact latency; also traces the weighted input word, section by section, along one chain of the 2x6-bit example |
| `tb/tb_fbpa_ctrl.sv` | checks the controller's modes, counters and strobes |
| `tb/tb_fbpa_top.sv` | end-to-end test at default size: all five splits, stop/resume, reload while running, latency and rate checks |
| `tb/tb_fbpa_top_sizes.sv`, `tb/fbpa_top_exerciser.sv` | the top at K/N = 2/5, 5/2, 4/3 and 5/3, each through every valid (kc, mc) split |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends on its own. For example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/fbpa_pkg.sv tb/tb_fbpa_top.sv \
              --top-module tb_fbpa_top -o sim && ./obj_dir/sim
