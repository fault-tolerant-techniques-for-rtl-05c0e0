# Fault-tolerant residue number system processor built from one self-checking ROM cell

This design computes an FIR filter in a residue number system (RNS). It uses
one redundant residue channel and a redundant set of decoders, so that a single
fault anywhere in the arithmetic is detected and corrected on the fly. The
whole datapath, including the residue-to-binary decoders, is built from one
generic cell. The cell adds a constant modulo m when one bit of its multiplier
input is set. It is a small ROM addressed by the incoming residue, plus a set
of steering switches. Two extra ROM bits per word turn each cell into its own
fault detector. The fault flag then travels down the pipeline with the sample
it belongs to. At the end, the processor knows which residue channel (or which
decoder) produced a wrong value, drops that one, and rebuilds the result from
the others.

The scheme follows the paper "Fault-tolerant Techniques for Finite Ring
Arithmetic Processors". That paper gives the cell,
its parity check, the bit-sliced inner product step, the redundant decoder
arrangement and the decoder's ten base-extension formulas. It does not give
several numbers this RTL needs: the moduli, the filter (tap count,
coefficients, input width), the reset, the latencies and the counter widths.
Those are this design's own choices, listed in
[Choices made here](#choices-made-here-and-departures).

## The self-checking cell (`ft_bipsp_cell`)

The cell is a bit-level inner product step over the ring R(m). In a row of B
cells, cell i computes

    y_out = x[i] ? (y_in + 2^i * A) mod m : y_in

so B cells in a row produce `Y + A*X mod m` for a fixed multiplier A. This
replaces one big `m x m` ROM with B small `m`-word ROMs.

Inside the cell:

* **Input latches** on every input, so each cell is one pipeline stage. All
  cells are identical, so a row is a plain linear systolic array.
* **A ROM of 2^B words of B+2 bits**, addressed by the latched `y`. Each word
  holds:
  * the result `(KY*y + C) mod m` (KY = 1 and C = 2^i*A mod m in an IPSP row);
  * `P_con`, the parity of that result (the *content parity*);
  * `P_ad`, the parity of the address itself (the *address parity*).
* **Steering switches.** When the steering bit is 1, the cell outputs the ROM
  result and its `P_con`. When it is 0, the cell outputs the latched input `y`
  and the parity that arrived with it.
* **The check.** In a fault-free array, the address parity looked up in cell i
  equals the content parity produced by cell i-1, because both are the parity
  of the same value. The cell therefore forms

      fault_out = fault_in | (P_ad ^ P_con_in)

  The ROM is always read, even when the switches bypass it. So the check runs
  on every sample, including those whose X bit is 0.
* **X rotation.** The X word is rotated by one place per cell. Every cell can
  then take its steering bit from the same position (bit 0 here), and after B
  cells X leaves in its original order.
* **X parity chain.** One extra bit runs alongside X: `px_out = px_in ^ s`,
  where s is the steering bit. If px starts a row at parity(X), it ends the
  row at 0, unless an X latch was corrupted before its bit steered a cell.
  Without this chain, the X latches would be the only part of the cell that
  nothing checks.

How a single fault shows up:

| faulty part | effect | caught by |
| --- | --- | --- |
| ROM data plane, a data output switch, a y latch | one data bit wrong, parity unchanged | next cell's `P_ad` vs `P_con` |
| ROM parity plane or the check gates | false alarm, or a missed check with correct data | harmless under the single-fault assumption |
| address decoder | selects a row whose address differs in one bit, so `P_ad` is wrong | this cell's check |
| X latch | wrong steering bit | X parity chain at the end of the row |

A data fault in the last cell of a row is caught by the first cell that reads
that value next: the next tap or the decoder.

`PRELOAD = 1` is a mode of this design. In that mode the cell always takes the
ROM path and leaves X untouched. The decoder blocks use it to look up `K*A mod
m` with the same cell.

## Rows and channels

`ipsp_m` is one row of B cells: `Y_out = Y_in + A*X mod m`. It has a latency
of B clocks and accepts a new sample every clock. The row generates the
parity of its X input and runs the X parity chain. The end of the chain is
ORed into the fault flag and also leaves the row as `xerr_out`. Passed into
the next row's `xerr_in`, it keeps a corrupted X word flagged in every later
row that uses it.

`rns_fir_channel` is one residue channel ("RNS processor m_k"). It is made of:

* `bin_to_residue`, which reduces the binary input modulo m_k and attaches
  the parity;
* TAPS `ipsp_m` rows with multipliers `H[k] mod m_k`.

Partial sums move from row to row. The X word leaves each row after B clocks
and passes one extra register, so tap k meets `x(n-k)` just as the partial sum
of `y(n)` arrives. This is an ordinary systolic FIR filter. The source gives
only "a processing array, e.g. an FIR filter with encoding from binary", and
this arrangement is one way to build it.

## Decoding with the same cell (`rns_decoder`, `rns_block`)

Converting back to binary normally needs an adder as wide as the full dynamic
range. That does not fit a small-ring cell, and it is hard to check. The
decoder here instead repeats *base extension to 32*. It extracts the binary
result five bits at a time, and every step is an operation in a 5-bit ring.

For residues (xa, xb, xc) with moduli (MA, MB, MC):

    B1 = (xb - xc) * MC^-1 mod MB        B6  = (xb - B5) * 32^-1 mod MB
    B2 = (xa - xc) * MC^-1 mod MA        B7  = (xc - B5) * 32^-1 mod MC
    B3 = (B1*MC + xc)      mod 32        B8  = (B6 - B7) * MC^-1 mod MB
    B4 = (B2 - B1) * MB^-1 mod MA        B9  = (B8*MC + B7)      mod 32
    B5 = (B3 + B4*MB*MC)   mod 32        B10 = (B7 - B9) * 32^-1 mod MC
    X  = {B10, B9, B5}

How the formulas work:

* B1, B2 and B4 are the mixed-radix digits of X.
* B5 is X mod 32, obtained without ever forming X.
* B6 and B7 are the residues of floor(X/32).
* The same base extension applied again gives the next five bits (B9) and then
  the top slice (B10).

The result is exact when X < MA·MB·MC, X < 32·MB·MC and X < 1024·MC. All of
these hold for the moduli below and every X < 23·25·27. This was checked
exhaustively for all four decoders.

Every formula has the form `(KA*a + KB*b) mod MOD`. A subtraction is folded
into the constant as `MOD - K`. `rns_block` builds this form from the cell:

1. A preload cell looks up `KA*a`.
2. B ordinary cells add `2^i*KB` for each set bit of b.

The row is bit-sliced over b, has a latency of 6 clocks, and keeps all the
checks. b may be any 5-bit value, reduced or not. A value that has to skip a
row passes through an identity block (`MOD = 32, KA = 1, KB = 0`), so it is
checked too. No cell reads the three output slices, so the decoder checks
their content parity itself before raising its flag. The decoder is 7 rows
deep, with a latency of 42 clocks.

## Redundancy and selection (`ft_rns_system`, `redundant_select`)

The system has L = 3 moduli plus r = 1 redundant modulus, and four decoders.
Each decoder drops a different channel:

| decoder | roles (MA, MB, MC) | dropped |
| --- | --- | --- |
| 1 | m1, m2, m3 | mR |
| 2 | m2, m1, mR | m3 |
| 3 | m3, m1, mR | m2 |
| 4 | mR, m2, m3 | m1 |

Knowing which residue is wrong is enough to correct it with a single
redundant modulus. Once the bad residue is dropped, the remaining three still
cover the legitimate range, and that representation is unique. An RRNS without
fault flags would need two redundant moduli to do the same.

Channel flags flow into the decoders with the residues, so a decoder's flag is
the OR of:

* the flags of the three channels it uses;
* every check inside the decoder.

`redundant_select` outputs the first decoder whose flag is clear, registered
for one clock. `ok` goes low only if every decoder is flagged. With a single
fault that cannot happen: a channel fault leaves one decoder untouched, and a
decoder fault leaves three.

`fault_counter`s count flagged samples after every tap of every channel and at
the four decoder outputs. They are meant for long-term monitoring of which
part of the array is failing. The flag is cumulative along a channel, so the
first tap whose counter moves locates the fault. Several stages of one channel may fail over
time. Each sample is still corrected, as long as it is wrong in only one
channel.

### Top-level interface and timing

| port | dir | width | meaning |
| --- | --- | --- | --- |
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `x_bin` | in | XW (8) | one unsigned sample per clock |
| `clear_counts` | in | 1 | synchronous clear of all fault counters |
| `y` | out | 15 | `sum_k H[k]*x(n-k)` |
| `ok` | out | 1 | a fault-free decoder exists, so `y` can be trusted |
| `sel` | out | 2 | decoder used (0 = decoder 1) |
| `ch_fault`, `dec_fault` | out | 4, 4 | raw flags at channel and decoder outputs |
| `tap_fault_count` | out | 4 x TAPS x 16 | flagged samples after each tap of each channel; `[k][TAPS-1]` is channel k's output |
| `dec_fault_count` | out | 4 x 16 | flagged samples at each decoder output |

The latency from `x_bin` to `y` is `1 + TAPS*5 + 42 + 1` = 64 clocks. The
processor accepts one sample per clock and never stalls. `y` is correct as
long as the true filter output stays below M = 23·25·27 = 15525. With 8-bit
inputs and the default coefficients, the largest output is 6630.

## Choices made here, and departures

* **Moduli.** 23, 25, 27 and the redundant 31. The source asks only for 5-bit
  moduli and a redundant modulus larger than the others. The chosen moduli are
  odd (so 32 is invertible), pairwise coprime, and have 23·25 ≤ 1024, which
  makes the 15-bit output exact.
* **The filter.** 4 taps with coefficients 3, 7, 11, 5 and 8-bit unsigned
  input (`ft_rns_system` parameters `TAPS`, `H`, `XW`). If you change them,
  keep `max |y| < 15525`.
* **Outer gate of the check.** The source's printed formula combines Fault In
  with an exclusive-OR. Its prose says the flag marks a fault in *any*
  previous cell. This design uses OR, so one fault can never cancel another.
* **ROM size.** The ROM has 2^B rows, not m rows. A misaddressed row then
  still holds parity-consistent data.
* **X parity.** Where the X parity starts and where it is checked are
  unspecified in the source. Here:
  * a row generates the parity from its X input and checks the chain at its
    end;
  * the decoder blocks seed the chain with the parity that came with the
    operand.
* **Unprotected parts.** These are assumed fault free, like the check gates:
  * the registers that carry X between taps;
  * the binary encoder;
  * the selector;
  * the counters.
* **Decoder output check.** The parity check on the decoder's three output
  slices is this design's addition.
* **Decoder sharing.** The source notes that blocks could be shared between
  the four decoders. Here they are kept separate.
* **An unexplained remark.** The source mentions that a decoder's output is
  "the OR of two parallel channels in the decoder". It is not explained
  there, and it is not modelled here.
* **Counters.** They are synchronous to the array clock, with the flag as
  enable, and saturate at 16 bits. The source speaks of counters clocked by
  the fault signals.
* **Reset.** Every latch is reset to the all-zero word, which has consistent
  parity. After reset, the pipeline therefore outputs zeros with clear flags.
* **Word type.** Residues between blocks are carried as
  `rns_pkg::rns_word_t` = {value, content parity, fault flag}.

## Simulating

Every testbench in `tb/` checks itself. Each one prints
`TB_RESULT checks=N failures=M` and stops at a cycle-count watchdog. For
example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
        rtl/rns_pkg.sv tb/tb_ft_rns_system.sv --top-module tb_ft_rns_system
    ./obj_dir/Vtb_ft_rns_system

`tb_ft_rns_system` runs the whole design at its default parameters. It feeds
random samples and checks every output against a reference filter, including
the exact 64-clock latency. It then holds six single stuck-at faults, one
after another, using `force` on internal bits:

1. a ROM bit in channel m1;
2. a ROM bit at a tap boundary in channel m2;
3. a ROM bit in the last cell of channel m3;
4. a y latch in the redundant channel;
5. a ROM bit inside decoder 1;
6. an X latch in channel m2.

For each fault, the testbench checks that:

* the fault is flagged;
* another decoder takes over (faults 1–3 and 5);
* `y` stays correct throughout;
* the counters match the number of flags seen;
* the tap counters of channel m1 locate fault 1 in its third tap.

Building the testbench takes about a minute, and the run takes a few seconds.

The other testbenches cover one module each: `tb_ft_bipsp_cell`, `tb_ipsp_m`,
`tb_rns_block`, `tb_rns_decoder`, `tb_rns_fir_channel`, `tb_bin_to_residue`,
`tb_redundant_select` and `tb_fault_counter`. Each compares its module against
arithmetic computed independently in the testbench. The testbenches for the
rows, the channel and the decoder also inject wrong parities, fault flags or
stuck bits, and require that no wrong output ever leaves unflagged.

## Files

| file | content |
| --- | --- |
| `rtl/rns_pkg.sv` | word type, moduli, parity and modular-inverse functions |
| `rtl/ft_bipsp_cell.sv` | the self-checking ROM/latch cell |
| `rtl/ipsp_m.sv` | B-cell fixed-multiplier IPSP row |
| `rtl/bin_to_residue.sv` | binary-to-residue encoder |
| `rtl/rns_fir_channel.sv` | one residue channel (FIR filter) |
| `rtl/rns_block.sv` | `(KA*a + KB*b) mod MOD` decoder block |
| `rtl/rns_decoder.sv` | base-extension residue-to-binary decoder |
| `rtl/redundant_select.sv` | fault-free decoder selection |
| `rtl/fault_counter.sv` | fault monitor counter |
| `rtl/ft_rns_system.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches |
