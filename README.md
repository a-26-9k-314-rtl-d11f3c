# Soft-decision BCH decoder for the DVB-S2 (32400, 32208) code

This is a BCH decoder that uses the reliabilities handed over by an inner
(LDPC) decoder. It does not run the usual chain of key-equation solver
(Berlekamp–Massey) plus Chien search over the whole frame. Instead it assumes
that the errors sit among the **2t least reliable bits** of the frame. It then
solves directly for which of those bits are wrong.

With 2t candidate positions whose locators β_i = α^L_i are known, the 2t
syndromes give a square linear system:

    sum_i  β_i^j · γ_i  =  S_j          j = 1 .. 2t

The matrix is a Vandermonde matrix in the β_i. The unknown γ_i is the error
magnitude at candidate i. For a binary BCH code a correctable frame has every
γ_i equal to 0 or 1, and the bits with γ_i = 1 are the errors. So the decoder
can correct up to 2t errors, not just t, provided all of them are among the
candidates. If one error lies outside the candidates, the system has no 0/1
solution and the frame is reported as uncorrectable.

The default configuration is the DVB-S2 normal-frame, rate-1/2 outer code:

| quantity | value |
|---|---|
| n, k, t | 32400, 32208, 12 |
| field | GF(2^16), p(x) = x^16 + x^5 + x^3 + x^2 + 1 |
| candidates / syndromes | 2t = 24 |
| decoding latency | n + 2(6t² − t) = 32400 + 1704 = 34104 clocks |
| frame period | 34105 clocks; 32208 / 34105 × 333 MHz ≈ 314.5 Mbit/s |

## Data flow

```
            +--> syndromes_calc ------------ S_1..S_2t ------+
 bit, rel --+                                                 v
            +--> error_locators_evaluator -- β_1..β_2t --> bp_ems --> γ_1..γ_2t
            |                                L_1..L_2t ------------+    |
            +--> frame_fifo (hard bits) ------------------> error_corrector --> corrected bits
```

`soft_bch_decoder` (the top) wires these blocks together. A frame enters at
one bit per clock, highest-degree coefficient r_{n-1} first. Three things
happen while it arrives:

* the hard bit is written into `frame_fifo`;
* `syndromes_calc` updates S_j ← S_j·α^j + r for j = 1..24, using one
  constant multiplier per syndrome;
* `error_locators_evaluator` decides whether this bit is among the 24 least
  reliable seen so far.

None of these need a pass over the frame after the last bit arrives. The
candidate locators come out of the sorter directly, so there is no Chien
search. The only serial work left is the solver: about 5 % of a frame time.

## The candidate sorter (`error_locators_evaluator`)

This block has three register rows of 24 entries each:

* the reliability row holds the reliabilities R_1 ≤ R_2 ≤ … ≤ R_24;
* the locator row holds β = α^L for each entry;
* the location row holds the location L of each entry.

Each slot i has a comparator that tests `input < R_i`. From its own
comparator and its neighbour's, slot i makes a 2-bit choice, and all three
rows make the same choice:

* **shift**: the input is below R_{i-1}, so slot i takes the contents of
  slot i-1;
* **insert**: the input lies between R_{i-1} and R_i, so slot i takes the
  input;
* **hold**: otherwise.

Slot 1 can only insert or hold. The result is an insertion sort that
completes one insertion every clock. Equal reliabilities keep the earlier
bit ahead. Empty slots are cleared to 2^RELW, which is one more than the
largest reliability, so the first 24 bits always get in.

The locator of the current bit lives in a register REG. REG starts a frame at
α^(n-1) and is multiplied by the constant α^-1 after each bit. A down-counter
that starts at n-1 gives the location L, which is the bit's degree in R(x).

## The Björck–Pereyra solver (`bp_ems`)

Gaussian elimination on a 24×24 system would need O(n³) operations and a
large array of multipliers. The Björck–Pereyra algorithm solves a Vandermonde
system in place on the right-hand side, using only the vector of β_i. The
solver works in place on the 24 syndrome registers of `syndromes_calc`,
through a one-register write port:

```
for k = 1 .. 2t-1:   for i = 2t downto k+1:  S_i ← S_i + β_k·S_{i-1}
for k = 2t-1 .. 1:   for i = k+1 .. 2t:      S_i ← S_i / (β_i + β_{i-k})
                     for i = k .. 2t-1:      S_i ← S_i + S_{i+1}
for k = 1 .. 2t:                             S_k ← S_k / β_k
```

Subtraction is addition in GF(2^m). That is 276 + 552 + 24 = 852 = 6t² − t
operations for t = 12. When the loops finish, S_i holds γ_i.

Each operation is at most one multiplication, one inversion and one
addition. The datapath therefore has:

* one GF(2^16) multiplier (`gf16_multiplier`);
* one GF(2^16) inverter (`composite_field_inversion`);
* three adders: β_i + β_{i-k}, S_i + β_k·S_{i-1} and S_i + S_{i+1}.

Division is done as inversion followed by the shared multiplier. The
controller walks (k, i) through the loops above. It steers 24-to-1
multiplexers that select S_{i-1}, S_i, S_{i+1}, S_k, β_k, β_i and β_{i-k}, and
it writes one result per operation.

With `PIPE = 1` (the default) the inverter has a pipeline register. Each
operation then takes two clocks, divide or not, so the solver takes
2 × 852 = 1704 clocks. That doubles the solver time but allows a much faster
clock, and the solver is only a few percent of the frame time. With
`PIPE = 0` each operation takes one clock (852 in all).

A divisor is either a difference of two distinct locators or a locator
itself, so it is never zero. An assertion in `bp_ems` checks this.

## Inversion in the composite field (`composite_field_inversion`)

A lookup table for inversion in GF(2^16) would be far too large. Instead the
block views GF(2^16) as GF((2^8)²). An element is b·x + c with bytes b and c,
and x² = x + ψ. Then

    1 / (b·x + c) = (ψ·b² + b·c + c²)^-1 · (b·x + b + c)

so a single GF(2^8) inversion is enough. The GF(2^8) inverse is computed as
d^254 with a chain of multipliers. The pipeline register sits after the norm
ψ·b² + b·c + c².

The constants are set in `bch_pkg`:

* GF(2^8) is generated by x^8 + x^4 + x^3 + x^2 + 1.
* ψ = 0x20. It is the smallest byte of trace 1, which is what makes
  x² + x + ψ irreducible.
* `TO_COMPOSITE[i]` is θ^i, where θ = 0x334 is the smallest composite element
  with p(θ) = 0. This map is a field isomorphism.
* `FROM_COMPOSITE` is the inverse of that linear map.

To use another field polynomial, redo this search and replace the two
tables. The testbenches check every inverse against a^(2^16−2) computed
directly, so a wrong table shows up at once.

## Frame timing and interface (`soft_bch_decoder`)

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_ready` | in/out | input handshake: a bit is taken when both are high |
| `in_bit` | in | hard decision, r_{n-1} first |
| `in_rel[5:0]` | in | reliability (for example \|LLR\|); smaller means less reliable |
| `dec_done`, `dec_fail` | out | a 1-clock pulse when the frame's magnitudes are known, and whether the frame was uncorrectable |
| `out_valid`, `out_bit` | out | corrected frame, c_{n-1} first, one bit per clock |
| `out_first`, `out_last` | out | framing of the output |
| `out_fail` | out | the frame being output was uncorrectable and leaves unchanged |

A frame goes through the decoder as follows:

1. The input phase takes n accepted bits. `in_valid` may have gaps, and
   each gap simply delays the frame.
2. The last bit starts the solver. Its first operation runs in the next
   clock, on the now-complete syndromes, so no clock is lost. `in_ready`
   then drops.
3. The solver takes 1704 clocks.
4. `dec_done` comes n + 1704 = 34104 clocks after the clock of the first bit,
   if there were no gaps. `dec_fail` is valid in the same clock.
5. The corrector then latches the 24 locations together with one flag per
   location (γ = 1). If any γ is neither 0 nor 1, it sets the fail flag and
   disables all flips.
6. The FIFO is read out with a matching down-counter. The output starts 3
   clocks after `dec_done`.

`in_ready` rises again in the clock after `dec_done`. The next frame's input
therefore overlaps the previous frame's output, and the FIFO, one frame deep,
never overflows: each write of the new frame follows a read of the old one.
A new frame can start every n + 1705 clocks, so throughput is k / 34105 bits
per clock.

## Parameters

| parameter | where | default | notes |
|---|---|---|---|
| `N` | top, evaluator, FIFO `DEPTH` | 32400 | code length |
| `T` (`N2 = 2T`) | top, all | 12 | candidates and syndromes are 2T |
| `RELW` | top, evaluator | 6 | reliability width |
| `PIPE` | top, `bp_ems`, inverter | 1 | register in the inverter, two clocks per solver operation |
| `M`, field polynomials | `bch_pkg` | 16 | fixed: changing them needs new composite-field tables |

A shortened code of any length up to 2^16 − 1 works: set `N`. The first
locator α^(N−1) is computed at elaboration.

## Where this design makes its own choices

* **Register count.** The design holds 8t word registers: R, β and L in the
  sorter, and S, which serves first as the syndrome accumulators and then
  as the solver's variables. Because of this sharing, a new frame cannot
  enter while the solver runs. On top of these, the output corrector keeps
  its own copy of the 24 locations and their flip flags. That copy lets the
  next frame enter while the previous one is read out.
* **Frame period.** The frame period is one clock longer than the latency:
  `in_ready` returns only in the clock after `dec_done`. Otherwise the full
  FIFO would be written before its first read.
* **FIFO and output correction.** These are built here as RTL, with the FIFO
  as a 32400-bit memory. A chip may instead leave this buffer to the
  surrounding system.
* **Failure handling.** An uncorrectable frame passes through unchanged and
  is flagged.
* **Interface details.** The reliability format and width, the handshakes
  and the tie rule between equal reliabilities are this design's choices.
* **Not included.**
  * An exhaustive search over 0/1 magnitudes, which is a cheaper option for
    t = 1 or 2.
  * Any support for a different field, such as GF(2^8) codes like (255, 239).
  * The LDPC decoder that produces the reliabilities, and the chip's pads.

## Verification

Each block has a self-checking testbench in `tb/`. The references are in
`tb_gf_ref_pkg`, which is written independently of the RTL: a
shift-and-reduce multiplier, exponentiation, inversion as a^(2^16−2), and
the BCH generator polynomial built as the product of the minimal polynomials
of α, α³, …, α²³.

| testbench | what it checks |
|---|---|
| `tb_gf16_multiplier` | 3000+ products against the reference |
| `tb_composite_field_inversion` | 4000 operands, pipelined and combinational versions, against a^(2^16−2) |
| `tb_syndromes_calc` | three frames, with gaps and back-to-back, against direct evaluation of R(α^j); the solver's write port |
| `tb_error_locators_evaluator` | three full 32400-bit frames (heavy ties, wide range, back-to-back) against a reference selection of the 24 smallest |
| `tb_bp_ems` | 16 random Vandermonde systems with binary and arbitrary magnitudes, on a register file held by the testbench; the exact cycle count is 1704 with `PIPE=1` and 852 with `PIPE=0` |
| `tb_frame_fifo` | pointer wrap-around, full and empty, simultaneous read and write when full, full frame size |
| `tb_error_corrector` | flips at the flagged locations only; fail disables flips |
| `tb_soft_bch_decoder` | end to end at full size with default parameters (see below) |

`tb_soft_bch_decoder` encodes five real codewords with the DVB-S2 t = 12
generator and decodes them:

* a clean frame;
* a frame with 12 errors;
* a frame with 24 errors, all among the candidates;
* an uncorrectable frame, which must come out unchanged with the fail flag
  set;
* a frame with gaps in its input;
* six channel-like frames. Their errors fall mostly on the weakest bits, and
  sometimes one falls on a strong bit. The testbench makes its own
  selection of the 24 least reliable bits. From it, the testbench predicts
  whether each frame must be corrected or flagged.

A second testbench, `tb_soft_bch_decoder_short`, runs the same frame types on
a shortened t = 4 code (n = 3000) with `PIPE = 0`, plus 20 channel-like
frames. Its latency is n + 6t² − t = 3092 clocks.

`tb_soft_bch_decoder` checks every output bit, the flags and the latency of
each frame (34104 clocks). It also checks the period of back-to-back frames (34105 clocks) and
counts the overlap of input with output. The test runs in about 15 seconds.

To run a testbench with Verilator, for example the top-level one:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/bch_pkg.sv tb/tb_gf_ref_pkg.sv $(ls rtl/*.sv | grep -v bch_pkg) \
  tb/tb_soft_bch_decoder.sv --top-module tb_soft_bch_decoder -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. A
watchdog ends a testbench that hangs.

The RTL passes Verilator lint and the slang front end without errors, and
synthesizes with Yosys. The top with default parameters maps to about 1,800
flip-flops plus the 32400-bit FIFO memory.

What has not been checked: timing closure at any clock rate, and equivalence
with any particular silicon. How good the decoding is depends on how the
inner decoder's reliabilities are quantized. That was not simulated here;
the tests place the errors among the least reliable bits by construction.
