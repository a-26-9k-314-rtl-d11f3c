// syndromes_calc: the 2t syndromes S_j = R(alpha^j), j = 1..2t, of one frame,
// held in the register file that the error magnitudes solver then updates in
// place.
//
// The received hard bits arrive one per clock, highest-degree coefficient
// r_{n-1} first, so each syndrome is evaluated by Horner's rule:
// S_j <- S_j * alpha^j + r. That is one constant multiplier per syndrome
// (2t in all), as in the documented decoder; all 2t syndromes are computed
// directly rather than deriving the even ones by squaring. After the frame,
// the same 2t registers serve as the solver's variables S_1..S_2t, which it
// overwrites through the write port (wr_en, wr_idx, wr_val) until they hold
// the error magnitudes; sharing them keeps the decoder at 8t word registers.
//
// Interface: in_valid/in_bit deliver a bit; clear (asserted with or before
// the first bit of a frame) restarts the accumulation, and a bit presented in
// the same cycle as clear becomes the first coefficient. syn[j-1] holds S_j
// and is final in the cycle after the last bit was accepted. A write through
// the port takes effect at the next edge; it must not coincide with in_valid
// or clear.
module syndromes_calc
  import bch_pkg::*;
#(
  parameter int unsigned N2 = 2 * T_CORR,      // number of syndromes, 2t
  localparam int unsigned XW = $clog2(N2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic          in_bit,
  input  logic          wr_en,
  input  logic [XW-1:0] wr_idx,
  input  gf16_t         wr_val,
  output gf16_t         syn [N2]
);

  for (genvar j = 0; j < N2; j++) begin : g_syn
    localparam gf16_t ALPHA_J = alpha_pow(j + 1);
    gf16_t acc;

    always_comb acc = clear ? '0 : syn[j];

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)
        syn[j] <= '0;
      else if (in_valid)
        syn[j] <= gf16_mul(acc, ALPHA_J) ^ gf16_t'(in_bit);
      else if (clear)
        syn[j] <= '0;
      else if (wr_en && wr_idx == XW'(j))
        syn[j] <= wr_val;
  end

  a_write_alone: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> !in_valid && !clear);

endmodule
