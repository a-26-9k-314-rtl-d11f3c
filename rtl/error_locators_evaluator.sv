// error_locators_evaluator: picks the 2t least reliable positions of a frame
// and records, for each, its reliability R_ci, its error locator
// beta_ci = alpha^L and its location L_ci.
//
// Three register rows share one set of select signals (reliability part,
// error locator part, error location part). The rows are kept sorted by
// reliability, slot 0 the least reliable. For each input, COMPARE i tests
// input < R_ci; slot i then loads slot i-1 (the input is smaller than
// R_c(i-1), so everything shifts up one place), loads the input (it lies
// between R_c(i-1) and R_ci), or holds: a 2-bit SEL_i, and a 1-bit SEL_1 for
// the first slot. This insertion rule follows the documented architecture.
//
// Because bits arrive highest degree first, the locator of the current input
// is held in REG, which starts at alpha^(n-1) and is multiplied by the
// constant alpha^-1 after each bit; a down-counter starting at n-1 gives the
// location. No Chien search is needed afterwards.
//
// This design's choices: reliabilities are RW-bit magnitudes (smaller = less
// reliable); slots are cleared to the value 2^RW, above any input, so the
// first 2t inputs always enter; ties keep the earlier input ahead. clear
// (with or before the first input of a frame) restarts REG, the counter and
// the slots; an input in the same cycle as clear is the frame's first.
// Outputs are final in the cycle after the last input.
module error_locators_evaluator
  import bch_pkg::*;
#(
  parameter int unsigned N     = N_CODE,     // code length n
  parameter int unsigned N2    = 2 * T_CORR, // number of candidates, 2t
  parameter int unsigned RELW  = RW,         // reliability width
  parameter int unsigned LW    = $clog2(N)   // location width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  logic [RELW-1:0] in_rel,
  output logic [RELW:0]   rel  [N2],
  output gf16_t           beta [N2],
  output logic [LW-1:0]   loc  [N2]
);

  localparam gf16_t         BETA_FIRST = alpha_pow(N - 1);
  localparam gf16_t         ALPHA_INV  = alpha_pow((1 << M) - 2);
  localparam logic [RELW:0] EMPTY      = {1'b1, {RELW{1'b0}}};
  localparam logic [LW-1:0] LOC_FIRST  = LW'(N - 1);

  // neighbour below slot i (slot 0 never shifts)
  function automatic int unsigned prev(int unsigned i);
    return (i == 0) ? 0 : i - 1;
  endfunction

  typedef enum logic [1:0] {SEL_HOLD, SEL_INPUT, SEL_SHIFT} sel_e;

  gf16_t         beta_reg, beta_cur;  // REG
  logic [LW-1:0] cnt_reg,  cnt_cur;   // location counter
  logic [RELW:0] rel_cur  [N2];
  logic [N2-1:0] lt;
  sel_e          sel      [N2];

  always_comb begin
    beta_cur = clear ? BETA_FIRST : beta_reg;
    cnt_cur  = clear ? LOC_FIRST  : cnt_reg;
    for (int i = 0; i < N2; i++) begin
      rel_cur[i] = clear ? EMPTY : rel[i];
      lt[i]      = {1'b0, in_rel} < rel_cur[i];   // COMPARE i
    end
    for (int i = 0; i < N2; i++) begin
      if (i > 0 && lt[prev(i)]) sel[i] = SEL_SHIFT;
      else if (lt[i])       sel[i] = SEL_INPUT;
      else                  sel[i] = SEL_HOLD;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      beta_reg <= BETA_FIRST;
      cnt_reg  <= LOC_FIRST;
      for (int i = 0; i < N2; i++) begin
        rel[i]  <= EMPTY;
        beta[i] <= '0;
        loc[i]  <= '0;
      end
    end else if (in_valid) begin
      beta_reg <= gf16_mul(beta_cur, ALPHA_INV);
      cnt_reg  <= cnt_cur - 1'b1;
      for (int i = 0; i < N2; i++) begin
        unique case (sel[i])
          SEL_SHIFT: begin
            rel[i]  <= rel_cur[prev(i)];
            beta[i] <= beta[prev(i)];
            loc[i]  <= loc[prev(i)];
          end
          SEL_INPUT: begin
            rel[i]  <= {1'b0, in_rel};
            beta[i] <= beta_cur;
            loc[i]  <= cnt_cur;
          end
          default: rel[i] <= rel_cur[i];
        endcase
      end
    end else if (clear) begin
      beta_reg <= BETA_FIRST;
      cnt_reg  <= LOC_FIRST;
      for (int i = 0; i < N2; i++) rel[i] <= EMPTY;
    end

endmodule
