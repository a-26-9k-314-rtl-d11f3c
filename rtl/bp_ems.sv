// bp_ems: Bjorck-Pereyra error magnitudes solver.
//
// Solves the Vandermonde system sum_i beta_i^j * gamma_i = S_j (j = 1..2t) for
// the error magnitudes gamma_i of the 2t candidate locators. The variables
// S_1..S_2t live in the syndrome register file (s_in): the solver reads them
// and overwrites them in place, one register per operation through
// wr_en/wr_idx/wr_val, following the three loops of the Bjorck-Pereyra
// algorithm:
//   1. k = 1..2t-1,  i = 2t down to k+1:  S_i <- S_i + beta_k * S_(i-1)
//   2. k = 2t-1..1:  i = k+1..2t:         S_i <- S_i / (beta_i + beta_(i-k))
//                    i = k..2t-1:         S_i <- S_i + S_(i+1)
//   3. k = 1..2t:                         S_k <- S_k / beta_k
// (subtraction is addition in GF(2^m)). That is 6t^2 - t operations, 852 for
// t = 12. Division is inversion followed by the one shared multiplier, so the
// datapath is one multiplier, one composite-field inversion and the adders
// for beta_i + beta_(i-k), S_i + beta_k*S_(i-1) and S_i + S_(i+1); the control
// logic walks (k, i) and steers the operand multiplexers. All of this follows
// the documented solver.
//
// Timing: start is sampled at a clock edge after which s_in holds the
// complete syndromes; the first operation runs in the next clock. Each
// operation takes 1 + PIPE clocks: with PIPE = 1 the inversion is registered
// and every operation, whether it divides or not, takes two clocks, giving
// 2*(6t^2 - t) clocks. A write issued in an operation's last clock lands at
// its closing edge, so the register file is always current. done pulses in
// the clock after the last write; the register file then holds the
// magnitudes. s_in (apart from the solver's own writes) and beta_in must stay
// stable while busy. This design's choices: the uniform two-clock operation
// and the start/done handshake.
module bp_ems
  import bch_pkg::*;
#(
  parameter int unsigned N2   = 2 * T_CORR,  // system size, 2t
  parameter bit          PIPE = 1'b1         // registered inversion
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  gf16_t                 s_in    [N2],
  input  gf16_t                 beta_in [N2],
  output logic                  wr_en,
  output logic [$clog2(N2)-1:0] wr_idx,
  output gf16_t                 wr_val,
  output logic                  busy,
  output logic                  done
);

  localparam int unsigned IW = $clog2(N2 + 2);
  localparam int unsigned XW = $clog2(N2);

  typedef enum logic [2:0] {IDLE, FWD, DIV, SUB, FIN} phase_e;

  phase_e        phase;
  logic [IW-1:0] k, i;     // 1-based loop indices of the algorithm
  logic          cyc;      // clock within an operation (PIPE = 1)
  logic          last_cyc;

  // 0-based register index of a 1-based loop index, clamped into range
  function automatic int unsigned ix(int signed v);
    if (v < 1)       return 0;
    else if (v > N2) return N2 - 1;
    else             return v - 1;
  endfunction

  gf16_t s_i, s_im1, s_ip1, s_k, b_k, b_i, b_ik;
  gf16_t inv_in, inv_out, mul_a, mul_b, prod;

  always_comb begin
    s_i   = s_in[ix(int'(i))];
    s_im1 = s_in[ix(int'(i) - 1)];
    s_ip1 = s_in[ix(int'(i) + 1)];
    s_k   = s_in[ix(int'(k))];
    b_k   = beta_in[ix(int'(k))];
    b_i   = beta_in[ix(int'(i))];
    b_ik  = beta_in[ix(int'(i) - int'(k))];
    inv_in = (phase == FIN) ? b_k : (b_i ^ b_ik);
    mul_a  = (phase == FWD) ? b_k : inv_out;
    unique case (phase)
      FWD:     mul_b = s_im1;
      FIN:     mul_b = s_k;
      default: mul_b = s_i;
    endcase
    unique case (phase)
      FWD:     wr_val = s_i ^ prod;
      SUB:     wr_val = s_i ^ s_ip1;
      default: wr_val = prod;
    endcase
    last_cyc = (PIPE == 1'b0) || cyc;
    wr_idx   = XW'((phase == FIN) ? ix(int'(k)) : ix(int'(i)));
    wr_en    = (phase != IDLE) && last_cyc;
  end

  composite_field_inversion #(.PIPE(PIPE)) u_inv (
    .clk, .rst_n, .a(inv_in), .y(inv_out)
  );

  gf16_multiplier u_mul (.a(mul_a), .b(mul_b), .p(prod));

  assign busy = (phase != IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase <= IDLE;
      k     <= '0;
      i     <= '0;
      cyc   <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (phase == IDLE) begin
        cyc <= 1'b0;
        if (start) begin
          phase <= FWD;
          k     <= IW'(1);
          i     <= IW'(N2);
        end
      end else if (!last_cyc) begin
        cyc <= 1'b1;
      end else begin
        cyc <= 1'b0;
        unique case (phase)
          FWD:
            if (i > k + 1'b1) i <= i - 1'b1;
            else if (k < IW'(N2 - 1)) begin
              k <= k + 1'b1;
              i <= IW'(N2);
            end else begin
              phase <= DIV;
              k     <= IW'(N2 - 1);
              i     <= IW'(N2);
            end
          DIV:
            if (i < IW'(N2)) i <= i + 1'b1;
            else begin
              phase <= SUB;
              i     <= k;
            end
          SUB:
            if (i < IW'(N2 - 1)) i <= i + 1'b1;
            else if (k > IW'(1)) begin
              phase <= DIV;
              k     <= k - 1'b1;
              i     <= k;          // (k-1) + 1
            end else begin
              phase <= FIN;
              k     <= IW'(1);
            end
          FIN:
            if (k < IW'(N2)) k <= k + 1'b1;
            else begin
              phase <= IDLE;
              done  <= 1'b1;
            end
          default: phase <= IDLE;
        endcase
      end
    end

  // A divisor is a difference of two distinct candidate locators, or a
  // locator itself: it can never be zero for a valid candidate set.
  a_nonzero_divisor: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == DIV || phase == FIN) && last_cyc |-> inv_in != '0);

endmodule
