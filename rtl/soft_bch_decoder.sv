// soft_bch_decoder: soft-decision BCH decoder for the DVB-S2 (32400, 32208),
// t = 12 code over GF(2^16), decoding with error magnitudes instead of a
// key-equation solver and Chien search.
//
// A frame arrives serially, one bit per clock, highest-degree coefficient
// first, each bit with a reliability (the magnitude of the inner decoder's
// soft value; smaller is less reliable). While it arrives, three things
// happen in parallel: the hard bits go into the FIFO, syndromes_calc forms
// S_1..S_2t, and error_locators_evaluator keeps the 2t least reliable
// positions with their locators beta = alpha^L and locations L. After the last
// bit, bp_ems solves the 2t x 2t Vandermonde system for the magnitudes gamma;
// positions with gamma = 1 are the errors, and error_corrector inverts them
// as the FIFO is read out. Errors outside the 2t candidates cannot be
// corrected: the frame then leaves unchanged with out_fail set. The split
// into syndromes, candidate selection, magnitude solving and a buffered XOR,
// the solver working in place on the syndrome registers (8t word registers:
// R, beta, L and S) and the latency follow the published decoder; the
// behaviour on failure is this design's.
//
// Timing (defaults, PIPE = 1): a frame takes n input clocks plus
// 2*(6t^2 - t) = 1704 solver clocks, n + 1704 = 34104 in all, the documented
// decoding latency: the solver is started by the last bit, runs its first
// operation in the next clock, and dec_done/dec_fail are valid
// n + 1704 clocks after the clock of the first bit. in_ready is low from the
// clock after the last bit until the clock after dec_done, so back-to-back
// frames follow every n + 1705 clocks. The corrected frame then streams
// out at one bit per clock (out_first on its first bit, out_last on its
// last), starting 3 clocks after dec_done, while the next frame may already
// be entering.
//
// Interface choices of this design: the valid/ready input handshake, a
// 6-bit reliability, the output framing flags and the fail flag.
module soft_bch_decoder
  import bch_pkg::*;
#(
  parameter int unsigned N    = N_CODE,     // code length n
  parameter int unsigned T    = T_CORR,     // correctable errors t
  parameter int unsigned RELW = RW,         // reliability width
  parameter bit          PIPE = 1'b1,       // registered inversion in the solver
  localparam int unsigned N2  = 2 * T,
  localparam int unsigned LW  = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  // soft input, one code bit per accepted clock
  input  logic            in_valid,
  input  logic            in_bit,
  input  logic [RELW-1:0] in_rel,
  output logic            in_ready,
  // decoding result of a frame
  output logic            dec_done,
  output logic            dec_fail,
  // corrected output stream
  output logic            out_valid,
  output logic            out_bit,
  output logic            out_first,
  output logic            out_last,
  output logic            out_fail
);

  typedef enum logic {S_INPUT, S_SOLVE} state_e;

  state_e        state;
  logic [LW-1:0] in_cnt;
  logic          accept, first_in, last_in;

  assign in_ready = (state == S_INPUT);
  assign accept   = in_valid & in_ready;
  assign first_in = accept & (in_cnt == '0);
  assign last_in  = accept & (in_cnt == LW'(N - 1));

  // ---------------------------------------------------------------- input side
  gf16_t           syn  [N2];   // syndromes, then the solver's variables
  logic            s_wr_en;
  logic [$clog2(N2)-1:0] s_wr_idx;
  gf16_t           s_wr_val;
  logic [RELW:0]   rel  [N2];
  gf16_t           beta [N2];
  logic [LW-1:0]   loc  [N2];

  syndromes_calc #(.N2(N2)) u_syn (
    .clk, .rst_n, .clear(first_in), .in_valid(accept), .in_bit,
    .wr_en(s_wr_en), .wr_idx(s_wr_idx), .wr_val(s_wr_val), .syn
  );

  error_locators_evaluator #(.N(N), .N2(N2), .RELW(RELW), .LW(LW)) u_ele (
    .clk, .rst_n, .clear(first_in), .in_valid(accept), .in_rel,
    .rel, .beta, .loc
  );

  // ---------------------------------------------------------------- solver
  logic  ems_start, ems_busy, ems_done;

  assign ems_start = last_in;

  bp_ems #(.N2(N2), .PIPE(PIPE)) u_ems (
    .clk, .rst_n, .start(ems_start), .s_in(syn), .beta_in(beta),
    .wr_en(s_wr_en), .wr_idx(s_wr_idx), .wr_val(s_wr_val),
    .busy(ems_busy), .done(ems_done)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state  <= S_INPUT;
      in_cnt <= '0;
    end else begin
      if (accept) in_cnt <= last_in ? '0 : in_cnt + 1'b1;
      unique case (state)
        S_INPUT: if (last_in) state <= S_SOLVE;
        S_SOLVE: if (ems_done) state <= S_INPUT;
        default: state <= S_INPUT;
      endcase
    end

  // ---------------------------------------------------------------- output side
  logic          rd_en, rd_active, rd_first, rd_last;
  logic [LW-1:0] rd_loc;
  logic          fifo_bit;
  logic [$clog2(N+1)-1:0] fifo_count;
  logic          d_valid, d_first, d_last;
  logic [LW-1:0] d_loc;
  logic          c_valid;
  logic [LW-1:0] c_loc;

  frame_fifo #(.DEPTH(N), .WIDTH(1)) u_fifo (
    .clk, .rst_n, .wr_en(accept), .wr_data(in_bit),
    .rd_en, .rd_data(fifo_bit), .count(fifo_count)
  );

  // read the frame out, location n-1 first, once its magnitudes are known
  assign rd_en    = rd_active;
  assign rd_first = rd_active & (rd_loc == LW'(N - 1));
  assign rd_last  = rd_active & (rd_loc == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_loc    <= '0;
      d_valid   <= 1'b0;
      d_first   <= 1'b0;
      d_last    <= 1'b0;
      d_loc     <= '0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (ems_done) begin
        rd_active <= 1'b1;
        rd_loc    <= LW'(N - 1);
      end else if (rd_active) begin
        rd_active <= ~rd_last;
        rd_loc    <= rd_loc - 1'b1;
      end
      d_valid   <= rd_en;
      d_first   <= rd_first;
      d_last    <= rd_last;
      d_loc     <= rd_loc;
      out_first <= d_first;
      out_last  <= d_last;
    end

  error_corrector #(.N2(N2), .LW(LW)) u_cor (
    .clk, .rst_n, .load(ems_done), .loc_in(loc), .gamma_in(syn),
    .in_valid(d_valid), .in_bit(fifo_bit), .in_loc(d_loc),
    .out_valid(c_valid), .out_bit, .out_loc(c_loc), .fail(out_fail),
    .gamma_bad(dec_fail)
  );

  assign out_valid = c_valid;

  assign dec_done = ems_done;

  a_solver_idle_on_input: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> !ems_busy);
  // the FIFO never holds more than one frame
  a_fifo_one_frame: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_count <= ($clog2(N+1))'(N));
  // output framing agrees with the bit locations
  a_out_first_loc: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (out_first == (c_loc == LW'(N - 1))) && (out_last == (c_loc == '0)));

endmodule
