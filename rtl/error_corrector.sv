// error_corrector: the output XOR of the decoder, C(x) = R(x) + E(x).
//
// When the error magnitudes of a frame are known (load), the corrector keeps
// the 2t candidate locations L_ci together with one flag per candidate,
// set where gamma_ci equals 1. The buffered hard bits then stream through
// with their location; a bit is inverted when a flagged candidate has its
// location. That inversion rule is the documented one. The decoder's
// magnitudes of a correctable frame are all 0 or 1; any other value means
// some error lay outside the candidate set, which the documented method
// cannot correct. In that case (this design's choice) fail is raised and no
// bit is changed.
//
// Timing: out_valid/out_bit/out_loc follow in_valid/in_bit/in_loc by one
// clock. fail and the flags hold from load until the next load; gamma_bad is
// the combinational verdict on gamma_in, for reporting in the load clock.
module error_corrector
  import bch_pkg::*;
#(
  parameter int unsigned N2 = 2 * T_CORR,      // number of candidates, 2t
  parameter int unsigned LW = $clog2(N_CODE)   // location width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [LW-1:0] loc_in   [N2],
  input  gf16_t         gamma_in [N2],
  input  logic          in_valid,
  input  logic          in_bit,
  input  logic [LW-1:0] in_loc,
  output logic          out_valid,
  output logic          out_bit,
  output logic [LW-1:0] out_loc,
  output logic          fail,
  output logic          gamma_bad
);

  logic [LW-1:0] loc_q [N2];
  logic [N2-1:0] flip_q;
  logic [N2-1:0] is_one, is_zero;
  logic          hit;

  always_comb begin
    for (int i = 0; i < N2; i++) begin
      is_one[i]  = (gamma_in[i] == gf16_t'(1));
      is_zero[i] = (gamma_in[i] == '0);
    end
    gamma_bad = ~&(is_one | is_zero);
    hit = 1'b0;
    for (int i = 0; i < N2; i++)
      if (flip_q[i] && loc_q[i] == in_loc) hit = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      flip_q    <= '0;
      fail      <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_loc   <= '0;
      for (int i = 0; i < N2; i++) loc_q[i] <= '0;
    end else begin
      if (load) begin
        fail   <= gamma_bad;
        flip_q <= gamma_bad ? '0 : is_one;
        for (int i = 0; i < N2; i++) loc_q[i] <= loc_in[i];
      end
      out_valid <= in_valid;
      out_bit   <= in_bit ^ (in_valid & hit);
      out_loc   <= in_loc;
    end

endmodule
