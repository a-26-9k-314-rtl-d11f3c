// tb_syndromes_calc: feeds random frames (highest degree first, with idle
// clocks in between) and compares every S_j with the direct sum
// sum over set bits r_l of alpha^(j*l). The second frame checks that clear
// restarts the accumulation, and the third that a frame starting right after
// the previous one (no idle clock) does too.
module tb_syndromes_calc;
  import tb_gf_ref_pkg::*;

  localparam int N2  = 24;
  localparam int LEN = 700;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        clear = 1'b0, in_valid = 1'b0, in_bit = 1'b0;
  logic [15:0] syn [N2];
  logic        wr_en = 1'b0;
  logic [4:0]  wr_idx = '0;
  logic [15:0] wr_val = '0;
  int checks = 0, failures = 0;

  syndromes_calc #(.N2(N2)) dut (.clk, .rst_n, .clear, .in_valid, .in_bit,
                                 .wr_en, .wr_idx, .wr_val, .syn);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic bits [LEN];

  task automatic send_frame(int len, int errs_gap);
    for (int n = 0; n < len; n++) begin
      bits[n] = 1'($urandom);
      @(negedge clk);
      // occasional idle clocks inside the frame
      while (errs_gap != 0 && ($urandom % 5) == 0) begin
        in_valid = 1'b0;
        clear    = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_bit   = bits[n];
      clear    = (n == 0);
    end
    @(negedge clk);
    in_valid = 1'b0;
    clear    = 1'b0;
  endtask

  task automatic check_frame(int len);
    logic [15:0] exp;
    for (int j = 1; j <= N2; j++) begin
      exp = '0;
      for (int n = 0; n < len; n++)
        if (bits[n]) exp ^= ref_alpha(longint'(j) * longint'(len - 1 - n));
      checks++;
      if (syn[j-1] !== exp) begin
        failures++;
        if (failures < 10) $display("S_%0d = %h, expected %h", j, syn[j-1], exp);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    send_frame(LEN, 1);
    check_frame(LEN);
    repeat (3) @(negedge clk);
    // write port: each write changes the addressed register only
    for (int n = 0; n < 60; n++) begin
      logic [15:0] prev_s [N2];
      int idx;
      prev_s = syn;
      idx = $urandom_range(N2 - 1, 0);
      @(negedge clk);
      wr_en  = 1'b1;
      wr_idx = 5'(idx);
      wr_val = 16'($urandom);
      @(negedge clk);
      wr_en = 1'b0;
      for (int j = 0; j < N2; j++) begin
        checks++;
        if (syn[j] !== ((j == idx) ? wr_val : prev_s[j])) begin
          failures++;
          if (failures < 10) $display("write %0d: S_%0d = %h", idx, j + 1, syn[j]);
        end
      end
    end
    send_frame(LEN / 2, 0);
    check_frame(LEN / 2);
    send_frame(LEN, 0);
    check_frame(LEN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
