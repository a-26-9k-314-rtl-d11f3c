// tb_bp_ems: builds random Vandermonde systems, S_j = sum_i gamma_i*beta_i^j
// (j = 1..2t) with distinct non-zero locators, runs the solver and compares
// gamma with the magnitudes used. The testbench holds the two register files
// S_1..S_2t the solvers work on and applies their writes. Magnitudes are binary (as in a BCH code,
// with 0 to 2t errors among the candidates) or arbitrary field elements. It
// also checks the cycle count: 2*(6t^2 - t) = 1704 operation clocks for
// t = 12 with the registered inversion, 852 without, after the load clock.
module tb_bp_ems;
  import tb_gf_ref_pkg::*;

  localparam int N2 = 24;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0;
  logic [15:0] syn [N2], beta [N2];
  logic [15:0] gamma_p [N2], gamma_c [N2];   // register files
  logic        busy_p, done_p, busy_c, done_c;
  logic        we_p, we_c;
  logic [4:0]  wi_p, wi_c;
  logic [15:0] wv_p, wv_c;
  bit          load_files = 1'b0;
  int checks = 0, failures = 0;

  bp_ems                         dut_p (.clk, .rst_n, .start, .s_in(gamma_p), .beta_in(beta),
                                        .wr_en(we_p), .wr_idx(wi_p), .wr_val(wv_p),
                                        .busy(busy_p), .done(done_p));
  bp_ems #(.N2(N2), .PIPE(1'b0)) dut_c (.clk, .rst_n, .start, .s_in(gamma_c), .beta_in(beta),
                                        .wr_en(we_c), .wr_idx(wi_c), .wr_val(wv_c),
                                        .busy(busy_c), .done(done_c));

  always @(posedge clk) begin
    if (load_files) begin
      gamma_p <= syn;
      gamma_c <= syn;
    end
    if (we_p) gamma_p[wi_p] <= wv_p;
    if (we_c) gamma_c[wi_c] <= wv_c;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] g [N2];
  int cyc, t_done_p, t_done_c;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic run_case(int nerr, bit binary);
    bit used;
    // distinct non-zero locators
    for (int i = 0; i < N2; i++) begin
      do begin
        beta[i] = 16'($urandom);
        used = (beta[i] == 0);
        for (int q = 0; q < i; q++) if (beta[q] == beta[i]) used = 1;
      end while (used);
    end
    for (int i = 0; i < N2; i++) g[i] = '0;
    for (int e = 0; e < nerr; e++) g[$urandom_range(N2 - 1, 0)] = binary ? 16'h1 : 16'($urandom);
    for (int j = 1; j <= N2; j++) begin
      syn[j-1] = '0;
      for (int i = 0; i < N2; i++) syn[j-1] ^= ref_mul(g[i], ref_pow(beta[i], j));
    end
    // the syndromes land in the register files at the same edge that
    // samples start, as the last frame bit does in the decoder
    @(negedge clk);
    start = 1'b1;
    load_files = 1'b1;
    @(negedge clk);
    start = 1'b0;
    load_files = 1'b0;
    t_done_p = -1;
    t_done_c = -1;
    // start was sampled at edge cyc-1; count edges until done is seen high
    fork
      begin
        int t0 = cyc;
        while (!done_p) @(negedge clk);
        t_done_p = cyc - t0;
      end
      begin
        int t0 = cyc;
        while (!done_c) @(negedge clk);
        t_done_c = cyc - t0;
      end
    join
    checks += 2;
    if (t_done_p != 2 * (6 * (N2/2) * (N2/2) - N2/2)) begin
      failures++;
      $display("pipelined solver took %0d clocks", t_done_p);
    end
    if (t_done_c != 6 * (N2/2) * (N2/2) - N2/2) begin
      failures++;
      $display("combinational solver took %0d clocks", t_done_c);
    end
    for (int i = 0; i < N2; i++) begin
      checks += 2;
      if (gamma_p[i] !== g[i]) begin
        failures++;
        if (failures < 10) $display("pipelined gamma_%0d = %h, expected %h", i + 1, gamma_p[i], g[i]);
      end
      if (gamma_c[i] !== g[i]) begin
        failures++;
        if (failures < 10) $display("combinational gamma_%0d = %h, expected %h", i + 1, gamma_c[i], g[i]);
      end
    end
  endtask

  initial begin
    cyc = 0;
    for (int i = 0; i < N2; i++) begin
      syn[i]     = '0;
      beta[i]    = 16'(i + 1);
      gamma_p[i] = '0;
      gamma_c[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_case(0, 1'b1);
    run_case(1, 1'b1);
    run_case(12, 1'b1);
    run_case(N2, 1'b1);
    for (int n = 0; n < 8; n++) run_case($urandom_range(N2, 1), 1'b1);
    for (int n = 0; n < 4; n++) run_case(N2, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
