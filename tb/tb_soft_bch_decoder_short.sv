// tb_soft_bch_decoder_short: the end-to-end test of tb_soft_bch_decoder on
// a second configuration: the code shortened to n = 3000, t = 4 (k = 2936,
// 8 candidates), with the solver's inversion unregistered (PIPE = 0), so
// each solver operation takes one clock and the latency is
// n + 6t^2 - t = 3092 clocks. Frames are codewords of the shortened t = 4
// code: clean, t errors, 2t errors, uncorrectable, stalled input, then
// channel-like frames whose outcome the testbench predicts; the frame
// period is checked at latency + 1.
module tb_soft_bch_decoder_short;
  import tb_gf_ref_pkg::*;

  localparam int  N    = 3000;
  localparam int  T    = 4;
  localparam bit  PIPE = 1'b0;
  localparam int  PAR  = 16 * T;                 // parity bits
  localparam int  K    = N - PAR;                
  localparam int  N2   = 2 * T;
  localparam int  CHAN_FRAMES = 20;
  localparam int  LATENCY = N + (PIPE ? 2 : 1) * (6 * T * T - T);   // 3092

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_bit = 1'b0;
  logic [5:0] in_rel = '0;
  logic       in_ready, dec_done, dec_fail;
  logic       out_valid, out_bit, out_first, out_last, out_fail;
  int checks = 0, failures = 0;

  soft_bch_decoder #(.N(N), .T(T), .PIPE(PIPE)) dut (.clk, .rst_n, .in_valid, .in_bit, .in_rel, .in_ready,
                        .dec_done, .dec_fail, .out_valid, .out_bit, .out_first,
                        .out_last, .out_fail);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bookkeeping
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_clean = 0, n_corrected = 0, n_full2t = 0, n_fail = 0, n_stall = 0, n_overlap = 0;

  always @(posedge clk) if (in_valid && in_ready && out_valid) n_overlap++;

  // expected output frames and fail flags, in order
  bit exp_frames [$][];
  bit exp_fail   [$];
  int first_cyc  [$];
  int exp_lat    [$];

  // ------------------------------------------------------------ encoder
  logic [255:0] gen;

  function automatic void encode(ref bit cw [N]);
    logic [PAR-1:0] r;
    bit fb;
    r = '0;
    for (int n = 0; n < K; n++) begin
      cw[n] = 1'($urandom);
      fb = cw[n] ^ r[PAR-1];
      r = (r << 1) ^ (fb ? gen[PAR-1:0] : '0);
    end
    for (int n = 0; n < PAR; n++) cw[K + n] = r[PAR - 1 - n];
  endfunction

  // ------------------------------------------------------------ stimulus
  bit cw   [N];
  bit rx   [N];
  int rel  [N];
  int cand [N2];

  task automatic send_frame(int n_in, bit outside, bit stall);
    bit used;
    bit expect_bits [];
    int gaps;
    encode(cw);
    for (int n = 0; n < N; n++) begin
      rx[n]  = cw[n];
      rel[n] = $urandom_range(63, 10);
    end
    for (int i = 0; i < N2; i++) begin
      do begin
        cand[i] = $urandom_range(N - 1, 0);
        used = 0;
        for (int q = 0; q < i; q++) if (cand[q] == cand[i]) used = 1;
      end while (used);
      rel[cand[i]] = $urandom_range(9, 0);
    end
    for (int i = 0; i < n_in; i++) rx[cand[i]] = ~rx[cand[i]];
    if (outside) begin
      int p;
      do p = $urandom_range(N - 1, 0); while (rel[p] < 10);
      rx[p] = ~rx[p];
    end
    expect_bits = new[N];
    for (int n = 0; n < N; n++) expect_bits[n] = outside ? rx[n] : cw[n];
    exp_frames.push_back(expect_bits);
    exp_fail.push_back(outside);
    if (outside)         n_fail++;
    else if (n_in == 0)  n_clean++;
    else                 n_corrected++;
    if (n_in == N2 && !outside) n_full2t++;
    if (stall) n_stall++;
    gaps = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while (!in_ready || (stall && ($urandom % 9) == 0)) begin
        in_valid = 1'b0;
        if (n > 0) gaps++;   // idle clocks inside the frame add to its latency
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_bit   = rx[n];
      in_rel   = 6'(rel[n]);
      if (n == 0) first_cyc.push_back(cyc);
    end
    exp_lat.push_back(LATENCY + gaps);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // Channel-like frame: N2 + 4 weak bits with reliability r in 0..7, each in
  // error with probability (7 - r)/10, and occasional errors among strong
  // bits. The
  // expected outcome comes from an independent selection of the 2t least
  // reliable positions (earliest first among equals): corrected if every
  // error is among them, otherwise flagged and passed through.
  int n_chan_ok = 0, n_chan_fail = 0;

  task automatic send_channel_frame(int p_strong_err_per_mille);
    bit expect_bits [];
    bit is_sel [N];
    bit ok;
    int cnt;
    encode(cw);
    for (int n = 0; n < N; n++) begin
      rx[n]     = cw[n];
      rel[n]    = $urandom_range(63, 8);
      is_sel[n] = 0;
    end
    for (int w = 0; w < N2 + 4; w++) begin
      int p = $urandom_range(N - 1, 0);
      rel[p] = $urandom_range(7, 0);
      if ($urandom_range(9, 0) < 7 - rel[p]) rx[p] = ~cw[p];
    end
    if ($urandom_range(999, 0) < p_strong_err_per_mille) begin
      int p;
      do p = $urandom_range(N - 1, 0); while (rel[p] < 8);
      rx[p] = ~cw[p];
    end
    cnt = 0;
    for (int v = 0; v < 64 && cnt < N2; v++)
      for (int n = 0; n < N && cnt < N2; n++)
        if (rel[n] == v) begin
          is_sel[n] = 1;
          cnt++;
        end
    ok = 1;
    for (int n = 0; n < N; n++) if (rx[n] != cw[n] && !is_sel[n]) ok = 0;
    expect_bits = new[N];
    for (int n = 0; n < N; n++) expect_bits[n] = ok ? cw[n] : rx[n];
    exp_frames.push_back(expect_bits);
    exp_fail.push_back(!ok);
    if (ok) n_chan_ok++; else n_chan_fail++;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while (!in_ready) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_bit   = rx[n];
      in_rel   = 6'(rel[n]);
      if (n == 0) first_cyc.push_back(cyc);
    end
    exp_lat.push_back(LATENCY);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // ------------------------------------------------------------ checkers
  int frames_out = 0, frames_done = 0;

  always @(negedge clk) if (rst_n && dec_done) begin
    int lat;
    lat = cyc - first_cyc[frames_done];
    checks += 2;
    if (lat != exp_lat[frames_done]) begin
      failures++;
      $display("frame %0d: latency %0d, expected %0d", frames_done, lat, exp_lat[frames_done]);
    end
    if (dec_fail !== exp_fail[frames_done]) begin
      failures++;
      $display("frame %0d: dec_fail %b, expected %b", frames_done, dec_fail, exp_fail[frames_done]);
    end
    frames_done++;
  end

  int  pos = 0;
  int  bit_errs = 0;
  bit  cur [];

  always @(negedge clk) if (rst_n && out_valid) begin
    if (pos == 0) begin
      cur = exp_frames.pop_front();
      checks++;
      if (!out_first) begin
        failures++;
        $display("frame %0d: out_first missing", frames_out);
      end
    end
    if (out_bit !== cur[pos]) bit_errs++;
    pos++;
    if (pos == N) begin
      checks += 3;
      if (bit_errs != 0) begin
        failures++;
        $display("frame %0d: %0d wrong output bits", frames_out, bit_errs);
      end
      if (!out_last) begin
        failures++;
        $display("frame %0d: out_last missing", frames_out);
      end
      if (out_fail !== exp_fail[frames_out]) begin
        failures++;
        $display("frame %0d: out_fail %b", frames_out, out_fail);
      end
      bit_errs = 0;
      pos = 0;
      frames_out++;
    end
  end

  initial begin
    gen = ref_generator(T);
    checks++;
    if (gen[PAR] !== 1'b1 || (gen >> (PAR + 1)) != '0 || gen[0] !== 1'b1) begin
      failures++;
      $display("generator polynomial has the wrong degree");
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send_frame(0,  1'b0, 1'b0);
    send_frame(T,  1'b0, 1'b0);
    send_frame(N2, 1'b0, 1'b0);
    send_frame(5,  1'b1, 1'b0);
    send_frame(7,  1'b0, 1'b1);
    for (int f = 0; f < CHAN_FRAMES; f++) send_channel_frame(f < CHAN_FRAMES / 2 ? 0 : 500);
    wait (frames_out == 5 + CHAN_FRAMES);
    repeat (5) @(negedge clk);
    checks += 7;
    if (n_clean == 0)     begin failures++; $display("no clean frame");         end
    if (n_corrected == 0) begin failures++; $display("no corrected frame");     end
    if (n_full2t == 0)    begin failures++; $display("no 2t-error frame");      end
    if (n_fail == 0)      begin failures++; $display("no uncorrectable frame"); end
    if (n_stall == 0)     begin failures++; $display("no input stall");         end
    if (n_overlap == 0)   begin failures++; $display("no input/output overlap"); end
    // back-to-back frames without idle clocks: one frame every LATENCY + 1
    // clocks (in_ready returns the clock after dec_done)
    for (int f = 1; f < 4; f++) begin
      checks++;
      if (first_cyc[f] - first_cyc[f-1] != LATENCY + 1) begin
        failures++;
        $display("frame period %0d, expected %0d", first_cyc[f] - first_cyc[f-1], LATENCY + 1);
      end
    end
    if (frames_done != 5 + CHAN_FRAMES) begin failures++; $display("%0d frames decoded", frames_done); end
    // how many channel frames are correctable is random: reported, not checked
    $display("channel frames: %0d corrected, %0d flagged uncorrectable", n_chan_ok, n_chan_fail);
    $display("frames: clean %0d corrected %0d (2t errors %0d) uncorrectable %0d stalled %0d; overlap clocks %0d",
             n_clean, n_corrected, n_full2t, n_fail, n_stall, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
