// tb_error_locators_evaluator: streams full-length frames (n = 32400) of
// random reliabilities and compares the 2t kept candidates with a reference
// selection: the 2t smallest reliabilities, earlier positions first among
// equals, sorted ascending, with location n-1-index and locator alpha^L.
// Frames mix a narrow reliability range (many ties), a wide one, idle clocks
// and a frame that starts in the clock right after the previous one.
module tb_error_locators_evaluator;
  import tb_gf_ref_pkg::*;

  localparam int N    = 32400;
  localparam int N2   = 24;
  localparam int RELW = 6;
  localparam int LW   = 15;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            clear = 1'b0, in_valid = 1'b0;
  logic [RELW-1:0] in_rel = '0;
  logic [RELW:0]   rel  [N2];
  logic [15:0]     beta [N2];
  logic [LW-1:0]   loc  [N2];
  int checks = 0, failures = 0;

  error_locators_evaluator dut (.clk, .rst_n, .clear, .in_valid, .in_rel, .rel, .beta, .loc);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rels [N];

  task automatic send_frame(int range_max, bit gaps);
    for (int n = 0; n < N; n++) begin
      rels[n] = $urandom_range(range_max, 0);
      @(negedge clk);
      while (gaps && ($urandom % 7) == 0) begin
        in_valid = 1'b0;
        clear    = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_rel   = RELW'(rels[n]);
      clear    = (n == 0);
    end
    @(negedge clk);
    in_valid = 1'b0;
    clear    = 1'b0;
  endtask

  task automatic check_frame();
    int sel [N2];
    int cnt;
    // reference: walk the reliability values upward, earliest position first
    cnt = 0;
    for (int v = 0; v < (1 << RELW) && cnt < N2; v++)
      for (int n = 0; n < N && cnt < N2; n++)
        if (rels[n] == v) begin
          sel[cnt] = n;
          cnt++;
        end
    for (int i = 0; i < N2; i++) begin
      checks++;
      if (rel[i] !== (RELW+1)'(rels[sel[i]]) || loc[i] !== LW'(N - 1 - sel[i]) ||
          beta[i] !== ref_alpha(N - 1 - sel[i])) begin
        failures++;
        if (failures < 10)
          $display("slot %0d: rel %0d loc %0d beta %h, expected rel %0d loc %0d beta %h", i,
                   rel[i], loc[i], beta[i], rels[sel[i]], N - 1 - sel[i], ref_alpha(N - 1 - sel[i]));
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    send_frame(3, 1'b1);      // heavy ties
    check_frame();
    repeat (3) @(negedge clk);
    send_frame(63, 1'b0);
    check_frame();
    send_frame(20, 1'b0);     // starts right after the previous frame
    check_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
