// tb_frame_fifo: drives random writes and reads into a small buffer
// (DEPTH = 37, deliberately not a power of two, so the pointers wrap) and
// into one of the full frame size, comparing data and fill level with a
// queue model. Reads and writes in the same clock, a full buffer and an
// empty one all occur.
module tb_frame_fifo;

  localparam int DS = 37;
  localparam int DL = 32400;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        wr_s, rd_s, wr_l, rd_l;
  logic [3:0]  wd_s, rd_data_s;
  logic        wd_l, rd_data_l;
  logic [5:0]  count_s;
  logic [14:0] count_l;
  int checks = 0, failures = 0;
  int full_seen = 0, both_when_full = 0;

  frame_fifo #(.DEPTH(DS), .WIDTH(4)) dut_s (.clk, .rst_n, .wr_en(wr_s), .wr_data(wd_s),
                                             .rd_en(rd_s), .rd_data(rd_data_s), .count(count_s));
  frame_fifo dut_l (.clk, .rst_n, .wr_en(wr_l), .wr_data(wd_l),
                    .rd_en(rd_l), .rd_data(rd_data_l), .count(count_l));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] q_s [$];
  logic       q_l [$];
  logic [3:0] exp_s;
  logic       exp_l;
  bit         pend_s, pend_l;

  task automatic step_small(int wr_bias);
    @(negedge clk);
    if (pend_s) begin
      checks++;
      if (rd_data_s !== exp_s) begin
        failures++;
        if (failures < 10) $display("small: read %h, expected %h", rd_data_s, exp_s);
      end
    end
    checks++;
    if (count_s !== 6'(q_s.size())) begin
      failures++;
      if (failures < 10) $display("small: count %0d, expected %0d", count_s, q_s.size());
    end
    if (q_s.size() == DS) full_seen++;
    rd_s = (q_s.size() > 0) && ($urandom_range(99, 0) >= wr_bias);
    wr_s = (q_s.size() < DS || rd_s) && ($urandom_range(99, 0) < wr_bias);
    if (q_s.size() == DS && rd_s && wr_s) both_when_full++;
    wd_s = 4'($urandom);
    pend_s = rd_s;
    if (rd_s) exp_s = q_s.pop_front();
    if (wr_s) q_s.push_back(wd_s);
  endtask

  initial begin
    wr_s = 0; rd_s = 0; wr_l = 0; rd_l = 0; wd_s = 0; wd_l = 0;
    pend_s = 0; pend_l = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) step_small(n < 1000 ? 80 : (n < 2000 ? 20 : 50));
    // full-size buffer: one frame in, then the next frame in while it drains
    for (int n = 0; n < 2 * DL + 10; n++) begin
      @(negedge clk);
      if (pend_l) begin
        checks++;
        if (rd_data_l !== exp_l) begin
          failures++;
          if (failures < 10) $display("large: read %b, expected %b", rd_data_l, exp_l);
        end
      end
      wr_l = (n < 2 * DL);
      rd_l = (n >= DL) && (q_l.size() > 0);
      wd_l = 1'($urandom);
      pend_l = rd_l;
      if (rd_l) exp_l = q_l.pop_front();
      if (wr_l) q_l.push_back(wd_l);
      if (n == DL) begin
        checks++;
        if (count_l !== 15'(DL)) begin
          failures++;
          $display("large: count %0d when full", count_l);
        end
      end
    end
    checks++;
    if (full_seen == 0 || both_when_full == 0) begin
      failures++;
      $display("full buffer not exercised (%0d, %0d)", full_seen, both_when_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
