// tb_error_corrector: loads random candidate sets (distinct locations, each
// magnitude 0, 1 or, for failing sets, some other field element), streams a
// random frame of bits with their locations and checks each output bit:
// inverted exactly at the locations whose magnitude is 1, and never when any
// magnitude lies outside {0, 1}, in which case fail must be set.
module tb_error_corrector;

  localparam int N2  = 24;
  localparam int LW  = 15;
  localparam int LEN = 2000;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          load = 1'b0;
  logic [LW-1:0] loc_in [N2];
  logic [15:0]   gamma_in [N2];
  logic          in_valid = 1'b0, in_bit = 1'b0;
  logic [LW-1:0] in_loc = '0;
  logic          out_valid, out_bit, fail, gamma_bad;
  logic [LW-1:0] out_loc;
  int checks = 0, failures = 0;

  error_corrector dut (.clk, .rst_n, .load, .loc_in, .gamma_in, .in_valid, .in_bit, .in_loc,
                       .out_valid, .out_bit, .out_loc, .fail, .gamma_bad);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit flip [LEN];

  task automatic run_frame(bit bad);
    bit used;
    for (int l = 0; l < LEN; l++) flip[l] = 0;
    for (int i = 0; i < N2; i++) begin
      do begin
        loc_in[i] = LW'($urandom_range(LEN - 1, 0));
        used = 0;
        for (int q = 0; q < i; q++) if (loc_in[q] == loc_in[i]) used = 1;
      end while (used);
      gamma_in[i] = 16'($urandom_range(1, 0));
      if (gamma_in[i] == 1 && !bad) flip[loc_in[i]] = 1;
    end
    if (bad) gamma_in[$urandom_range(N2 - 1, 0)] = 16'($urandom_range(16'hFFFF, 2));
    @(negedge clk);
    load = 1'b1;
    #1;
    checks++;
    if (gamma_bad !== bad) begin
      failures++;
      $display("gamma_bad %b, expected %b", gamma_bad, bad);
    end
    @(negedge clk);
    load = 1'b0;
    for (int l = LEN - 1; l >= -1; l--) begin
      bit b;
      b = 1'($urandom);
      in_valid = (l >= 0);
      in_bit   = b;
      in_loc   = LW'((l >= 0) ? l : 0);
      @(negedge clk);
      if (l >= 0) begin
        checks++;
        if (!out_valid || out_bit !== (b ^ flip[l]) || out_loc !== LW'(l)) begin
          failures++;
          if (failures < 10) $display("loc %0d: out %b, expected %b", l, out_bit, b ^ flip[l]);
        end
      end
    end
    in_valid = 1'b0;
    checks++;
    if (fail !== bad) begin
      failures++;
      $display("fail flag %b, expected %b", fail, bad);
    end
  endtask

  initial begin
    for (int i = 0; i < N2; i++) begin
      loc_in[i]   = '0;
      gamma_in[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_frame(1'b0);
    run_frame(1'b1);
    run_frame(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
