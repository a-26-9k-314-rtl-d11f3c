// tb_composite_field_inversion: checks the GF(2^16) inversion unit, both the
// registered version (result one clock after the operand) and the purely
// combinational one, against a^(2^16 - 2) and a * y = 1.
module tb_composite_field_inversion;
  import tb_gf_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] a, y_pipe, y_comb;
  int checks = 0, failures = 0;

  composite_field_inversion                dut      (.clk, .rst_n, .a, .y(y_pipe));
  composite_field_inversion #(.PIPE(1'b0)) dut_comb (.clk, .rst_n, .a, .y(y_comb));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] got, logic [15:0] x, string what);
    logic [15:0] exp;
    exp = (x == 0) ? 16'h0 : ref_inv(x);
    checks++;
    if (got !== exp || (x != 0 && ref_mul(x, got) != 16'h0001)) begin
      failures++;
      if (failures < 10) $display("%s: inv(%h) = %h, expected %h", what, x, got, exp);
    end
  endtask

  initial begin
    logic [15:0] prev;
    a = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    prev = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // the registered result belongs to the operand of the previous clock
      chk(y_pipe, prev, "pipelined");
      a = (n < 300) ? 16'(n) : 16'($urandom);
      #1;
      chk(y_comb, a, "combinational");
      prev = a;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
