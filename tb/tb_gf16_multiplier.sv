// tb_gf16_multiplier: checks the GF(2^16) multiplier against the reference
// shift-and-reduce product on corner cases and random operand pairs.
module tb_gf16_multiplier;
  import tb_gf_ref_pkg::*;

  logic [15:0] a, b, p;
  int checks = 0, failures = 0;

  gf16_multiplier dut (.a, .b, .p);

  task automatic check(logic [15:0] x, logic [15:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if (p !== ref_mul(x, y)) begin
      failures++;
      if (failures < 10) $display("mismatch %h * %h = %h, expected %h", x, y, p, ref_mul(x, y));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000, 16'h1234);
    check(16'h0001, 16'hBEEF);
    check(16'h8000, 16'h0002);   // x^15 * x = x^16 = x^5 + x^3 + x^2 + 1
    check(16'hFFFF, 16'hFFFF);
    for (int n = 0; n < 16; n++) check(16'h0001 << n, 16'h0001 << (15 - n));
    for (int n = 0; n < 3000; n++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
