// tb_maxstar: checks max*(a, b) = max + ln(1 + e^-|a-b|) against the real
// valued formula for random 9-bit modulo metrics (including operands that
// straddle the wrap point) and for wide 12-bit operands.
`timescale 1ns/1ps
module tb_maxstar;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [8:0]  a9, b9, y9;
  logic signed [11:0] a12, b12, y12;
  maxstar #(.WIDTH(9))  u9  (.a(a9),  .b(b9),  .y(y9));
  maxstar #(.WIDTH(12)) u12 (.a(a12), .b(b12), .y(y12));
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int a, d, e;
      a = int'($urandom_range(0, 511)) - 256;
      d = int'($urandom_range(0, 254)) - 127;
      if (i < 40) d = i % 20 - 10;
      a9 = 9'(a); b9 = 9'(a + d);
      a12 = 12'(a * 4); b12 = 12'(a * 4 + d * 3);
      #1;
      e = wrap(mstar(a, a + d), 9);
      checks += 2;
      if (int'(y9) != e) begin failures++; $display("9b %0d %0d: got %0d exp %0d", a, a + d, y9, e); end
      e = mstar(a * 4, a * 4 + d * 3);
      if (int'(y12) != e) begin failures++; $display("12b: got %0d exp %0d", y12, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
