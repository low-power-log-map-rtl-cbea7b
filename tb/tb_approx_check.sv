// tb_approx_check: checks the approximation flags (|x - y| >= Th and
// |4 gamma| >= Th per next state) against the reference, for the 8-bank
// organisation (one flag per state) and the 2-bank one (a flag covers a
// group of four states and is set only if all four are approximable).
`timescale 1ns/1ps
module tb_approx_check;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, nset = 0, nclr = 0;
  metric_vec_t b; gamma_vec_t g; sys_t s; ch_t yp;
  logic [7:0] f8, f2;
  branch_metric u_g (.s, .yp, .g);
  approx_check #(.NBANKS(8)) dut8 (.beta(b), .g, .flag(f8));
  approx_check #(.NBANKS(2)) dut2 (.beta(b), .g, .flag(f2));
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int r[8], ok[8], off, sv, pv, grp;
      off = int'($urandom_range(0, 511));
      for (int n = 0; n < 8; n++) begin
        r[n] = off + int'($urandom_range(0, 24)) - 12;
        b[n] = metric_t'(r[n]);
      end
      sv = int'($urandom_range(0, 20)) - 10; pv = int'($urandom_range(0, 20)) - 10;
      s = sys_t'(sv); yp = ch_t'(pv);
      #1;
      for (int n = 0; n < 8; n++) void'(ref_rev(r, sv, pv, n, ok[n]));
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (int'(f8[n]) != ok[n]) begin failures++; $display("f8[%0d] got %0d exp %0d", n, f8[n], ok[n]); end
        if (ok[n] != 0) nset++; else nclr++;
      end
      for (int h = 0; h < 2; h++) begin
        grp = ok[4*h] & ok[4*h+1] & ok[4*h+2] & ok[4*h+3];
        checks++;
        if (f2[4*h +: 4] != {4{grp[0]}}) begin failures++; $display("f2 group %0d", h); end
      end
    end
    checks++;
    if (nset == 0 || nclr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
