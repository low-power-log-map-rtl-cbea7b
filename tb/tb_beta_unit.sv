// tb_beta_unit: checks one backward recursion step against the trellis-based
// reference (max* over the two successors of every state), modulo 2^9,
// for random metrics with offsets around the wrap point.
`timescale 1ns/1ps
module tb_beta_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  metric_vec_t bn, b; gamma_vec_t g; sys_t s; ch_t yp;
  branch_metric u_g (.s, .yp, .g);
  beta_unit dut (.beta_next(bn), .g, .beta(b));
  initial begin
    for (int i = 0; i < 2000; i++) begin
      int r[8], e[8], off, sv, pv;
      off = int'($urandom_range(0, 511));
      for (int n = 0; n < 8; n++) begin
        r[n] = off + int'($urandom_range(0, 120)) - 60;
        bn[n] = metric_t'(r[n]);
      end
      sv = int'($urandom_range(0, 94)) - 48; pv = int'($urandom_range(0, 31)) - 16;
      s = sys_t'(sv); yp = ch_t'(pv);
      #1;
      bstep(r, sv, pv, e);
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (int'(b[n]) != wrap(e[n], 9)) begin
          failures++; $display("state %0d got %0d exp %0d", n, b[n], wrap(e[n], 9));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
