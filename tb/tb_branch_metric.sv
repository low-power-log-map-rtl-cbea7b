// tb_branch_metric: checks the four branch metrics gamma(u, p) against
// 0.5*(d*s + c*yp) (floor of the u=1 metrics, exact negation for u=0) over
// the whole input range, and the symmetry gamma(-d,-c) = -gamma(d,c).
`timescale 1ns/1ps
module tb_branch_metric;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  sys_t s; ch_t yp; gamma_vec_t g;
  branch_metric dut (.s, .yp, .g);
  initial begin
    for (int sv = -48; sv <= 46; sv++)
      for (int pv = -16; pv <= 15; pv++) begin
        s = sys_t'(sv); yp = ch_t'(pv);
        #1;
        for (int u = 0; u < 2; u++)
          for (int p = 0; p < 2; p++) begin
            checks++;
            if (int'(g[2*u+p]) != gam(sv, pv, u, p)) begin
              failures++;
              $display("s=%0d yp=%0d u=%0d p=%0d got %0d exp %0d", sv, pv, u, p, g[2*u+p], gam(sv, pv, u, p));
            end
          end
        checks++;
        if (g[3] != -g[0] || g[2] != -g[1]) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
