// tb_reverse_calc: drives the reverse calculation with beta_k produced by the
// backward recursion from a random beta_{k+1}.  For every state it checks
// the output against the reference equation bit for bit and, where the
// state is flagged approximable, that the recovered beta_{k+1} (referred to
// another recovered state) is within 1.0 of the true one.  It also counts
// uses of the small table and of the linear region.
`timescale 1ns/1ps
module tb_reverse_calc;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, n_lut = 0, n_lin = 0, n_ok = 0;
  metric_vec_t b1, bk, rv; gamma_vec_t g; sys_t s; ch_t yp;
  branch_metric u_g (.s, .yp, .g);
  beta_unit    u_b (.beta_next(b1), .g, .beta(bk));
  reverse_calc dut (.beta(bk), .g, .beta_next(rv));
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int r1[8], rk[8], e, ok, off, sv, pv, ref_n, ref_e, j, gg;
      off = int'($urandom_range(0, 511));
      for (int n = 0; n < 8; n++) begin
        r1[n] = off + int'($urandom_range(0, 80)) - 40;
        b1[n] = metric_t'(r1[n]);
      end
      sv = int'($urandom_range(0, 94)) - 48; pv = int'($urandom_range(0, 31)) - 16;
      s = sys_t'(sv); yp = ch_t'(pv);
      #1;
      bstep(r1, sv, pv, rk);
      ref_n = -1;
      for (int n = 0; n < 8; n++) begin
        e = ref_rev(rk, sv, pv, n, ok);
        checks++;
        if (int'(rv[n]) != wrap(e, 9)) begin
          failures++; $display("state %0d got %0d exp %0d", n, rv[n], wrap(e, 9));
        end
        if (ok != 0) begin
          n_ok++;
          j = n >> 1;
          gg = (nxt(j, 0) == n) ? gam(sv, pv, 0, par(j, 0)) : gam(sv, pv, 1, par(j, 1));
          if (iabs(rk[j] - rk[j+4] + 2 * gg) < 8 && iabs(rk[j+4] - rk[j] + 2 * gg) < 8) n_lut++;
          if (iabs(4 * gg) >= 8 && iabs(rk[j] - rk[j+4] + 2 * gg) >= 8) n_lin++;
          if (ref_n < 0) begin ref_n = n; ref_e = int'(rv[n]) - r1[n]; end
          else begin
            // error of this state relative to the first flagged state
            checks++;
            if (iabs(wrap(int'(rv[n]) - r1[n] - ref_e, 9)) > 4) begin
              failures++; $display("approximation error state %0d: %0d", n,
                                   wrap(int'(rv[n]) - r1[n] - ref_e, 9));
            end
          end
        end
      end
    end
    checks++;
    if (n_lut == 0 || n_lin == 0) begin failures++; $display("regions lut=%0d lin=%0d", n_lut, n_lin); end
    $display("flagged=%0d table=%0d linear=%0d", n_ok, n_lut, n_lin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
