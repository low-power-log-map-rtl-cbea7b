// tb_llr_unit: checks the LLR, the saturated extrinsic value and the hard
// decision against the reference max* trees, for random alpha_k, beta_{k+1}
// around the wrap point and random branch inputs.
`timescale 1ns/1ps
module tb_llr_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, nsat = 0;
  metric_vec_t a, b1; gamma_vec_t g; sys_t s; ch_t yp; llr_t llr; la_t ext; logic hard;
  branch_metric u_g (.s, .yp, .g);
  llr_unit dut (.alpha(a), .beta_next(b1), .g, .s, .llr, .ext, .hard);
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int ra[8], rb[8], e, x, offa, offb, sv, pv;
      offa = int'($urandom_range(0, 511)); offb = int'($urandom_range(0, 511));
      for (int n = 0; n < 8; n++) begin
        ra[n] = offa + int'($urandom_range(0, 100)) - 50;
        rb[n] = offb + int'($urandom_range(0, 100)) - 50;
        a[n] = metric_t'(ra[n]); b1[n] = metric_t'(rb[n]);
      end
      sv = int'($urandom_range(0, 94)) - 48; pv = int'($urandom_range(0, 31)) - 16;
      s = sys_t'(sv); yp = ch_t'(pv);
      #1;
      e = ref_llr(ra, rb, sv, pv);
      x = e - sv; x = (x > 31) ? 31 : (x < -32) ? -32 : x;
      if (x == 31 || x == -32) nsat++;
      checks += 3;
      if (int'(llr) != e) begin failures++; $display("llr got %0d exp %0d", llr, e); end
      if (int'(ext) != x) begin failures++; $display("ext got %0d exp %0d", ext, x); end
      if (hard != (e > 0)) failures++;
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
