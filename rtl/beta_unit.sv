// beta_unit: one step of the backward recursion,
//   beta_k(s) = max*_{s'} [beta_{k+1}(s') + gamma_k(s -> s')].
// It is organised as the four butterflies of the W-CDMA trellis:
// states j and j+4 (j = 0..3) both lead to 2j and 2j+1, and with g the
// metric of branch j -> 2j
//   beta_k(j)   = max*(beta_{k+1}(2j) + g, beta_{k+1}(2j+1) - g)
//   beta_k(j+4) = max*(beta_{k+1}(2j) - g, beta_{k+1}(2j+1) + g).
// Modulo arithmetic, no normalisation.  Combinational; the caller registers
// the result (one trellis step per clock).
module beta_unit
  import turbo_pkg::*;
(
  input  metric_vec_t beta_next,   // beta_{k+1}
  input  gamma_vec_t  g,           // gamma_k
  output metric_vec_t beta         // beta_k
);
  for (genvar j = 0; j < NPAIRS; j++) begin : g_bfly
    metric_t gj, b0p, b1m, b0m, b1p;
    always_comb begin
      gj  = metric_t'(g[pair_gamma_idx(2'(j))]);
      b0p = beta_next[2*j]   + gj;
      b1m = beta_next[2*j+1] - gj;
      b0m = beta_next[2*j]   - gj;
      b1p = beta_next[2*j+1] + gj;
    end
    maxstar #(.WIDTH(BM_W)) u_top (.a(b0p), .b(b1m), .y(beta[j]));
    maxstar #(.WIDTH(BM_W)) u_bot (.a(b0m), .b(b1p), .y(beta[j+4]));
  end
endmodule
