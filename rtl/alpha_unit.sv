// alpha_unit: one step of the forward recursion,
//   alpha_{k+1}(s') = max*_{s} [alpha_k(s) + gamma_k(s -> s')].
// Same butterflies as the backward unit, traversed the other way: with g the
// metric of branch j -> 2j
//   alpha_{k+1}(2j)   = max*(alpha_k(j) + g, alpha_k(j+4) - g)
//   alpha_{k+1}(2j+1) = max*(alpha_k(j) - g, alpha_k(j+4) + g).
// Modulo arithmetic, no normalisation.  Combinational.
module alpha_unit
  import turbo_pkg::*;
(
  input  metric_vec_t alpha,       // alpha_k
  input  gamma_vec_t  g,           // gamma_k
  output metric_vec_t alpha_next   // alpha_{k+1}
);
  for (genvar j = 0; j < NPAIRS; j++) begin : g_bfly
    metric_t gj, a0p, a4m, a0m, a4p;
    always_comb begin
      gj  = metric_t'(g[pair_gamma_idx(2'(j))]);
      a0p = alpha[j]   + gj;
      a4m = alpha[j+4] - gj;
      a0m = alpha[j]   - gj;
      a4p = alpha[j+4] + gj;
    end
    maxstar #(.WIDTH(BM_W)) u_even (.a(a0p), .b(a4m), .y(alpha_next[2*j]));
    maxstar #(.WIDTH(BM_W)) u_odd  (.a(a0m), .b(a4p), .y(alpha_next[2*j+1]));
  end
endmodule
