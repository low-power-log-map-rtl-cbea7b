// llr_unit: a-posteriori LLR of one symbol,
//   L_k = max*_{u=1} [alpha_k(s) + gamma_k(s->s') + beta_{k+1}(s')]
//       - max*_{u=0} [alpha_k(s) + gamma_k(s->s') + beta_{k+1}(s')],
// each max* taken over the 8 branches of that input bit by a tree of seven
// two-input max* units.  The modulo state metrics are first referred to
// state 0 (alpha(s) - alpha(0), beta(s') - beta(0)) and sign-extended to
// LLR_W bits, so the sums cannot wrap.  The extrinsic output is
// L_k - (ys + La), saturated to the a-priori width; hard = (L_k > 0).
// Combinational.  Equation from the paper; widths, saturation and the
// extrinsic form are this design's choice.
module llr_unit
  import turbo_pkg::*;
(
  input  metric_vec_t alpha,       // alpha_k
  input  metric_vec_t beta_next,   // beta_{k+1}
  input  gamma_vec_t  g,           // gamma_k
  input  sys_t        s,           // ys + La of symbol k
  output llr_t        llr,
  output la_t         ext,
  output logic        hard
);
  llr_t br [2][NSTATES];           // branch sums, [u][state]
  llr_t m  [2];

  always_comb begin
    for (int u = 0; u < 2; u++)
      for (int st = 0; st < NSTATES; st++) begin
        logic [2:0] ns;
        logic       p;
        ns = next_state(3'(st), u[0]);
        p  = parity_bit(3'(st), u[0]);
        br[u][st] = llr_t'(metric_t'(alpha[st] - alpha[0]))
                  + llr_t'(metric_t'(beta_next[ns] - beta_next[0]))
                  + llr_t'(g[{u[0], p}]);
      end
  end

  for (genvar u = 0; u < 2; u++) begin : g_tree
    llr_t l1 [4];
    llr_t l2 [2];
    for (genvar i = 0; i < 4; i++) begin : g_l1
      maxstar #(.WIDTH(LLR_W)) u_m (.a(br[u][2*i]), .b(br[u][2*i+1]), .y(l1[i]));
    end
    for (genvar i = 0; i < 2; i++) begin : g_l2
      maxstar #(.WIDTH(LLR_W)) u_m (.a(l1[2*i]), .b(l1[2*i+1]), .y(l2[i]));
    end
    maxstar #(.WIDTH(LLR_W)) u_root (.a(l2[0]), .b(l2[1]), .y(m[u]));
  end

  localparam llr_t EXT_MAX = llr_t'((1 << (LA_W-1)) - 1);
  localparam llr_t EXT_MIN = -llr_t'(1 << (LA_W-1));

  llr_t e;
  always_comb begin
    llr  = m[1] - m[0];
    hard = (llr > 0);
    e    = llr - llr_t'(s);
    if (e > EXT_MAX)      ext = la_t'(EXT_MAX);
    else if (e < EXT_MIN) ext = la_t'(EXT_MIN);
    else                  ext = la_t'(e);
  end
endmodule
