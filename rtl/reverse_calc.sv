// reverse_calc: approximate reverse calculation of the backward metrics,
// recovering beta_{k+1} from beta_k and gamma_k instead of reading it from
// the metric memory.  Inverting the butterfly j (states j, j+4 -> 2j, 2j+1,
// branch metric g on j -> 2j) gives, with x, y the two exponents,
//   beta_{k+1}(2j)   : x = beta_k(j)   + g,  y = beta_k(j+4) - g
//   beta_{k+1}(2j+1) : x = beta_k(j+4) + g,  y = beta_k(j)   - g
//   beta_{k+1} = min(x, y) + L(|x - y|) + 2|g| - L(|4g|),
//   L(v) = ln(e^v - 1)
// using ln|e^x - e^y| = min(x,y) + L(|x-y|).  L is read from a 5-entry
// table for Th <= v < Th2 and replaced by v itself for v >= Th2 (turbo_pkg::
// lnexpm1).  Only metrics whose approximation flag is set are taken from this
// unit; arguments below Th (possible when beta_k was itself recovered) are
// clamped to the Th entry.  All sums are modulo 2^9 like the recursions.
// Combinational.  Equations from the paper; the table values are this
// design's rounding of ln(e^v - 1) to the 0.25 grid.
module reverse_calc
  import turbo_pkg::*;
(
  input  metric_vec_t beta,        // beta_k
  input  gamma_vec_t  g,           // gamma_k
  output metric_vec_t beta_next    // approximated beta_{k+1}
);
  for (genvar n = 0; n < NSTATES; n++) begin : g_state
    localparam int J = n / 2;
    metric_t                x, y, mn, g2;
    gamma_t                 gj;
    logic signed [BM_W+2:0] d, g4;
    logic        [BM_W+2:0] dmag, g4mag;
    metric_t                ld, lg;
    always_comb begin
      gj    = g[pair_gamma_idx(2'(J))];
      g2    = gj[G_W-1] ? metric_t'(-gj) <<< 1 : metric_t'(gj) <<< 1; // 2|g|
      if (n % 2 == 0) begin
        x = beta[J]   + metric_t'(gj);
        y = beta[J+4] - metric_t'(gj);
      end else begin
        x = beta[J+4] + metric_t'(gj);
        y = beta[J]   - metric_t'(gj);
      end
      // x - y computed without wrap: wrapped metric difference plus 2g
      d     = (BM_W+3)'(metric_t'((n % 2 == 0) ? beta[J] - beta[J+4]
                                               : beta[J+4] - beta[J]))
            + ((BM_W+3)'(gj) <<< 1);
      g4    = (BM_W+3)'(gj) <<< 2;
      dmag  = d[BM_W+2]  ? (BM_W+3)'(-d)  : d;
      g4mag = g4[BM_W+2] ? (BM_W+3)'(-g4) : g4;
      mn    = d[BM_W+2] ? x : y;
      ld    = metric_t'(lnexpm1(int'(dmag)));
      lg    = metric_t'(lnexpm1(int'(g4mag)));
      beta_next[n] = mn + ld + g2 - lg;
    end
  end
endmodule
