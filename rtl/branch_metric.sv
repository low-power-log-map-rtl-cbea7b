// branch_metric: branch metrics of one trellis step for BPSK over AWGN,
//   gamma(d, c) = 0.5 * (d * (ys + La) + c * yp),  d, c in {-1, +1}
// (d is the systematic, c the parity bit of the branch).  The caller supplies
// s = ys + La, which the decoder also keeps in its branch memory.  Only
// gamma(1,1) and gamma(1,-1) are computed, with an arithmetic right shift for
// the factor 0.5 (floor); the other two are their exact negatives, so
// gamma(-d,-c) = -gamma(d,c) holds bit for bit, which the reverse
// calculation relies on.  Combinational.  Formula from the paper;
// rounding and widths are this design's.
module branch_metric
  import turbo_pkg::*;
(
  input  sys_t       s,      // ys + La
  input  ch_t        yp,     // parity sample
  output gamma_vec_t g       // indexed by {u, p}
);
  logic signed [G_W:0] g11_full, g10_full;

  always_comb begin
    g11_full = (G_W+1)'(s) + (G_W+1)'(yp);
    g10_full = (G_W+1)'(s) - (G_W+1)'(yp);
    g[3]     = G_W'(g11_full >>> 1);
    g[2]     = G_W'(g10_full >>> 1);
    g[1]     = -g[2];
    g[0]     = -g[3];
  end
endmodule
