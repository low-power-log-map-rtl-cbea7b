// turbo_pkg: types, fixed-point formats and trellis helpers shared by the
// log-MAP turbo decoder.
//
// Number format: every soft value (channel sample, a-priori value, branch,
// state and LLR metric) is a two's complement integer with FRAC = 2
// fractional bits, i.e. one LSB is 0.25.  With that LSB the two thresholds
// of the approximate reverse calculation, Th = 0.75 (ln 2 rounded up to the
// grid) and Th2 = 2.0, become 3 and 8.  The state metrics are 9 bits wide and
// use modulo (wrap-around) arithmetic: metrics are never normalised, every
// comparison is made on a wrapped difference.  That keeps stored and
// recomputed backward metrics on one common offset, which the reverse
// calculation needs.  The 9-bit metric width, Th and Th2 follow the
// paper; the 2 fractional bits and the channel / a-priori widths are this
// design's choice.
//
// Trellis: the 8-state W-CDMA constituent code, feedback 1+D^2+D^3 and
// feed-forward 1+D+D^3.  State s = {a[k-3], a[k-2], a[k-1]}; the new
// register bit enters at the LSB, so state j and j+4 (j = 0..3) form a
// butterfly whose next states are 2j and 2j+1.
package turbo_pkg;

  localparam int NSTATES = 8;
  localparam int NPAIRS  = 4;
  localparam int FRAC    = 2;              // fractional bits of all soft values
  localparam int CH_W    = 5;              // channel sample width (ys, yp)
  localparam int LA_W    = 6;              // a-priori / extrinsic width
  localparam int S_W     = 7;              // ys + La
  localparam int G_W     = 8;              // branch metric width
  localparam int BM_W    = 9;              // state metric width (alpha, beta)
  localparam int LLR_W   = 12;             // a-posteriori LLR width
  localparam int TH      = 3;              // 0.75 : quantised ln 2
  localparam int TH2     = 8;              // 2.0  : start of the y = x region

  typedef logic signed [CH_W-1:0]  ch_t;
  typedef logic signed [LA_W-1:0]  la_t;
  typedef logic signed [S_W-1:0]   sys_t;
  typedef logic signed [G_W-1:0]   gamma_t;
  typedef logic signed [BM_W-1:0]  metric_t;
  typedef logic signed [LLR_W-1:0] llr_t;

  // Metrics of all states at one time index.
  typedef metric_t [NSTATES-1:0] metric_vec_t;
  // Branch metrics of one trellis step indexed by {u, p}:
  // [3] = gamma(1,1), [2] = gamma(1,-1), [1] = gamma(-1,1), [0] = gamma(-1,-1).
  typedef gamma_t [3:0] gamma_vec_t;

  // Register bit entering the shift register for state s and input u.
  function automatic logic fb_bit(input logic [2:0] s, input logic u);
    return u ^ s[1] ^ s[2];
  endfunction

  function automatic logic [2:0] next_state(input logic [2:0] s, input logic u);
    return {s[1:0], fb_bit(s, u)};
  endfunction

  function automatic logic parity_bit(input logic [2:0] s, input logic u);
    return fb_bit(s, u) ^ s[0] ^ s[2];
  endfunction

  // Index into gamma_vec_t of the branch j -> 2j of butterfly j (j = 0..3).
  // The branch j+4 -> 2j and the branch j -> 2j+1 carry the negated metric.
  function automatic logic [1:0] pair_gamma_idx(input logic [1:0] j);
    return {j[1], j[0]};
  endfunction

  // max* correction term ln(1 + e^-d), d >= 0 in LSB units, rounded.
  function automatic logic [1:0] maxstar_corr(input int unsigned d);
    if (d == 0)      return 2'd3;
    else if (d <= 3) return 2'd2;
    else if (d <= 8) return 2'd1;
    else             return 2'd0;
  endfunction

  // ln(e^x - 1) for x >= 0 in LSB units (Fig. 3 of the method):
  //   x >= TH2      : x (the curve meets y = x)
  //   TH <= x < TH2 : small table, round(4 * ln(e^(x/4) - 1))
  //   x < TH        : never used for a flagged metric; clamped to the TH entry
  function automatic int lnexpm1(input int unsigned x);
    if (x >= TH2) return int'(x);
    case (x)
      4:       return 2;
      5:       return 4;
      6:       return 5;
      7:       return 6;
      default: return 0;      // x = 3 (0.44 LSB rounds to 0) and the clamp
    endcase
  endfunction

endpackage
