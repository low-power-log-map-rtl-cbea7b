// approx_check: decides, for every backward metric beta_{k+1}(n), whether it
// can later be recovered from beta_k by the approximate reverse calculation
// (flag = 1, metric not stored) or must be written to the metric memory
// (flag = 0).  For next state n of butterfly j = n/2 with branch metric g:
//   n even: D = beta_k(j)   - beta_k(j+4) + 2g
//   n odd : D = beta_k(j+4) - beta_k(j)   + 2g
//   approximable  <=>  |D| >= Th  and  |4g| >= Th
// Below Th the term ln(e^|D| - 1) lies on the steep part of its curve where
// no small table can follow it.  The test needs only shifts and adds.
// Memory organisation: with NBANKS < 8 one memory word holds 8/NBANKS
// neighbouring states and is written as a whole, so a group is approximable
// only if all its states are; the flags of a group are then all equal.
// Combinational.  Test from the paper; the state grouping is this
// design's choice.
module approx_check
  import turbo_pkg::*;
#(
  parameter int NBANKS = 8
) (
  input  metric_vec_t         beta,    // beta_k (just computed)
  input  gamma_vec_t          g,       // gamma_k
  output logic [NSTATES-1:0]  flag     // 1: beta_{k+1}(n) recoverable
);
  localparam int SPB = NSTATES / NBANKS;   // states per bank word

  logic [NSTATES-1:0] ok;

  for (genvar n = 0; n < NSTATES; n++) begin : g_state
    localparam int J = n / 2;
    metric_t             bd;        // wrapped metric difference
    logic signed [BM_W+2:0] d, g4;
    logic        [BM_W+2:0] dmag, g4mag;
    always_comb begin
      bd    = (n % 2 == 0) ? beta[J] - beta[J+4] : beta[J+4] - beta[J];
      d     = (BM_W+3)'(bd) + ((BM_W+3)'(g[pair_gamma_idx(2'(J))]) <<< 1);
      g4    = (BM_W+3)'(g[pair_gamma_idx(2'(J))]) <<< 2;
      dmag  = d[BM_W+2]  ? (BM_W+3)'(-d)  : d;
      g4mag = g4[BM_W+2] ? (BM_W+3)'(-g4) : g4;
      ok[n] = (dmag >= (BM_W+3)'(TH)) && (g4mag >= (BM_W+3)'(TH));
    end
  end

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    assign flag[b*SPB +: SPB] = {SPB{&ok[b*SPB +: SPB]}};
  end

  initial assert (NSTATES % NBANKS == 0) else $error("NBANKS must divide 8");
endmodule
