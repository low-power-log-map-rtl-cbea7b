// maxstar: the Jacobian logarithm max*(a, b) = ln(e^a + e^b)
//            = max(a, b) + ln(1 + e^-|a-b|).
// The larger input is chosen from the sign of the wrapped difference a - b,
// so the unit works both on modulo-arithmetic state metrics (WIDTH = 9) and
// on wide signed sums (LLR path).  The correction term comes from a 4-entry
// table (turbo_pkg::maxstar_corr) on the 0.25 LSB grid.  Purely
// combinational.  The operation is the paper's; the table size is this
// design's choice.
module maxstar #(
  parameter int WIDTH = turbo_pkg::BM_W
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  output logic signed [WIDTH-1:0] y
);
  logic signed [WIDTH-1:0] diff;
  logic        [WIDTH-1:0] mag;
  logic signed [WIDTH-1:0] mx;
  logic        [1:0]       corr;

  always_comb begin
    diff = a - b;
    mx   = diff[WIDTH-1] ? b : a;
    mag  = diff[WIDTH-1] ? WIDTH'(-diff) : diff;
    corr = turbo_pkg::maxstar_corr(int'({1'b0, mag}));
    y    = mx + WIDTH'(corr);
  end
endmodule
