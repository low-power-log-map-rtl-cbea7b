// approx_flag: the approximation-flag memory.  One 8-bit word per time index
// of a sliding window (DEPTH = window size); bit n set means beta_{k+1}(n)
// was not stored and must be recovered by the reverse calculation.  Written
// once per backward step, read once per forward step.  Synchronous write,
// asynchronous read (a register file: 32 x 8 bits).  Size from the
// paper; the port timing is this design's choice.
module approx_flag #(
  parameter int DEPTH = 32,
  parameter int WIDTH = turbo_pkg::NSTATES,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
