// beta_mem: the backward (beta) metric memory, split into NBANKS banks that
// are enabled one by one.  Bank b holds the 8/NBANKS neighbouring states
// b*SPB .. b*SPB+SPB-1 of every time index of a window, so with the default
// NBANKS = 8 each state has its own 32 x 9-bit bank and only the metrics
// that cannot be recomputed are written and read.  Each bank behaves like a
// single-port-per-direction synchronous SRAM: a write with we[b] at the
// clock edge, and a read with re[b] whose data appear after the clock edge
// and are held until the bank's next read.  A read of the address written in
// the same cycle returns the old contents.  Bank count and word sizes follow
// the paper (8 banks of 32 x 1 x 9 bits); the state-to-bank mapping and the
// port timing are this design's choice.
module beta_mem
  import turbo_pkg::*;
#(
  parameter int DEPTH  = 32,
  parameter int NBANKS = 8,
  localparam int AW    = $clog2(DEPTH),
  localparam int SPB   = NSTATES / NBANKS
) (
  input  logic              clk,
  input  logic [NBANKS-1:0] we,
  input  logic [AW-1:0]     waddr,
  input  metric_vec_t       wdata,
  input  logic [NBANKS-1:0] re,
  input  logic [AW-1:0]     raddr,
  output metric_vec_t       rdata
);
  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic [SPB*BM_W-1:0] mem [DEPTH];
    logic [SPB*BM_W-1:0] q;
    always_ff @(posedge clk) begin
      if (we[b]) mem[waddr] <= wdata[b*SPB +: SPB];
      if (re[b]) q <= mem[raddr];
    end
    assign rdata[b*SPB +: SPB] = q;
  end
endmodule
