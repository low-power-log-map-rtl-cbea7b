// branch_mem: the branch memory of the log-MAP decoder.  During the backward
// pass of a window it records, per time index, the systematic sum ys + La
// and the parity sample yp; the forward pass reads them back to rebuild the
// branch metrics without a second access to the frame buffers.  DEPTH = one
// sliding window.  Synchronous write and synchronous read (data one clock
// after re, held otherwise), like an SRAM macro.  The paper only names this
// memory; its contents and timing are this design's choice.
module branch_mem
  import turbo_pkg::*;
#(
  parameter int DEPTH = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  sys_t          ws,
  input  ch_t           wyp,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output sys_t          rs,
  output ch_t           ryp
);
  typedef struct packed { sys_t s; ch_t yp; } branch_t;
  branch_t mem [DEPTH];
  branch_t q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= '{s: ws, yp: wyp};
    if (re) q <= mem[raddr];
  end

  assign rs  = q.s;
  assign ryp = q.yp;
endmodule
