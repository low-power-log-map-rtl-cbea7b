// interleaver: the address permutation pi shared by the interleaver and the
// deinterleaver of the turbo decoder.  Decoder 2 works on the interleaved
// order: its input for position k is fetched from natural address pi(k)
// (interleaving), and its extrinsic output for position k is written back to
// natural address pi(k) (deinterleaving).  Both directions therefore need
// only the table pi, held here in a RAM of N_MAX entries that is loaded
// through the write port before decoding.  Two asynchronous read ports serve
// the input fetch and the output write-back, which happen in the same cycle.
// The paper uses the standard's interleaver without giving its address
// rule, so the table is loaded rather than computed on the fly.
module interleaver #(
  parameter int N_MAX = 5114,
  localparam int KW   = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [KW-1:0] waddr,
  input  logic [KW-1:0] wdata,      // pi(waddr)
  input  logic [KW-1:0] raddr_a,
  output logic [KW-1:0] rdata_a,
  input  logic [KW-1:0] raddr_b,
  output logic [KW-1:0] rdata_b
);
  logic [KW-1:0] pi_mem [N_MAX];

  always_ff @(posedge clk)
    if (we) pi_mem[waddr] <= wdata;

  assign rdata_a = pi_mem[raddr_a];
  assign rdata_b = pi_mem[raddr_b];

  a_load_range: assert property (@(posedge clk) we |-> (waddr < KW'(N_MAX) &&
                                                        wdata < KW'(N_MAX)));
endmodule
