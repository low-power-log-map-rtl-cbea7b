// demultiplexer: splits the received parity data into the parity stream of
// constituent decoder 1 and that of decoder 2.  The parity samples arrive
// one per valid cycle in transmission order z_0, z'_0, z_1, z'_1, ...; the
// first sample of each pair goes to the decoder-1 parity buffer, the second
// to the decoder-2 parity buffer, both at the symbol index of the pair.
// clear restarts at index 0 with decoder 1.  Outputs are the write strobes,
// index and data for the two buffers, registered: they appear one clock
// after the input sample.
// The block's place in the decoder is the paper's; the sample order is
// this design's choice.
module demultiplexer
  import turbo_pkg::*;
#(
  parameter int N_MAX = 5114,
  localparam int KW   = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  ch_t           in_data,
  output logic          p1_we,
  output logic          p2_we,
  output logic [KW-1:0] addr,
  output ch_t           data
);
  logic          sel;     // 0: decoder 1, 1: decoder 2
  logic [KW-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel   <= 1'b0;
      idx   <= '0;
      p1_we <= 1'b0;
      p2_we <= 1'b0;
      addr  <= '0;
      data  <= '0;
    end else begin
      p1_we <= in_valid && !clear && !sel;
      p2_we <= in_valid && !clear &&  sel;
      addr  <= idx;
      data  <= in_data;
      if (clear) begin
        sel <= 1'b0;
        idx <= '0;
      end else if (in_valid) begin
        sel <= ~sel;
        if (sel) idx <= idx + 1'b1;
      end
    end
  end
endmodule
