// turbo_decoder: iterative turbo decoder for the W-CDMA rate-1/3 turbo code,
// built from two sliding-window log-MAP decoders with reduced backward-metric
// memory access.
//
// Structure: decoder 1 works on the natural order with the systematic data
// and parity stream 1; decoder 2 works on the interleaved order with the
// interleaved systematic data and parity stream 2.  Each passes its
// extrinsic information to the other as a-priori input: decoder 1's output
// goes through the interleaver to decoder 2, decoder 2's output through the
// deinterleaver back to decoder 1.  The hard decisions of decoder 2,
// deinterleaved, are the decoded output.  One iteration is one pass of
// decoder 1 followed by one pass of decoder 2; in the first, decoder 1 has no
// a-priori input.
//
// Frame buffers (register-file arrays, N_MAX entries each): systematic data,
// the two parity streams (filled through the demultiplexer), the two
// extrinsic buffers (natural order) and the decoded bits.  The interleaver
// holds the permutation pi; decoder 2 reads natural address pi(k) for its
// position k and writes its extrinsic value and decision back there.
//
// Use: load the systematic samples (sys_we), the parity samples in the order
// z_0, z'_0, z_1, z'_1, ... (par_valid, after a par_clear) and pi (pi_we);
// leave at least one clock after the last par_valid (the demultiplexer
// output is registered); pulse start with n_len and n_iter; wait for done; read the decisions with
// dec_addr -> dec_bit.  A block takes n_iter * 2 * (3*n_len - min(W, n_len)
// + ceil(n_len / W) + 2) cycles.
//
// The two-decoder loop and the 8-iteration default follow the paper; the
// buffer organisation, the loading interface and the permutation table are
// this design's choices.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int N_MAX  = 5114,   // largest block (W-CDMA)
  parameter int W      = 32,     // sliding window size
  parameter int NBANKS = 8,      // beta memory banks per decoder
  localparam int KW    = $clog2(N_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // frame loading
  input  logic              sys_we,
  input  logic [KW-1:0]     sys_addr,
  input  ch_t               sys_data,
  input  logic              par_clear,
  input  logic              par_valid,
  input  ch_t               par_data,
  input  logic              pi_we,
  input  logic [KW-1:0]     pi_addr,
  input  logic [KW-1:0]     pi_data,
  // control
  input  logic              start,
  input  logic [KW-1:0]     n_len,
  input  logic [4:0]        n_iter,
  output logic              busy,
  output logic              done,
  output logic [4:0]        iter,
  // decoded output
  input  logic [KW-1:0]     dec_addr,
  output logic              dec_bit,
  // metric memory activity of both decoders
  output logic [NBANKS-1:0] mem_wr1,
  output logic [NBANKS-1:0] mem_rd1,
  output logic [NBANKS-1:0] mem_wr2,
  output logic [NBANKS-1:0] mem_rd2
);
  typedef enum logic [2:0] {T_IDLE, T_D1_GO, T_D1, T_D2_GO, T_D2} tstate_t;
  tstate_t tstate;

  ch_t  ys_mem [N_MAX];
  ch_t  p1_mem [N_MAX];
  ch_t  p2_mem [N_MAX];
  la_t  le12   [N_MAX];     // decoder 1 -> 2 extrinsic, natural order
  la_t  le21   [N_MAX];     // decoder 2 -> 1 extrinsic, natural order
  logic dec_mem [N_MAX];

  logic [KW-1:0] n_reg;
  logic [4:0]    n_iter_reg;
  logic          first_iter;

  // ---- demultiplexer -----------------------------------------------------
  logic          p1_we, p2_we;
  logic [KW-1:0] p_addr;
  ch_t           p_data;

  demultiplexer #(.N_MAX(N_MAX)) u_demux (
    .clk, .rst_n, .clear(par_clear), .in_valid(par_valid), .in_data(par_data),
    .p1_we, .p2_we, .addr(p_addr), .data(p_data));

  // ---- interleaver / deinterleaver ------------------------------------
  logic [KW-1:0] a2, pi_a2, o2_idx, pi_o2;

  interleaver #(.N_MAX(N_MAX)) u_pi (
    .clk, .we(pi_we), .waddr(pi_addr), .wdata(pi_data),
    .raddr_a(a2), .rdata_a(pi_a2), .raddr_b(o2_idx), .rdata_b(pi_o2));

  // ---- decoder 1 (natural order) --------------------------------------
  logic          st1, busy1, done1, ov1, oh1;
  logic [KW-1:0] a1, o1_idx;
  ch_t           ys1, yp1;
  la_t           la1, ext1;
  llr_t          llr1;

  assign ys1 = ys_mem[a1];
  assign yp1 = p1_mem[a1];
  assign la1 = first_iter ? '0 : le21[a1];

  siso_decoder #(.W(W), .NBANKS(NBANKS), .N_MAX(N_MAX)) u_dec1 (
    .clk, .rst_n, .start(st1), .n_len(n_reg), .busy(busy1), .done(done1),
    .in_addr(a1), .in_ys(ys1), .in_yp(yp1), .in_la(la1),
    .out_valid(ov1), .out_idx(o1_idx), .out_llr(llr1), .out_ext(ext1),
    .out_hard(oh1), .mem_wr(mem_wr1), .mem_rd(mem_rd1));

  // ---- decoder 2 (interleaved order) ----------------------------------
  logic          st2, busy2, done2, ov2, oh2;
  ch_t           ys2, yp2;
  la_t           la2, ext2;
  llr_t          llr2;

  assign ys2 = ys_mem[pi_a2];
  assign yp2 = p2_mem[a2];
  assign la2 = le12[pi_a2];

  siso_decoder #(.W(W), .NBANKS(NBANKS), .N_MAX(N_MAX)) u_dec2 (
    .clk, .rst_n, .start(st2), .n_len(n_reg), .busy(busy2), .done(done2),
    .in_addr(a2), .in_ys(ys2), .in_yp(yp2), .in_la(la2),
    .out_valid(ov2), .out_idx(o2_idx), .out_llr(llr2), .out_ext(ext2),
    .out_hard(oh2), .mem_wr(mem_wr2), .mem_rd(mem_rd2));

  // ---- buffers ----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (sys_we) ys_mem[sys_addr] <= sys_data;
    if (p1_we)  p1_mem[p_addr]   <= p_data;
    if (p2_we)  p2_mem[p_addr]   <= p_data;
    if (ov1)    le12[o1_idx]     <= ext1;
    if (ov2) begin
      le21[pi_o2]    <= ext2;
      dec_mem[pi_o2] <= oh2;
    end
  end

  assign dec_bit = dec_mem[dec_addr];

  // ---- iteration control ------------------------------------------------
  assign st1 = (tstate == T_D1_GO);
  assign st2 = (tstate == T_D2_GO);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate     <= T_IDLE;
      n_reg      <= '0;
      n_iter_reg <= '0;
      iter       <= '0;
      first_iter <= 1'b1;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      case (tstate)
        T_IDLE: if (start && n_len != '0 && n_iter != '0) begin
          n_reg      <= n_len;
          n_iter_reg <= n_iter;
          iter       <= '0;
          first_iter <= 1'b1;
          tstate     <= T_D1_GO;
        end
        T_D1_GO: tstate <= T_D1;
        T_D1:    if (done1) tstate <= T_D2_GO;
        T_D2_GO: tstate <= T_D2;
        T_D2:    if (done2) begin
          first_iter <= 1'b0;
          iter       <= iter + 1'b1;
          if (iter + 1'b1 == n_iter_reg) begin
            tstate <= T_IDLE;
            done   <= 1'b1;
          end else tstate <= T_D1_GO;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  assign busy = (tstate != T_IDLE);

  // the two constituent decoders never run at the same time
  a_one_decoder: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(busy1 && busy2));
endmodule
