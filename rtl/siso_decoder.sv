// siso_decoder: sliding-window log-MAP soft-input soft-output decoder for the
// 8-state W-CDMA constituent code, with reduced backward-metric memory
// access.
//
// The block of n_len symbols is cut into windows of W symbols, processed in
// increasing order.  Each window takes three passes, one trellis step per
// clock:
//   ACQ  backward training recursion over the next window (starting from
//        equal metrics) to obtain beta at the end of this window; skipped for
//        the last window, whose end metrics are all equal (no termination).
//   BWD  backward recursion over the window, from its end to its head.  At
//        step k the unit computes beta_k from beta_{k+1}; approx_check then
//        tells which beta_{k+1}(n) the reverse calculation can rebuild.  Only
//        the others are written to the banked metric memory; the flags go to
//        the flag memory and ys+La, yp to the branch memory.  beta at the
//        head of the window stays in the beta register.
//   TURN one clock between the passes that issues the first memory read.
//   FWD  forward recursion from the head.  At step k beta_{k+1}(n) is read
//        from its bank if the flag is clear, otherwise it is recomputed from
//        beta_k by reverse_calc; the LLR of symbol k then uses alpha_k,
//        gamma_k and beta_{k+1}, and the beta register moves on to beta_{k+1}.
// The metric and branch memories behave like synchronous SRAMs: data appear
// one clock after the read.  Each read is therefore issued one step ahead,
// from the flags of the next time index, and those flags are registered
// alongside (sel_q) to steer the selection between memory and reverse
// calculation.  The flag memory is a register file read in the same cycle.
// alpha is carried from window to window.  It starts at 0 for state 0 and
// -16.0 for the others (the encoder starts in state 0).
//
// Interface: a start pulse with n_len (1..N_MAX) begins a block.  The decoder
// reads its inputs through in_addr -> {in_ys, in_yp, in_la}, which must be
// answered combinationally in the same cycle.  Each forward step produces,
// one clock later, out_valid with out_idx = k, the LLR, the extrinsic value
// and the hard decision.  done pulses for one cycle after the last output.
// mem_wr / mem_rd show which metric-memory banks are accessed in a cycle.
// A block takes sum over windows of (ACQ + BWD + TURN + FWD)
//   = 3*n_len - min(W, n_len) + ceil(n_len / W)
// cycles from the start pulse to the last output.
//
// The pass structure, the selective write / read and the reverse calculation
// follow the paper, as does the use of SRAM-like metric memories.  The
// training pass, the unterminated block end, the alpha start values, the
// read-ahead with its turnaround cycle and the combinational symbol port are
// this design's choices.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int W      = 32,       // sliding window size
  parameter int NBANKS = 8,        // beta memory banks
  parameter int N_MAX  = 5114,     // largest block length
  localparam int KW    = $clog2(N_MAX + 1),
  localparam int LW    = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [KW-1:0] n_len,
  output logic          busy,
  output logic          done,
  // symbol read port
  output logic [KW-1:0] in_addr,
  input  ch_t           in_ys,
  input  ch_t           in_yp,
  input  la_t           in_la,
  // soft output
  output logic          out_valid,
  output logic [KW-1:0] out_idx,
  output llr_t          out_llr,
  output la_t           out_ext,
  output logic          out_hard,
  // metric memory bank enables, for activity (power) monitoring
  output logic [NBANKS-1:0] mem_wr,
  output logic [NBANKS-1:0] mem_rd
);
  localparam int SPB = NSTATES / NBANKS;
  localparam metric_t ALPHA_OFF = metric_t'(64);

  typedef enum logic [2:0] {S_IDLE, S_ACQ, S_BWD, S_TURN, S_FWD} state_t;
  state_t state;

  logic [KW-1:0] n_reg, base, wend, k;
  metric_vec_t   beta_r, alpha_r;

  // ---- datapath -------------------------------------------------------
  ch_t          bm_yp;
  sys_t         s_in, s_mem, bm_s;
  ch_t          yp_mem;
  gamma_vec_t   g;
  metric_vec_t  beta_k, beta_rev, beta_rd, beta_k1, alpha_nx;
  logic [NSTATES-1:0] flag_wr, flag_nx, sel_q;
  logic [NBANKS-1:0]  bank_we, bank_re;
  logic [LW-1:0]      loc, rloc;
  logic               rd_issue;
  llr_t         llr;
  la_t          ext;
  logic         hard;

  assign in_addr = k;
  assign loc     = LW'(k - base);
  // the window memories are read one clock ahead of their use: in S_TURN
  // for the head of the window, in every forward step but the last for the
  // next step
  assign rloc     = (state == S_TURN) ? '0 : loc + 1'b1;
  assign rd_issue = (state == S_TURN) || (state == S_FWD && k != wend - 1'b1);

  branch_mem #(.DEPTH(W)) u_bmem (
    .clk, .we(state == S_BWD), .waddr(loc), .ws(s_in), .wyp(in_yp),
    .re(rd_issue), .raddr(rloc), .rs(s_mem), .ryp(yp_mem));

  // forward pass takes the branch inputs from the branch memory; the other
  // passes take them from the symbol port.  La is folded into s on the way.
  always_comb begin
    s_in  = sys_t'(in_ys) + sys_t'(in_la);
    bm_s  = (state == S_FWD) ? s_mem  : s_in;
    bm_yp = (state == S_FWD) ? yp_mem : in_yp;
  end

  branch_metric u_bm (.s(bm_s), .yp(bm_yp), .g(g));

  beta_unit    u_beta  (.beta_next(beta_r), .g(g), .beta(beta_k));
  approx_check #(.NBANKS(NBANKS)) u_chk (.beta(beta_k), .g(g), .flag(flag_wr));
  approx_flag  #(.DEPTH(W)) u_flag (
    .clk, .we(state == S_BWD), .waddr(loc), .wdata(flag_wr),
    .raddr(rloc), .rdata(flag_nx));

  for (genvar b = 0; b < NBANKS; b++) begin : g_en
    assign bank_we[b] = (state == S_BWD) && !flag_wr[b*SPB];
    assign bank_re[b] = rd_issue && !flag_nx[b*SPB];
  end

  beta_mem #(.DEPTH(W), .NBANKS(NBANKS)) u_mem (
    .clk, .we(bank_we), .waddr(loc), .wdata(beta_r),
    .re(bank_re), .raddr(rloc), .rdata(beta_rd));

  reverse_calc u_rev (.beta(beta_r), .g(g), .beta_next(beta_rev));

  always_comb
    for (int n = 0; n < NSTATES; n++)
      beta_k1[n] = sel_q[n] ? beta_rev[n] : beta_rd[n];

  // flags of the metrics read ahead, aligned with the read data
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        sel_q <= '0;
    else if (rd_issue) sel_q <= flag_nx;

  alpha_unit u_alpha (.alpha(alpha_r), .g(g), .alpha_next(alpha_nx));
  llr_unit   u_llr   (.alpha(alpha_r), .beta_next(beta_k1), .g(g), .s(bm_s),
                      .llr(llr), .ext(ext), .hard(hard));

  // ---- control --------------------------------------------------------
  // window [b, end) ; training window [end, min(end+W, n))
  function automatic logic [KW-1:0] win_end(input logic [KW-1:0] b,
                                           input logic [KW-1:0] n);
    return (n - b > KW'(W)) ? b + KW'(W) : n;
  endfunction

  logic [KW-1:0] nb, ne;
  always_comb begin
    nb = (state == S_IDLE) ? '0 : wend;     // head of the next window
    ne = win_end(nb, (state == S_IDLE) ? n_len : n_reg);
  end

  metric_vec_t alpha_init;
  always_comb
    for (int n = 0; n < NSTATES; n++)
      alpha_init[n] = (n == 0) ? '0 : -ALPHA_OFF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      n_reg     <= '0;
      base      <= '0;
      wend      <= '0;
      k         <= '0;
      beta_r    <= '0;
      alpha_r   <= '0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_llr   <= '0;
      out_ext   <= '0;
      out_hard  <= 1'b0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      case (state)
        S_IDLE: if (start && n_len != '0) begin
          n_reg   <= n_len;
          alpha_r <= alpha_init;
        end
        S_ACQ: begin
          beta_r <= beta_k;
          if (k == wend) begin
            state <= S_BWD;
            k     <= wend - 1'b1;
          end else k <= k - 1'b1;
        end
        S_BWD: begin
          beta_r <= beta_k;
          if (k == base) state <= S_TURN;
          else           k <= k - 1'b1;
        end
        S_TURN: state <= S_FWD;
        S_FWD: begin
          beta_r    <= beta_k1;
          alpha_r   <= alpha_nx;
          out_valid <= 1'b1;
          out_idx   <= k;
          out_llr   <= llr;
          out_ext   <= ext;
          out_hard  <= hard;
          if (k != wend - 1'b1) k <= k + 1'b1;
          else if (wend == n_reg) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
      // open a new window: after start, or after the last forward step
      if ((state == S_IDLE && start && n_len != '0) ||
          (state == S_FWD && k == wend - 1'b1 && wend != n_reg)) begin
        base   <= nb;
        wend   <= ne;
        beta_r <= '0;
        if (ne != ((state == S_IDLE) ? n_len : n_reg)) begin
          state <= S_ACQ;
          k     <= win_end(ne, (state == S_IDLE) ? n_len : n_reg) - 1'b1;
        end else begin
          state <= S_BWD;
          k     <= ne - 1'b1;
        end
      end
    end
  end

  assign busy   = (state != S_IDLE);
  assign mem_wr = bank_we;
  assign mem_rd = bank_re;

  a_start_len: assert property (@(posedge clk) disable iff (!rst_n)
                                (start && state == S_IDLE) |-> n_len <= KW'(N_MAX));
endmodule
