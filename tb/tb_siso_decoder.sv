// tb_siso_decoder: self-checking testbench of the sliding-window log-MAP
// decoder.  Two decoders (8 banks, the default, and 1 bank) decode the same
// noisy codewords of the W-CDMA constituent code.  Every LLR, extrinsic value,
// hard decision and output index is compared with the integer reference
// model of tb_ref_pkg, the block time with 3*n - min(W, n) + ceil(n/W)
// cycles, and the
// number of metric-memory writes with the reference.  Blocks: n = 100 (one
// short last window) with random a-priori values, then n = 64 with none.
`timescale 1ns/1ps
module tb_siso_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int W     = 32;
  localparam int N_MAX = 256;
  localparam int KW    = $clog2(N_MAX + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [KW-1:0] n_len;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ys_a[N_MAX], yp_a[N_MAX], la_a[N_MAX], s_a[];
  int yp_d[];

  // ---- two decoders --------------------------------------------------
  logic [1:0]         busy, done, ov, oh;
  logic [KW-1:0]      addr [2];
  logic [KW-1:0]      oidx [2];
  llr_t               ollr [2];
  la_t                oext [2];
  ch_t                ys_i [2], yp_i [2];
  la_t                la_i [2];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    always_comb begin
      ys_i[d] = ch_t'(ys_a[addr[d]]);
      yp_i[d] = ch_t'(yp_a[addr[d]]);
      la_i[d] = la_t'(la_a[addr[d]]);
    end
  end

  siso_decoder #(.W(W), .NBANKS(8), .N_MAX(N_MAX)) dut8 (
    .clk, .rst_n, .start, .n_len, .busy(busy[0]), .done(done[0]),
    .in_addr(addr[0]), .in_ys(ys_i[0]), .in_yp(yp_i[0]), .in_la(la_i[0]),
    .out_valid(ov[0]), .out_idx(oidx[0]), .out_llr(ollr[0]), .out_ext(oext[0]),
    .out_hard(oh[0]), .mem_wr(wr_en8), .mem_rd(rd_en8));
  siso_decoder #(.W(W), .NBANKS(1), .N_MAX(N_MAX)) dut1 (
    .clk, .rst_n, .start, .n_len, .busy(busy[1]), .done(done[1]),
    .in_addr(addr[1]), .in_ys(ys_i[1]), .in_yp(yp_i[1]), .in_la(la_i[1]),
    .out_valid(ov[1]), .out_idx(oidx[1]), .out_llr(ollr[1]), .out_ext(oext[1]),
    .out_hard(oh[1]), .mem_wr(wr_en1), .mem_rd());

  // bank access counters
  logic [7:0] wr_en8, rd_en8;
  logic [0:0] wr_en1;
  int wr8 = 0, wr1 = 0, rd8 = 0;
  always @(posedge clk) begin
    wr8 += $countones(wr_en8);
    rd8 += $countones(rd_en8);
    wr1 += $countones(wr_en1);
  end

  // ---- stimulus ------------------------------------------------------
  function automatic int clampi(int x, int lo, int hi);
    return x < lo ? lo : (x > hi ? hi : x);
  endfunction

  function automatic int noise(int amp);     // roughly Gaussian, +-2*amp
    int acc;
    acc = 0;
    for (int i = 0; i < 4; i++) acc += int'($urandom_range(0, 2 * amp)) - amp;
    return acc / 2;
  endfunction

  task automatic make_block(int n, bit with_la);
    int st, u, p;
    st = 0;
    for (int k = 0; k < n; k++) begin
      u = int'($urandom_range(0, 1));
      p = par(st, u);
      st = nxt(st, u);
      ys_a[k] = clampi((u ? 6 : -6) + noise(5), -16, 15);
      yp_a[k] = clampi((p ? 6 : -6) + noise(5), -16, 15);
      la_a[k] = with_la ? int'($urandom_range(0, 16)) - 8 : 0;
    end
  endtask

  task automatic run_block(int n);
    int l8[], e8[], l1[], e1[], st8[5], st1[5];
    int cyc, seen, expcyc, w0;
    s_a  = new[n];
    yp_d = new[n];
    for (int k = 0; k < n; k++) begin
      s_a[k] = ys_a[k] + la_a[k];
      yp_d[k] = yp_a[k];
    end
    ref_siso(n, W, 8, s_a, yp_d, l8, e8, st8);
    ref_siso(n, W, 1, s_a, yp_d, l1, e1, st1);
    wr8 = 0; wr1 = 0; rd8 = 0;
    @(negedge clk);
    n_len = KW'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1; seen = 0;
    while (!done[0]) begin
      @(posedge clk); #1;
      if (ov[0]) begin
        int k, k1;
        k = int'(oidx[0]);
        checks += 4;
        if (k != seen) begin
          failures++; $display("idx: got %0d exp %0d", k, seen);
        end
        if (int'(ollr[0]) != l8[k]) begin
          failures++; $display("llr8[%0d]: got %0d exp %0d", k, ollr[0], l8[k]);
        end
        if (int'(oext[0]) != e8[k]) begin
          failures++; $display("ext8[%0d]: got %0d exp %0d", k, oext[0], e8[k]);
        end
        if (oh[0] != (l8[k] > 0)) failures++;
        checks++;
        k1 = oidx[1];
        if (!ov[1] || int'(ollr[1]) != l1[k1]) begin
          failures++; $display("llr1[%0d]: got %0d exp %0d", k1, ollr[1], l1[k1]);
        end
        seen++;
      end
      if (!done[0]) cyc++;
    end
    w0 = (n < W) ? n : W;
    expcyc = 3 * n - w0 + (n + W - 1) / W;
    checks += 4;
    if (seen != n) begin failures++; $display("outputs %0d exp %0d", seen, n); end
    if (cyc != expcyc) begin failures++; $display("cycles %0d exp %0d", cyc, expcyc); end
    if (wr8 != st8[ST_WR] || rd8 != st8[ST_WR]) begin
      failures++; $display("bank writes %0d reads %0d exp %0d", wr8, rd8, st8[ST_WR]);
    end
    if (wr1 != st1[ST_WR]) begin failures++; $display("1-bank writes %0d exp %0d", wr1, st1[ST_WR]); end
    $display("n=%0d cycles=%0d  access rate 8 banks=%0.2f 1 bank=%0.2f  reverse=%0d (table %0d, linear %0d) memory=%0d",
             n, cyc, real'(wr8) / (8.0 * n), real'(wr1) / n, st8[ST_REV], st8[ST_LUT],
             st8[ST_LIN], st8[ST_MEM]);
    // mechanisms that must have occurred
    checks += 3;
    if (st8[ST_REV] == 0) begin failures++; $display("no reverse calculation"); end
    if (st8[ST_LUT] == 0) begin failures++; $display("small table never used"); end
    if (st8[ST_MEM] == 0) begin failures++; $display("metric memory never read"); end
  endtask

  initial begin
    n_len = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    make_block(100, 1);
    run_block(100);
    make_block(64, 0);
    run_block(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
