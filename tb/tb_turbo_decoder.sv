// tb_turbo_decoder: end-to-end testbench of the turbo decoder at its default
// parameters (N_MAX = 5114, W = 32, 8 banks).  For each block it draws random
// information bits and a random interleaver, encodes them with the two
// W-CDMA constituent encoders, adds noise, loads the decoder through its
// ports and decodes.  Every decoded bit is compared with an integer model of
// the same iterative decoder built from tb_ref_pkg, the run time with
// n_iter * 2 * (3n - min(W, n) + ceil(n/W) + 2) cycles, and the bit errors against the
// transmitted data are reported.  The mechanisms of the design (selective
// write and read of the metric banks, reverse calculation in the table and
// in the linear region, the training pass, a short last window, extrinsic
// saturation, several iterations) are counted and must each occur.
// The last block is a full-size one: 5114 bits, 8 iterations.
`timescale 1ns/1ps
module tb_turbo_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_MAX = 5114;
  localparam int W     = 32;
  localparam int KW    = $clog2(N_MAX + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              sys_we = 0, par_clear = 0, par_valid = 0, pi_we = 0, start = 0;
  logic [KW-1:0]     sys_addr = '0, pi_addr = '0, pi_data = '0, n_len = '0, dec_addr = '0;
  ch_t               sys_data = '0, par_data = '0;
  logic [4:0]        n_iter = '0, iter;
  logic              busy, done, dec_bit;
  logic [7:0]        wr1, rd1, wr2, rd2;

  turbo_decoder dut (
    .clk, .rst_n, .sys_we, .sys_addr, .sys_data, .par_clear, .par_valid,
    .par_data, .pi_we, .pi_addr, .pi_data, .start, .n_len, .n_iter, .busy,
    .done, .iter, .dec_addr, .dec_bit, .mem_wr1(wr1), .mem_rd1(rd1),
    .mem_wr2(wr2), .mem_rd2(rd2));

  int checks = 0, failures = 0;
  // mechanism counters
  int c_wr = 0, c_rd = 0, c_rev = 0, c_lut = 0, c_lin = 0, c_train = 0,
      c_short = 0, c_sat = 0, c_iter = 0, c_skip_wr = 0;

  always @(posedge clk) begin
    c_wr += $countones(wr1) + $countones(wr2);
    c_rd += $countones(rd1) + $countones(rd2);
  end

  int u_a[], ys_a[], p1_a[], p2_a[], pi_a[];

  function automatic int clampi(int x, int lo, int hi);
    return x < lo ? lo : (x > hi ? hi : x);
  endfunction

  function automatic int noise(int amp);
    int acc;
    acc = 0;
    for (int i = 0; i < 4; i++) acc += int'($urandom_range(0, 2 * amp)) - amp;
    return acc / 2;
  endfunction

  task automatic make_block(int n, int amp);
    int st, t, j;
    u_a = new[n]; ys_a = new[n]; p1_a = new[n]; p2_a = new[n]; pi_a = new[n];
    for (int k = 0; k < n; k++) pi_a[k] = k;
    for (int k = n - 1; k > 0; k--) begin
      j = int'($urandom_range(0, k));
      t = pi_a[k]; pi_a[k] = pi_a[j]; pi_a[j] = t;
    end
    st = 0;
    for (int k = 0; k < n; k++) begin
      u_a[k]  = int'($urandom_range(0, 1));
      ys_a[k] = clampi((u_a[k] != 0 ? 6 : -6) + noise(amp), -16, 15);
      p1_a[k] = clampi((par(st, u_a[k]) != 0 ? 6 : -6) + noise(amp), -16, 15);
      st = nxt(st, u_a[k]);
    end
    st = 0;
    for (int k = 0; k < n; k++) begin
      int ui;
      ui = u_a[pi_a[k]];
      p2_a[k] = clampi((par(st, ui) != 0 ? 6 : -6) + noise(amp), -16, 15);
      st = nxt(st, ui);
    end
  endtask

  task automatic load_block(int n);
    @(negedge clk);
    par_clear = 1;
    @(negedge clk);
    par_clear = 0;
    for (int k = 0; k < n; k++) begin
      sys_we = 1; sys_addr = KW'(k); sys_data = ch_t'(ys_a[k]);
      pi_we = 1;  pi_addr = KW'(k);  pi_data = KW'(pi_a[k]);
      par_valid = 1; par_data = ch_t'(p1_a[k]);
      @(negedge clk);
      sys_we = 0; pi_we = 0;
      par_valid = 1; par_data = ch_t'(p2_a[k]);
      @(negedge clk);
    end
    par_valid = 0;
  endtask

  task automatic run_block(int n, int its, int amp, int max_err);
    int le12[], le21[], s1[], s2[], p1[], p2[], l1[], e1[], l2[], e2[], dec[];
    int st[5], cyc, err, mism, w0;
    make_block(n, amp);
    // reference decoder
    le12 = new[n]; le21 = new[n]; s1 = new[n]; s2 = new[n]; dec = new[n];
    p1 = p1_a; p2 = p2_a;
    for (int k = 0; k < n; k++) le21[k] = 0;
    for (int it = 0; it < its; it++) begin
      for (int k = 0; k < n; k++) s1[k] = ys_a[k] + le21[k];
      ref_siso(n, W, 8, s1, p1, l1, e1, st);
      c_rev += st[ST_REV]; c_lut += st[ST_LUT]; c_lin += st[ST_LIN];
      if (st[ST_WR] < 8 * n) c_skip_wr++;
      for (int k = 0; k < n; k++) begin
        le12[k] = e1[k];
        if (e1[k] == 31 || e1[k] == -32) c_sat++;
      end
      for (int k = 0; k < n; k++) s2[k] = ys_a[pi_a[k]] + le12[pi_a[k]];
      ref_siso(n, W, 8, s2, p2, l2, e2, st);
      c_rev += st[ST_REV]; c_lut += st[ST_LUT]; c_lin += st[ST_LIN];
      for (int k = 0; k < n; k++) begin
        le21[pi_a[k]] = e2[k];
        dec[pi_a[k]]  = (l2[k] > 0) ? 1 : 0;
      end
    end
    if (n > W) c_train++;
    if (n % W != 0) c_short++;
    // hardware
    load_block(n);
    @(negedge clk);
    n_len = KW'(n); n_iter = 5'(its); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(posedge clk); #1;
      if (!done) cyc++;
    end
    c_iter += int'(iter);
    w0 = (n < W) ? n : W;
    checks += 2;
    if (cyc != its * 2 * (3 * n - w0 + (n + W - 1) / W + 2)) begin
      failures++; $display("cycles %0d exp %0d", cyc, its * 2 * (3 * n - w0 + (n + W - 1) / W + 2));
    end
    if (int'(iter) != its) begin failures++; $display("iter %0d", iter); end
    err = 0; mism = 0;
    for (int k = 0; k < n; k++) begin
      dec_addr = KW'(k);
      #1;
      checks++;
      if (int'(dec_bit) != dec[k]) begin
        mism++;
        failures++;
        if (mism < 10) $display("dec[%0d] got %0d exp %0d", k, dec_bit, dec[k]);
      end
      if (int'(dec_bit) != u_a[k]) err++;
    end
    checks++;
    if (err > max_err) begin failures++; $display("too many bit errors"); end
    $display("block n=%0d iterations=%0d cycles=%0d bit errors=%0d mismatches=%0d",
             n, its, cyc, err, mism);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(40, 2, 12, 40);       // shortest W-CDMA block: one window
    run_block(300, 4, 14, 300);     // noisy block, short last window
    run_block(5114, 8, 5, 50);      // largest W-CDMA block, 8 iterations
    $display("mechanisms: bank writes=%0d reads=%0d passes with skipped writes=%0d reverse=%0d table=%0d linear=%0d training=%0d short windows=%0d saturations=%0d iterations=%0d",
             c_wr, c_rd, c_skip_wr, c_rev, c_lut, c_lin, c_train, c_short, c_sat, c_iter);
    checks += 9;
    if (c_wr == 0)      begin failures++; $display("no bank write"); end
    if (c_rd == 0)      begin failures++; $display("no bank read"); end
    if (c_skip_wr == 0) begin failures++; $display("no skipped write"); end
    if (c_lut == 0)     begin failures++; $display("table never used"); end
    if (c_lin == 0)     begin failures++; $display("linear region never used"); end
    if (c_train == 0)   begin failures++; $display("no training pass"); end
    if (c_short == 0)   begin failures++; $display("no short window"); end
    if (c_sat == 0)     begin failures++; $display("no extrinsic saturation"); end
    if (c_iter < 3)     begin failures++; $display("no iteration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
