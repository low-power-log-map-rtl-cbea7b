// tb_access_rate: measures how often the backward-metric memory is accessed
// when the metric memory is organised as 1, 2, 4 or 8 banks.  Four turbo
// decoders that differ only in NBANKS decode the same noisy W-CDMA frames
// (BPSK over AWGN, Gaussian noise, rate 1/3) with 8 iterations at
// Eb/N0 = 0, 1, 2, 4, 6, 8 and 10 dB.  The access rate is the number of bank accesses
// times the bank width divided by the accesses of a decoder that stores all
// 72 bits of every time index; one minus it is the approximation success
// rate.  Checks: more banks never give a higher access rate, the 8-bank rate
// at 10 dB is no more than 0.05 above its 0 dB value (it is nearly flat in
// this design), it stays below 0.3 at 2 dB and above, and the frames decode
// with few errors at 2 dB and above.
`timescale 1ns/1ps
module tb_access_rate;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_MAX = 640;
  localparam int N     = 640;
  localparam int ITS   = 8;
  localparam int KW    = $clog2(N_MAX + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              sys_we = 0, par_clear = 0, par_valid = 0, pi_we = 0, start = 0;
  logic [KW-1:0]     sys_addr = '0, pi_addr = '0, pi_data = '0, n_len = '0, dec_addr = '0;
  ch_t               sys_data = '0, par_data = '0;
  logic [4:0]        n_iter = '0;
  logic [3:0]        busy, done, dec_bit;
  int                acc [4];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 4; i++) begin : g_dec
    localparam int NB = 1 << i;
    logic [NB-1:0] w1, r1, w2, r2;
    logic [4:0]    it;
    turbo_decoder #(.N_MAX(N_MAX), .W(32), .NBANKS(NB)) dut (
      .clk, .rst_n, .sys_we, .sys_addr, .sys_data, .par_clear, .par_valid,
      .par_data, .pi_we, .pi_addr, .pi_data, .start, .n_len, .n_iter,
      .busy(busy[i]), .done(done[i]), .iter(it), .dec_addr, .dec_bit(dec_bit[i]),
      .mem_wr1(w1), .mem_rd1(r1), .mem_wr2(w2), .mem_rd2(r2));
    always @(posedge clk) acc[i] += $countones(w1) + $countones(w2);
  end

  int u_a[N], ys_a[N], p1_a[N], p2_a[N], pi_a[N];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // channel LLR 2y/sigma^2 on the 0.25 grid, clipped to 5 bits
  function automatic int chan(int bit_v, real sigma);
    real y, l;
    int q;
    y = (bit_v != 0 ? 1.0 : -1.0) + sigma * gauss();
    l = 4.0 * 2.0 * y / (sigma * sigma);
    q = int'($floor(l + 0.5));
    return q < -16 ? -16 : (q > 15 ? 15 : q);
  endfunction

  task automatic make_block(real snr_db);
    int st, t, j;
    real sigma;
    sigma = $sqrt(3.0 / (2.0 * $pow(10.0, snr_db / 10.0)));
    for (int k = 0; k < N; k++) pi_a[k] = k;
    for (int k = N - 1; k > 0; k--) begin
      j = int'($urandom_range(0, k));
      t = pi_a[k]; pi_a[k] = pi_a[j]; pi_a[j] = t;
    end
    st = 0;
    for (int k = 0; k < N; k++) begin
      u_a[k]  = int'($urandom_range(0, 1));
      ys_a[k] = chan(u_a[k], sigma);
      p1_a[k] = chan(par(st, u_a[k]), sigma);
      st = nxt(st, u_a[k]);
    end
    st = 0;
    for (int k = 0; k < N; k++) begin
      p2_a[k] = chan(par(st, u_a[pi_a[k]]), sigma);
      st = nxt(st, u_a[pi_a[k]]);
    end
  endtask

  task automatic load_block();
    @(negedge clk); par_clear = 1;
    @(negedge clk); par_clear = 0;
    for (int k = 0; k < N; k++) begin
      sys_we = 1; sys_addr = KW'(k); sys_data = ch_t'(ys_a[k]);
      pi_we = 1;  pi_addr = KW'(k);  pi_data = KW'(pi_a[k]);
      par_valid = 1; par_data = ch_t'(p1_a[k]);
      @(negedge clk);
      sys_we = 0; pi_we = 0; par_data = ch_t'(p2_a[k]);
      @(negedge clk);
    end
    par_valid = 0;
  endtask

  localparam int NSNR = 7;
  real rate [NSNR][4];
  real snrs [NSNR] = '{0.0, 1.0, 2.0, 4.0, 6.0, 8.0, 10.0};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int si = 0; si < NSNR; si++) begin
      int err [4];
      make_block(snrs[si]);
      load_block();
      for (int i = 0; i < 4; i++) acc[i] = 0;
      @(negedge clk);
      n_len = KW'(N); n_iter = 5'(ITS); start = 1;
      @(negedge clk); start = 0;
      wait (done[0]);
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        // bank width is 72 / 2^i bits: rate = acc * 2^-i * 72 / (72 * N * 2 * ITS)
        rate[si][i] = real'(acc[i]) / real'(1 << i) / real'(N * 2 * ITS);
        err[i] = 0;
      end
      for (int k = 0; k < N; k++) begin
        dec_addr = KW'(k); #1;
        for (int i = 0; i < 4; i++) if (int'(dec_bit[i]) != u_a[k]) err[i]++;
      end
      $display("Eb/N0 %0.1f dB  access rate: 1 bank %0.2f  2 banks %0.2f  4 banks %0.2f  8 banks %0.2f  bit errors %0d %0d %0d %0d",
               snrs[si], rate[si][0], rate[si][1], rate[si][2], rate[si][3],
               err[0], err[1], err[2], err[3]);
      for (int i = 1; i < 4; i++) begin
        checks++;
        if (rate[si][i] > rate[si][i-1]) begin failures++; $display("more banks, higher rate"); end
      end
      if (snrs[si] >= 2.0) begin
        checks += 2;
        if (rate[si][3] > 0.3) begin failures++; $display("8-bank rate too high"); end
        if (err[3] > N / 100) begin failures++; $display("too many bit errors"); end
      end
    end
    checks++;
    if (rate[NSNR-1][3] > rate[0][3] + 0.05) begin failures++; $display("rate grows with SNR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
