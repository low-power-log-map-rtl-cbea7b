// tb_interleaver: loads a random permutation of 200 entries and reads it on
// both ports at random addresses; also checks that reading pi through one
// port and writing back through the other restores natural order.
`timescale 1ns/1ps
module tb_interleaver;
  localparam int N = 200;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [7:0] waddr = '0, wdata = '0, ra = '0, rb = '0, da, db;
  int pi_m [N], back [N];
  always #5 clk = ~clk;
  interleaver #(.N_MAX(N)) dut (.clk, .we, .waddr, .wdata, .raddr_a(ra), .rdata_a(da),
                                .raddr_b(rb), .rdata_b(db));
  initial begin
    for (int k = 0; k < N; k++) pi_m[k] = k;
    for (int k = N - 1; k > 0; k--) begin
      int j, t;
      j = int'($urandom_range(0, k)); t = pi_m[k]; pi_m[k] = pi_m[j]; pi_m[j] = t;
    end
    for (int k = 0; k < N; k++) begin
      @(negedge clk); we = 1; waddr = 8'(k); wdata = 8'(pi_m[k]);
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 400; t++) begin
      ra = 8'($urandom_range(0, N - 1)); rb = 8'($urandom_range(0, N - 1)); #1;
      checks += 2;
      if (int'(da) != pi_m[ra]) begin failures++; $display("a[%0d] got %0d", ra, da); end
      if (int'(db) != pi_m[rb]) begin failures++; $display("b[%0d] got %0d", rb, db); end
    end
    for (int k = 0; k < N; k++) begin              // x'[k] = x[pi(k)], then deinterleave
      ra = 8'(k); rb = 8'(k); #1;
      back[db] = int'(da) * 3 + 1;                  // value of natural position pi(k)
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (back[k] != 3 * k + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
