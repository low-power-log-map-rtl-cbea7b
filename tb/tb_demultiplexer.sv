// tb_demultiplexer: streams 2*60 parity samples, with idle cycles in between
// and a clear in the middle, and checks that the first sample of each pair
// is written to buffer 1 and the second to buffer 2 at the pair's index.
// The registered outputs are sampled at the falling clock edge.
`timescale 1ns/1ps
module tb_demultiplexer;
  import turbo_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, p1_we, p2_we;
  ch_t in_data = '0, data;
  logic [8:0] addr;
  int b1 [60], b2 [60], e1 [60], e2 [60];
  always #5 clk = ~clk;
  demultiplexer #(.N_MAX(300)) dut (.clk, .rst_n, .clear, .in_valid, .in_data,
                                     .p1_we, .p2_we, .addr, .data);
  always @(negedge clk) begin
    if (p1_we) b1[addr] = int'(data);
    if (p2_we) b2[addr] = int'(data);
  end
  task automatic stream(int n);
    for (int k = 0; k < n; k++)
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
        in_valid = 1;
        in_data = ch_t'($urandom);
        if (h == 0) e1[k] = int'(in_data); else e2[k] = int'(in_data);
      end
    @(negedge clk); in_valid = 0;
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 60; k++) begin b1[k] = 99; b2[k] = 99; end
    stream(20);                 // partial block, then restart
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    stream(60);
    repeat (2) @(negedge clk);
    for (int k = 0; k < 60; k++) begin
      checks += 2;
      if (b1[k] != e1[k]) begin failures++; $display("p1[%0d] got %0d exp %0d", k, b1[k], e1[k]); end
      if (b2[k] != e2[k]) begin failures++; $display("p2[%0d] got %0d exp %0d", k, b2[k], e2[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
