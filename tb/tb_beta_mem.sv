// tb_beta_mem: exercises the banked metric memory with per-bank write and
// read enables.  Random metric vectors are written to random subsets of the
// 8 banks while random subsets are read; after each clock every bank's read
// data must equal the model: the word stored before that clock at the read
// address if the bank was read, its previous read data if not.  A 2-bank
// instance checks the grouping of four states per word.
`timescale 1ns/1ps
module tb_beta_mem;
  import turbo_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] we8 = '0, re8 = '0;
  logic [1:0] we2 = '0, re2 = '0;
  logic [4:0] waddr = '0, raddr = '0;
  metric_vec_t wdata = '0, rd8, rd2;
  int model8 [32][8], model2 [32][8], q8 [8], q2 [8];
  always #5 clk = ~clk;
  beta_mem #(.DEPTH(32), .NBANKS(8)) dut8 (.clk, .we(we8), .waddr, .wdata, .re(re8), .raddr, .rdata(rd8));
  beta_mem #(.DEPTH(32), .NBANKS(2)) dut2 (.clk, .we(we2), .waddr, .wdata, .re(re2), .raddr, .rdata(rd2));
  initial begin
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin          // initialise everything
      we8 = '1; we2 = '1; waddr = 5'(i);
      for (int n = 0; n < 8; n++) begin
        wdata[n] = metric_t'($urandom);
        model8[i][n] = int'(wdata[n]); model2[i][n] = int'(wdata[n]);
      end
      @(negedge clk);
    end
    we8 = '0; we2 = '0; re8 = '1; re2 = '1; raddr = '0;
    for (int n = 0; n < 8; n++) begin q8[n] = model8[0][n]; q2[n] = model2[0][n]; end
    @(negedge clk);
    for (int t = 0; t < 600; t++) begin
      we8 = 8'($urandom); we2 = 2'($urandom); waddr = 5'($urandom);
      re8 = 8'($urandom); re2 = 2'($urandom); raddr = 5'($urandom);
      if (t % 7 == 0) raddr = waddr;             // read and write one address
      for (int n = 0; n < 8; n++) wdata[n] = metric_t'($urandom);
      for (int n = 0; n < 8; n++) begin           // read sees the old word
        if (re8[n]) q8[n] = model8[raddr][n];
        if (re2[n / 4]) q2[n] = model2[raddr][n];
      end
      for (int n = 0; n < 8; n++) begin
        if (we8[n]) model8[waddr][n] = int'(wdata[n]);
        if (we2[n / 4]) model2[waddr][n] = int'(wdata[n]);
      end
      @(negedge clk);
      for (int n = 0; n < 8; n++) begin
        checks += 2;
        if (int'(rd8[n]) != q8[n]) begin failures++; $display("8-bank state %0d got %0d exp %0d", n, rd8[n], q8[n]); end
        if (int'(rd2[n]) != q2[n]) begin failures++; $display("2-bank state %0d got %0d exp %0d", n, rd2[n], q2[n]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
