// tb_approx_flag: writes random flag words to every address of the 32-entry
// flag memory in random order, with write-disabled cycles in between, and
// reads every address back against a model array.
`timescale 1ns/1ps
module tb_approx_flag;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [32];
  always #5 clk = ~clk;
  approx_flag #(.DEPTH(32)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  initial begin
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 0; i < 32; i++) begin
        @(negedge clk);
        we = 1; waddr = 5'(i); wdata = 8'($urandom); model[i] = wdata;
      end
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        we = 1'($urandom_range(0, 1)); waddr = 5'($urandom); wdata = 8'($urandom);
        if (we) model[waddr] = wdata;
      end
      @(negedge clk); we = 0;
      for (int i = 0; i < 32; i++) begin
        raddr = 5'(i); #1;
        checks++;
        if (rdata != model[i]) begin failures++; $display("addr %0d got %h exp %h", i, rdata, model[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
