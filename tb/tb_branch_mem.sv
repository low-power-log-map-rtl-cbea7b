// tb_branch_mem: fills the window branch memory in backward order (as the
// decoder's backward pass does) and reads it back in forward order with
// synchronous reads, including idle cycles in which the read data must hold.
`timescale 1ns/1ps
module tb_branch_mem;
  import turbo_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, re = 0;
  logic [4:0] waddr = '0, raddr = '0;
  sys_t ws = '0, rs; ch_t wyp = '0, ryp;
  int ms[32], mp[32];
  always #5 clk = ~clk;
  branch_mem #(.DEPTH(32)) dut (.clk, .we, .waddr, .ws, .wyp, .re, .raddr, .rs, .ryp);
  initial begin
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 31; i >= 0; i--) begin
        @(negedge clk);
        we = 1; waddr = 5'(i);
        ms[i] = int'($urandom_range(0, 94)) - 48; mp[i] = int'($urandom_range(0, 31)) - 16;
        ws = sys_t'(ms[i]); wyp = ch_t'(mp[i]);
      end
      @(negedge clk); we = 0; ws = '0; wyp = '0;
      for (int i = 0; i < 32; i++) begin
        re = 1; raddr = 5'(i);
        @(negedge clk);
        re = 0; raddr = 5'(i + 1);
        if (i % 3 == 0) @(negedge clk);            // data must hold
        checks += 2;
        if (int'(rs) != ms[i]) begin failures++; $display("s[%0d] got %0d exp %0d", i, rs, ms[i]); end
        if (int'(ryp) != mp[i]) begin failures++; $display("yp[%0d] got %0d exp %0d", i, ryp, mp[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
