// Testbench for init_dcapf: reset bounds and independent loading of INF
// and SUP.
`include "tb_check.svh"
module tb_init_dcapf;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_inf = 0, wr_sup = 0;
  logic [31:0] init_val = 0, inf, sup;

  init_dcapf #(.W(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(inf == 0 && sup == 32'hFFFF_FFFF, "reset range is everything")
    init_val = 32'h10; wr_inf = 1;
    @(negedge clk); wr_inf = 0;
    `CHECK(inf == 32'h10 && sup == 32'hFFFF_FFFF, "INF loaded alone")
    init_val = 32'h80; wr_sup = 1;
    @(negedge clk); wr_sup = 0;
    `CHECK(inf == 32'h10 && sup == 32'h80, "SUP loaded alone")
    init_val = 32'h55;
    repeat (3) @(negedge clk);
    `CHECK(inf == 32'h10 && sup == 32'h80, "no load without strobe")
    `TB_FINISH
  end
endmodule
