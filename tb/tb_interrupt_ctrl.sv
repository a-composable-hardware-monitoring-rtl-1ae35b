// Testbench for interrupt_ctrl (4 sources): an enabled source rising above
// the threshold sets its pending bit and irq; a disabled one does not;
// write-1-to-clear; a result that stays above the threshold does not set
// the bit again; a new crossing does.
`include "tb_check.svh"
module tb_interrupt_ctrl;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0, irq;
  logic [1:0] wr_idx = 0, rd_idx = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [63:0] result [4];

  interrupt_ctrl #(.N_SRC(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic wr(input int idx, input logic [31:0] d);
    wr_en = 1; wr_idx = 2'(idx); wr_data = d; @(negedge clk); wr_en = 0;
  endtask

  initial begin
    for (int k = 0; k < 4; k++) result[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(!irq, "no interrupt after reset")
    wr(2, 100); wr(1, 4'b0101);
    rd_idx = 2; #1 `CHECK(rd_data == 100, "threshold readback")
    result[1] = 500; @(negedge clk); @(negedge clk);
    `CHECK(!irq, "disabled source ignored")
    result[2] = 101; @(negedge clk);
    `CHECK(irq, "enabled source above threshold")
    rd_idx = 0; #1 `CHECK(rd_data == 32'b0100, "pending bit 2")
    result[0] = 100; @(negedge clk);
    rd_idx = 0; #1 `CHECK(rd_data == 32'b0100, "equal to threshold is not above")
    wr(0, 32'b0100);
    `CHECK(!irq, "cleared by writing 1")
    repeat (3) @(negedge clk);
    `CHECK(!irq, "staying above does not re-raise")
    result[2] = 10; @(negedge clk); result[2] = 64'h1_0000_0000; @(negedge clk);
    `CHECK(irq, "new crossing (64-bit result) raises again")
    wr(1, 0);
    `CHECK(!irq, "disabling masks irq")
    `TB_FINISH
  end
endmodule
