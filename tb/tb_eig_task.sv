// Testbench for eig_task: start and done level signals; each rising edge
// gives one event instance a cycle later, data 1 for start and 0 for done.
`include "tb_check.svh"
module tb_eig_task;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, done = 0;
  event_inst_t ev;

  eig_task dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      start = 1; @(negedge clk);
      `CHECK(ev.good && ev.data == 1 && ev.inc == 1, "start event")
      repeat (3) begin @(negedge clk); `CHECK(!ev.good, "level held: no repeat") end
      start = 0; repeat ($urandom_range(1, 5)) @(negedge clk);
      `CHECK(!ev.good, "falling edge: no event")
      done = 1; @(negedge clk);
      `CHECK(ev.good && ev.data == 0, "end event")
      repeat (2) begin @(negedge clk); `CHECK(!ev.good, "done held: no repeat") end
      done = 0; @(negedge clk);
      `CHECK(!ev.good, "single end event")
    end
    start = 1; done = 1; @(negedge clk);
    `CHECK(ev.good && ev.data == 0, "simultaneous edges: end wins")
    `TB_FINISH
  end
endmodule
