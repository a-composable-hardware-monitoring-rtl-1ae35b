// Testbench for eig_opevents (3 events, 2-bit occurrence counts): every
// non-zero count gives an event instance on its lane one cycle later with
// the count as increment and the event index as data.
`include "tb_check.svh"
module tb_eig_opevents;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] occ [3];
  logic [1:0] prev [3];
  event_inst_t ev [3];

  eig_opevents #(.N_EV(3), .OCC_W(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    for (int k = 0; k < 3; k++) occ[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        prev[k] = occ[k];
        occ[k] = 2'($urandom);
      end
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        `CHECK(ev[k].good == (occ[k] != 0), "lane valid when count non-zero")
        if (occ[k] != 0) `CHECK(ev[k].inc == 16'(occ[k]) && ev[k].data == 32'(k), "increment and index")
      end
    end
    `TB_FINISH
  end
endmodule
