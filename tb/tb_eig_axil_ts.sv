// Testbench for eig_axil_ts: AXI4-Lite writes with address and data in the
// same cycle, address first, and data first.  Only writes to TS_ADDR give
// an event instance (data = written value), one cycle after the write
// completes.
`include "tb_check.svh"
module tb_eig_axil_ts;
  import mon_pkg::*;
  int checks = 0, failures = 0, seen = 0;
  logic clk = 0, rst_n = 0;
  logic awvalid = 0, awready = 0, wvalid = 0, wready = 0;
  logic [13:0] awaddr = 0;
  logic [31:0] wdata = 0, last_data;
  event_inst_t ev;

  eig_axil_ts #(.ADDR_W(14), .TS_ADDR(14'h28)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (ev.good) begin seen++; last_data = ev.data; end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic aw(input logic [13:0] a);
    awvalid = 1; awready = 1; awaddr = a; @(negedge clk); awvalid = 0; awready = 0;
  endtask
  task automatic w(input logic [31:0] d);
    wvalid = 1; wready = 1; wdata = d; @(negedge clk); wvalid = 0; wready = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // together
    awvalid = 1; awready = 1; awaddr = 14'h28; wvalid = 1; wready = 1; wdata = 32'h11;
    @(negedge clk); {awvalid, awready, wvalid, wready} = 0;
    @(negedge clk);
    `CHECK(seen == 1 && last_data == 32'h11, "same-cycle write")
    aw(14'h28); repeat (3) @(negedge clk); w(32'h22); @(negedge clk);
    `CHECK(seen == 2 && last_data == 32'h22, "address first")
    w(32'h33); repeat (2) @(negedge clk); aw(14'h28); @(negedge clk);
    `CHECK(seen == 3 && last_data == 32'h33, "data first")
    aw(14'h24); w(32'h44); repeat (2) @(negedge clk);
    `CHECK(seen == 3, "other address ignored")
    awvalid = 1; awready = 0; awaddr = 14'h28; wvalid = 1; wready = 0; repeat (3) @(negedge clk);
    {awvalid, wvalid} = 0; @(negedge clk);
    `CHECK(seen == 3, "no handshake, no event")
    `TB_FINISH
  end
endmodule
