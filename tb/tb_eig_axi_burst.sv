// Testbench for eig_axi_burst: random AXI4 address-channel traffic (VALID
// held until READY); each accepted burst must produce exactly one event
// instance, at the next clock edge, with the address and (LEN+1) << SIZE bytes.
// A second instance watches the read channel.
`include "tb_check.svh"
module tb_eig_axi_burst;
  import mon_pkg::*;
  int checks = 0, failures = 0, bursts = 0, events = 0, rd_events = 0;
  logic clk = 0, rst_n = 0;
  logic awvalid = 0, awready = 0, arvalid = 0, arready = 0;
  logic [31:0] awaddr = 0, araddr = 0;
  logic [7:0] awlen = 0, arlen = 0;
  logic [2:0] awsize = 0, arsize = 0;
  event_inst_t ev, ev_rd;
  logic exp_good;
  logic [31:0] exp_addr;
  int exp_bytes;

  eig_axi_burst #(.ADDR_W(32), .DIR(1'b0)) dut (.*);
  eig_axi_burst #(.ADDR_W(32), .DIR(1'b1)) dut_rd (.clk, .rst_n, .awvalid, .awready, .awaddr, .awlen, .awsize,
    .arvalid, .arready, .araddr, .arlen, .arsize, .ev(ev_rd));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    exp_good = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // the values set at the last negedge were sampled at the posedge just
      // passed; the event for that handshake is visible now
      exp_good = awvalid && awready;
      exp_addr = awaddr;
      exp_bytes = (int'(awlen) + 1) << awsize;
      `CHECK(ev.good == exp_good, "one event per accepted burst, one cycle later")
      if (exp_good) begin
        events++;
        `CHECK(ev.data == exp_addr && 32'(ev.inc) == exp_bytes, $sformatf("bytes %0d expected %0d", ev.inc, exp_bytes))
      end
      if (ev_rd.good) rd_events++;
      if (awvalid && awready) begin
        bursts++;
        awvalid = 0;
      end
      if (!awvalid && $urandom_range(0, 2) == 0) begin
        awvalid = 1; awaddr = $urandom; awlen = 8'($urandom); awsize = 3'($urandom_range(0, 7));
      end
      awready = $urandom_range(0, 1);
      arvalid = 0; arready = 1;
      if (i == 1000) begin arvalid = 1; araddr = 32'h40; arlen = 3; arsize = 2; end
    end
    @(negedge clk);
    `CHECK(bursts > 100 && events == bursts, $sformatf("bursts %0d events %0d", bursts, events))
    `CHECK(rd_events == 1, "read-channel instance sees the one read burst only")
    `TB_FINISH
  end
endmodule
