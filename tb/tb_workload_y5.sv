// Operation-level workload with three monitored datapath events and 20-bit
// counters, one result register per event (the largest operation-level
// configuration of the Selective Accumulations study).  The top is built
// with N_OP_EV = 3 and OP_CNT_W = 20; since 3 x 20 bits do not fit one
// register, the operation results occupy registers 8, 9 and 10 and the
// later registers move up by two (record count 11, time base 12, Wack 13,
// interrupt registers 14-16).  The testbench drives three event lines with
// different counts, one of them beyond 16 bits, runs the operation sniffer
// in NO-FILTERING mode with the others IDLE, and checks every count and
// that the IDLE sniffers stay at zero.
`include "tb_check.svh"
module tb_workload_y5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic host_clk, host_rst_n;   // host port on the monitor clock
  assign host_clk = clk;
  assign host_rst_n = rst_n;
  logic [13:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [3:0] s_wstrb = 4'hF;
  logic [1:0] s_bresp, s_rresp;
  logic cop_awvalid = 0, cop_awready = 0, cop_arvalid = 0, cop_arready = 0;
  logic [31:0] cop_awaddr = 0, cop_araddr = 0;
  logic [7:0] cop_awlen = 0, cop_arlen = 0;
  logic [2:0] cop_awsize = 0, cop_arsize = 0;
  logic task_start = 0, task_done = 0;
  logic op_ev [3];
  logic irq;
  // DCI master port, idle in this configuration: always ready, always OKAY
  logic [31:0] m_awaddr, m_wdata;
  logic [3:0] m_wstrb;
  logic m_awvalid, m_wvalid, m_bready;
  logic m_awready = 1, m_wready = 1, m_bvalid = 0;
  logic [1:0] m_bresp = 0;

  hw_monitor_top #(.N_OP_EV(3), .OP_CNT_W(20)) dut (.*);

  `include "tb_axil_host.svh"

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  int exp [3];
  logic [31:0] v;

  initial begin
    for (int k = 0; k < 3; k++) begin op_ev[k] = 0; exp[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    host_wr(0, {22'd0, 2'b00, 2'b11, 2'b00, 2'b00, 1'b0, 1'b1});   // run, operation sniffer NO-FILTERING
    // lane 0: 70000 back-to-back events (needs 17 bits); lanes 1, 2 random
    for (int i = 0; i < 70000; i++) begin
      op_ev[0] = 1;
      op_ev[1] = ($urandom_range(0, 3) == 0);
      op_ev[2] = (i % 1000 == 7);
      exp[0]++; exp[1] += int'(op_ev[1]); exp[2] += int'(op_ev[2]);
      @(negedge clk);
    end
    op_ev[0] = 0; op_ev[1] = 0; op_ev[2] = 0;
    repeat (4) @(negedge clk);
    host_wr(0, {22'd0, 2'b00, 2'b11, 2'b00, 2'b00, 1'b0, 1'b0});   // stop
    for (int k = 0; k < 3; k++) begin
      host_rd(8 + k, v);
      `CHECK(v == 32'(exp[k]), $sformatf("event %0d: %0d expected %0d", k, v, exp[k]))
    end
    host_rd(5, v); `CHECK(v == 0, "IDLE transaction sniffer stays at zero")
    // the IDLE processor sniffer never ran, so its acknowledger (DCAPF 5) stays low
    host_rd(13, v); `CHECK(v == 32'b101_1111, $sformatf("Wack register moved to index 13: %h", v))
    host_rd(11, v); `CHECK(v == 0, "record count moved to index 11")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
