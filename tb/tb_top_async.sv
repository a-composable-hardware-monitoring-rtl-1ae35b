// tb_top_async - the monitor with its host port on a separate clock.
//
// The top is built with HOST_ASYNC = 1. The monitor clock `mclk` has a
// period of 10 time units and the host clock `clk` a period of 14, so the
// two drift against each other. On the monitor clock the testbench runs a
// coprocessor task of random length and pulses two operation events; on
// the host clock it programs the run, writes two timestamp values and
// reads everything back through the clock-domain bridge. It checks the
// task length, both event counts, the two timestamp records (VAL and
// increasing TIMESTAMP), the threshold interrupt as seen on the host clock
// and its clear, and that a register read takes a few host cycles more
// than on a single clock but stays bounded.
`include "tb_check.svh"
module tb_top_async;
  int checks = 0, failures = 0;
  logic clk = 0, mclk = 0, rst_n = 0;
  logic host_rst_n;
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
  logic op_ev [2];
  logic irq;
  // DCI master port, idle in this configuration
  logic [31:0] m_awaddr, m_wdata;
  logic [3:0] m_wstrb;
  logic m_awvalid, m_wvalid, m_bready;
  logic m_awready = 1, m_wready = 1, m_bvalid = 0;
  logic [1:0] m_bresp = 0;

  hw_monitor_top #(.HOST_ASYNC(1'b1)) dut (.clk(mclk), .host_clk(clk), .*);

  `include "tb_axil_host.svh"

  always #7 clk = ~clk;
  always #5 mclk = ~mclk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  function automatic logic [31:0] ctrl(bit run, bit srst, logic [1:0] p0, p1, p2, p3);
    return {22'd0, p3, p2, p1, p0, srst, run};
  endfunction

  int exp_op [2];
  int tlen, lat, n_xwr, n_xrd, n_irq;
  logic [31:0] v, v2, t_a, t_b;

  // host write / read that also count the host cycles of the read
  task automatic xrd(input int idx, output logic [31:0] r);
    int c0;
    c0 = 0;
    fork
      begin host_rd(idx, r); end
      begin forever begin @(posedge clk); c0++; end end
    join_any
    disable fork;
    lat = c0;
    n_xrd++;
  endtask

  initial begin
    op_ev[0] = 0; op_ev[1] = 0;
    exp_op[0] = 0; exp_op[1] = 0;
    n_xwr = 0; n_xrd = 0; n_irq = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    xrd(0, v);
    `CHECK(v == 0, "control register resets to zero")
    `CHECK(lat >= 4 && lat <= 20, $sformatf("host read across the bridge took %0d host cycles", lat))
    // interrupt when operation event 0 (source 2) exceeds 40
    host_wr(14, 40); host_wr(13, 32'b00_0100); n_xwr += 2;
    // run: transaction IDLE, task / operation / timestamp NO-FILTERING
    host_wr(0, ctrl(1, 0, 2'b00, 2'b11, 2'b11, 2'b11)); n_xwr++;
    repeat (4) @(negedge mclk);

    tlen = $urandom_range(50, 200);
    fork
      begin   // coprocessor task on the monitor clock
        repeat (10) @(negedge mclk);
        task_start = 1; @(negedge mclk); task_start = 0;
        repeat (tlen - 1) @(negedge mclk);
        task_done = 1; @(negedge mclk); task_done = 0;
      end
      begin   // operation events on the monitor clock
        for (int i = 0; i < 60; i++) begin
          op_ev[0] = 1; op_ev[1] = (i % 3 == 0);
          exp_op[0]++; exp_op[1] += int'(i % 3 == 0);
          @(negedge mclk);
          op_ev[0] = 0; op_ev[1] = 0;
          repeat ($urandom_range(0, 3)) @(negedge mclk);
        end
      end
      begin   // timestamps taken from the host clock
        repeat (20) @(negedge clk);
        host_wr(10, 1234); n_xwr++;
        repeat (30) @(negedge clk);
        host_wr(10, 77); n_xwr++;
      end
    join
    repeat (10) @(negedge clk);
    `CHECK(irq, "threshold interrupt seen on the host clock")
    if (irq) n_irq++;
    xrd(12, v); `CHECK(v == 32'b00_0100, $sformatf("pending source 2: %h", v))
    host_wr(12, 32'b00_0100); n_xwr++;
    repeat (6) @(negedge clk);
    `CHECK(!irq, "interrupt cleared across the bridge")

    host_wr(0, ctrl(0, 0, 2'b00, 2'b11, 2'b11, 2'b11)); n_xwr++;
    repeat (6) @(negedge clk);
    xrd(6, v); xrd(7, v2);
    `CHECK({v2, v} == 64'(tlen), $sformatf("task cycles %0d expected %0d", {v2, v}, tlen))
    xrd(8, v);
    `CHECK(v[9:0] == 10'(exp_op[0]) && v[19:10] == 10'(exp_op[1]),
           $sformatf("operation counts %0d %0d expected %0d %0d", v[9:0], v[19:10], exp_op[0], exp_op[1]))
    xrd(9, v); `CHECK(v == 2, $sformatf("timestamp records %0d expected 2", v))
    host_rd_addr(14'h2000, t_a); host_rd_addr(14'h2004, v);
    `CHECK(v == 1234, $sformatf("first record VAL %0d ts %0d", v, t_a))
    host_rd_addr(14'h2008, t_b); host_rd_addr(14'h200C, v);
    `CHECK(v == 77, $sformatf("second record VAL %0d ts %0d", v, t_b))
    `CHECK(t_b > t_a, $sformatf("timestamps increase: %0d then %0d", t_a, t_b))
    xrd(11, v); `CHECK(v[3:1] == 3'b111, $sformatf("task and operation DCAPFs acknowledged: %h", v))

    `CHECK(n_xwr > 0 && n_xrd > 0, "writes and reads crossed the bridge")
    `CHECK(n_irq > 0, "interrupt crossed to the host clock")
    $display("mechanisms: cross_writes=%0d cross_reads=%0d irq=%0d", n_xwr, n_xrd, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
