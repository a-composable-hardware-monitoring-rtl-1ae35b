// System test of the DCI's master mode: hw_monitor_top with DCI_MASTER = 1
// and a memory model on its AXI4-Lite master port (random AWREADY/WREADY
// delays).  Two runs of the operation and transaction sniffers are made;
// after each, clearing run must make the DCI copy result registers 5..11
// to M_BASE + 4 x index by itself.  The testbench reads the same registers
// through the slave port -- also while the copy is under way, to exercise
// the shared read port -- and compares them with the memory, checks the
// DCI status register (index 15: bit 0 busy, bit 1 error, bit 2 dump
// complete) and that nothing is written to memory while a run is going on.
`include "tb_check.svh"
module tb_top_dci_master;
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
  logic op_ev [2];
  logic irq;
  logic [31:0] m_awaddr, m_wdata;
  logic [3:0] m_wstrb;
  logic m_awvalid, m_wvalid, m_bready;
  logic m_awready = 0, m_wready = 0, m_bvalid = 0;
  logic [1:0] m_bresp = 0;

  localparam logic [31:0] BASE = 32'h1000_0000;
  hw_monitor_top #(.DCI_MASTER(1'b1), .M_BASE(BASE)) dut (.*);

  `include "tb_axil_host.svh"

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  logic [31:0] mem [logic [31:0]];
  int n_writes = 0;
  bit running = 0;
  int writes_while_running = 0;

  // memory model
  initial begin
    logic [31:0] a, d;
    bit got_a, got_w;
    forever begin
      got_a = 0; got_w = 0;
      while (!(got_a && got_w)) begin
        @(negedge clk);
        m_awready = !got_a && ($urandom_range(0, 1) == 0);
        m_wready  = !got_w && ($urandom_range(0, 1) == 0);
        @(posedge clk);
        if (m_awvalid && m_awready) begin a = m_awaddr; got_a = 1; end
        if (m_wvalid && m_wready)   begin d = m_wdata;  got_w = 1; end
      end
      @(negedge clk);
      m_awready = 0; m_wready = 0;
      mem[a] = d; n_writes++;
      if (running) writes_while_running++;
      m_bvalid = 1;
      @(posedge clk);
      while (!m_bready) @(posedge clk);
      @(negedge clk);
      m_bvalid = 0;
    end
  end

  logic [31:0] v;

  task automatic one_run(input int n0, input int n1, input int n_bursts);
    running = 1;
    host_wr(0, {22'd0, 2'b00, 2'b11, 2'b00, 2'b11, 1'b0, 1'b1});   // run; transaction, operation NO-FILTERING
    for (int i = 0; i < n0 || i < n1 || i < n_bursts; i++) begin
      op_ev[0] = (i < n0); op_ev[1] = (i < n1);
      cop_awvalid = (i < n_bursts); cop_awready = (i < n_bursts);
      cop_awaddr = 32'(i * 64); cop_awlen = 8'd3; cop_awsize = 3'd2;
      @(negedge clk);
    end
    op_ev[0] = 0; op_ev[1] = 0; cop_awvalid = 0; cop_awready = 0;
    repeat (4) @(negedge clk);
    running = 0;
    host_wr(0, {22'd0, 2'b00, 2'b11, 2'b00, 2'b11, 1'b0, 1'b0});   // stop: starts the dump
    // the dump starts four cycles after run falls; then read registers
    // through the slave while it runs
    repeat (4) @(negedge clk);
    host_rd(15, v);
    `CHECK(v[0] == 1'b1, $sformatf("dump under way after stop: status %h", v))
    host_rd(8, v);
    `CHECK(v == {12'd0, 10'(n1), 10'(n0)}, "slave read during dump")
    do host_rd(15, v); while (v[0]);
    `CHECK(v[2:1] == 2'b10, $sformatf("dump complete, no error: status %h", v))
    for (int r = 5; r <= 11; r++) begin
      host_rd(r, v);
      `CHECK(mem.exists(BASE + 32'(4 * r)) && mem[BASE + 32'(4 * r)] == v,
             $sformatf("register %0d copied to memory", r))
    end
    `CHECK(mem[BASE + 32'(4 * 5)] == 32'(16 * n_bursts), "transaction bytes in memory")
  endtask

  initial begin
    op_ev[0] = 0; op_ev[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    one_run(37, 12, 5);
    `CHECK(n_writes == 7, $sformatf("seven register writes, got %0d", n_writes))
    host_wr(0, 32'h2 | (32'b11 << 2) | (32'b11 << 6));   // soft reset between runs
    host_wr(0, 0);
    one_run(300, 1000, 9);
    `CHECK(n_writes == 14, $sformatf("seven more writes, got %0d", n_writes))
    `CHECK(writes_while_running == 0, "no memory writes during a run")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
