// Processor timestamp workload: 256 timestamps, one per coprocessor call,
// taken by single register writes while the coprocessor sniffers also run
// (the Edge Detection case with processor monitoring).  The top runs at its
// default size.  The processor sniffer is left at its reset window
// [0, all ones] and runs in FILTERING mode, so every VAL is recorded.  Each
// "call" is a write burst and a task of random length on the coprocessor
// probes followed by a timestamp write.  Afterwards the testbench reads the
// record count and all 256 records back and checks each VAL and the cycle
// distance between consecutive TIMESTAMPs, and the total task time.
`include "tb_check.svh"
module tb_workload_d4b256;
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
  // DCI master port, idle in this configuration: always ready, always OKAY
  logic [31:0] m_awaddr, m_wdata;
  logic [3:0] m_wstrb;
  logic m_awvalid, m_wvalid, m_bready;
  logic m_awready = 1, m_wready = 1, m_bvalid = 0;
  logic [1:0] m_bresp = 0;

  hw_monitor_top dut (.*);

  `include "tb_axil_host.svh"

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  localparam int N_TS = 256;
  int ts_cyc [N_TS];
  logic [31:0] ts_val [N_TS];
  longint exp_task = 0, exp_bytes = 0;
  logic [31:0] v, v2, t, t_prev;

  initial begin
    op_ev[0] = 0; op_ev[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // run: transaction NO-FILTERING, task NO-FILTERING, operation IDLE, processor FILTERING
    host_wr(0, {22'd0, 2'b10, 2'b00, 2'b11, 2'b11, 1'b0, 1'b1});
    for (int c = 0; c < N_TS; c++) begin
      int t0, len;
      // the processor prepares the input and marks the call
      ts_val[c] = $urandom();
      s_awaddr = 14'(4 * 10); s_awvalid = 1; s_wdata = ts_val[c]; s_wvalid = 1;
      #1;
      while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
      ts_cyc[c] = cyc;
      @(negedge clk);
      s_awvalid = 0; s_wvalid = 0;
      while (!s_bvalid) @(negedge clk);
      s_bready = 1; @(negedge clk); s_bready = 0;
      // the coprocessor call: one input burst, then the computation
      cop_awaddr = 32'h4000_0000; cop_awlen = 8'd63; cop_awsize = 3'd2;
      cop_awvalid = 1; cop_awready = 1; @(negedge clk);
      cop_awvalid = 0; cop_awready = 0;
      exp_bytes += 256;
      len = $urandom_range(5, 60);
      task_start = 1; t0 = cyc; repeat (len) @(negedge clk);
      task_done = 1; exp_task += longint'(cyc - t0); @(negedge clk);
      task_start = 0; task_done = 0;
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    host_wr(0, {22'd0, 2'b10, 2'b00, 2'b11, 2'b11, 1'b0, 1'b0});   // stop
    host_rd(9, v);
    `CHECK(v == N_TS, $sformatf("record count %0d", v))
    for (int j = 0; j < N_TS; j++) begin
      host_rd_addr(14'h2000 + 14'(8 * j), t);
      host_rd_addr(14'h2000 + 14'(8 * j) + 4, v);
      `CHECK(v == ts_val[j], $sformatf("record %0d VAL", j))
      if (j > 0)
        `CHECK(t - t_prev == 32'(ts_cyc[j] - ts_cyc[j - 1]), $sformatf("record %0d timestamp distance", j))
      t_prev = t;
    end
    host_rd(5, v);
    `CHECK(64'(v) == exp_bytes, $sformatf("bytes %0d expected %0d", v, exp_bytes))
    host_rd(6, v); host_rd(7, v2);
    `CHECK({v2, v} == 64'(exp_task), $sformatf("task cycles %0d expected %0d", {v2, v}, exp_task))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
