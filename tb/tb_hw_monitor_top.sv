// End-to-end testbench of hw_monitor_top with every parameter at its
// default (4 sniffers, 23-bit transaction counter, 53-bit task counter,
// two 10-bit operation counters, 1024-entry timestamp memory).
//
// A behavioural stand-in for the monitored system drives the probes: AXI4
// write bursts on the coprocessor's slave port, start/done lines of a
// computation, and two operation-event lines.  The testbench acts as the
// host processor on the AXI4-Lite port.  It goes through a complete
// monitoring session:
//   1. INIT mode: range limits are loaded into the transaction sniffer
//      (address window) and the timestamp sniffer (VAL window);
//   2. run with the transaction and timestamp sniffers in FILTERING and the
//      others in NO-FILTERING, while bursts, a computation, operation events
//      and timestamp writes happen;
//   3. stop, check Wack, every result register against reference counts
//      kept by the testbench, and the timestamp records in memory;
//   4. NO-FILTERING run of the transaction sniffer up to counter saturation,
//      operation counter saturation, the threshold interrupt and its clear;
//   5. soft reset with one sniffer IDLE, which must keep its result.
// Each mechanism is counted; one that never happened counts as a failure.
`include "tb_check.svh"
module tb_hw_monitor_top;
  import mon_pkg::*;
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

  // mechanisms
  int m_init, m_filter_pass, m_filter_reject, m_nofilt, m_idle, m_pause;
  int m_srst, m_sat_trans, m_sat_op, m_irq, m_irq_clear, m_ts, m_bp, m_wack;

  // reference values
  longint exp_bytes, exp_task;
  int exp_op [2];
  int cyc;
  int ts_cyc [$];
  int ts_val [$];

  localparam logic [31:0] WIN_LO = 32'h4000_1000, WIN_HI = 32'h4000_1FFF;
  localparam int VAL_LO = 10, VAL_HI = 1000;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  function automatic logic [31:0] ctrl(input bit r, input bit sr, input logic [1:0] p0, p1, p2, p3);
    return {22'd0, p3, p2, p1, p0, sr, r};
  endfunction

  // ---------------- host (AXI4-Lite) ----------------
  // Returns the cycle at which the write was accepted.
  task automatic host_wr(input int idx, input logic [31:0] v, input int bdelay = 0);
    s_awaddr = 14'(4 * idx); s_awvalid = 1; s_wdata = v; s_wvalid = 1;
    #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    if (idx == R_TS) begin ts_cyc.push_back(cyc); ts_val.push_back(int'(v)); end
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    if (bdelay > 0) begin
      repeat (bdelay) @(negedge clk);
      `CHECK(s_bvalid, "write response held while BREADY is low")
      m_bp++;
    end
    while (!s_bvalid) @(negedge clk);
    `CHECK(s_bresp == 2'b00, "BRESP OKAY")
    s_bready = 1; @(negedge clk); s_bready = 0;
  endtask

  task automatic host_rd_addr(input logic [13:0] a, output logic [31:0] v);
    s_araddr = a; s_arvalid = 1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    v = s_rdata;
    s_rready = 1; @(negedge clk); s_rready = 0;
  endtask

  task automatic host_rd(input int idx, output logic [31:0] v);
    host_rd_addr(14'(4 * idx), v);
  endtask

  localparam int R_CTRL = 0, R_INIT0 = 1, R_TRANS = 5, R_TASK = 6, R_OPER = 8;
  localparam int R_TS_COUNT = 9, R_TS = 10, R_WACK = 11;
  localparam int R_PEND = 12, R_EN = 13, R_THR = 14;

  // ---------------- monitored-system stand-in ----------------
  task automatic burst(input logic [31:0] a, input logic [7:0] len, input logic [2:0] size, input bit counted);
    int stall = $urandom_range(0, 2);
    cop_awaddr = a; cop_awlen = len; cop_awsize = size; cop_awvalid = 1; cop_awready = 0;
    repeat (stall) @(negedge clk);   // slave not ready yet: no event
    cop_awready = 1; @(negedge clk);
    cop_awvalid = 0; cop_awready = 0;
    if (counted) exp_bytes += (longint'(len) + 1) << size;
  endtask

  task automatic random_bursts(input int n, input bit filtering, input bit running = 1);
    for (int i = 0; i < n; i++) begin
      logic [31:0] a;
      bit inside_win;
      case ($urandom_range(0, 2))
        0: a = WIN_LO + 32'($urandom_range(0, 32'hFFF));
        1: a = WIN_HI + 32'($urandom_range(1, 32'hFFFF));
        default: a = WIN_LO - 32'($urandom_range(1, 32'hFFFF));
      endcase
      inside_win = a >= WIN_LO && a <= WIN_HI;
      if (filtering && inside_win) m_filter_pass++;
      if (filtering && !inside_win) m_filter_reject++;
      burst(a, 8'($urandom_range(0, 15)), 3'($urandom_range(0, 3)), running && (!filtering || inside_win));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  task automatic op_pulses(input int lane, input int n, input bit counted);
    for (int i = 0; i < n; i++) begin
      op_ev[lane] = 1; @(negedge clk); op_ev[lane] = 0;
      if (counted) exp_op[lane] = exp_op[lane] + 1;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  task automatic run_task(input int len, input bit counted);
    int t0;
    task_start = 1; t0 = cyc; @(negedge clk);
    repeat (len - 1) @(negedge clk);
    task_done = 1;
    if (counted) exp_task += longint'(cyc - t0);
    @(negedge clk);
    task_start = 0; task_done = 0;
  endtask

  // ---------------- session ----------------
  logic [31:0] v, v2;
  int tlen;

  initial begin
    op_ev[0] = 0; op_ev[1] = 0;
    cyc = 0; exp_bytes = 0; exp_task = 0; exp_op[0] = 0; exp_op[1] = 0;
    {m_init, m_filter_pass, m_filter_reject, m_nofilt, m_idle, m_pause} = '0;
    {m_srst, m_sat_trans, m_sat_op, m_irq, m_irq_clear, m_ts, m_bp, m_wack} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // reset state
    host_rd(R_CTRL, v);  `CHECK(v == 0, "control register resets to zero")
    host_rd(R_TRANS, v); `CHECK(v == 0, "results reset to zero")
    host_rd(R_THR, v);   `CHECK(v == 32'hFFFF_FFFF, "threshold resets to all ones")

    // 1. INIT: transaction sniffer and timestamp sniffer
    host_wr(R_CTRL, ctrl(0, 0, 2'b01, 2'b00, 2'b00, 2'b01));
    host_wr(R_INIT0 + 0, WIN_LO); host_wr(R_INIT0 + 0, WIN_HI);
    host_wr(R_INIT0 + 3, VAL_LO); host_wr(R_INIT0 + 3, VAL_HI);
    host_rd(R_INIT0 + 0, v); `CHECK(v == WIN_HI, "init register holds last value")
    m_init++;

    // interrupt on operation event 0 (source 2) above 100
    host_wr(R_THR, 100); host_wr(R_EN, 32'b00_0100);

    // 2. run
    host_wr(R_CTRL, ctrl(1, 0, 2'b10, 2'b11, 2'b11, 2'b10));
    host_rd(R_WACK, v);
    `CHECK(v[4] == 1'b0, "timestamp-record DCAPF not acknowledged while running")
    fork
      random_bursts(60, 1);
      op_pulses(0, 150, 1);
      op_pulses(1, 77, 1);
      begin
        repeat (20) @(negedge clk);
        tlen = $urandom_range(50, 300);
        run_task(tlen, 1);
      end
      begin
        // timestamps: in-range VALs are recorded, the others are not
        host_wr(R_TS, 17, 3);
        repeat ($urandom_range(5, 40)) @(negedge clk);
        host_wr(R_TS, 5000);
        repeat ($urandom_range(5, 40)) @(negedge clk);
        host_wr(R_TS, 333);
        repeat ($urandom_range(5, 40)) @(negedge clk);
        host_wr(R_TS, 999);
      end
    join
    repeat (5) @(negedge clk);
    `CHECK(irq, "interrupt raised by operation count above threshold")
    host_rd(R_PEND, v);
    `CHECK(v == 32'b00_0100, "interrupt pending bit of source 2")
    if (irq) m_irq++;
    host_wr(R_PEND, 32'b00_0100);
    `CHECK(!irq, "interrupt cleared")
    host_rd(R_PEND, v);
    `CHECK(v == 0, "pending bit cleared")
    if (!irq && v == 0) m_irq_clear++;

    // 3. stop and read
    host_wr(R_CTRL, ctrl(0, 0, 2'b10, 2'b11, 2'b11, 2'b10));
    // activity while stopped must not count
    random_bursts(5, 0, 0);
    op_pulses(1, 10, 0);
    m_pause++;
    host_rd(R_WACK, v);
    `CHECK(v == 32'h3F, $sformatf("all DCAPFs acknowledge after stop: %h", v))
    if (v == 32'h3F) m_wack++;
    host_rd(R_TRANS, v);
    `CHECK(64'(v) == exp_bytes, $sformatf("bytes in window %0d expected %0d", v, exp_bytes))
    host_rd(R_TASK, v); host_rd(R_TASK + 1, v2);
    `CHECK({v2, v} == 64'(exp_task), $sformatf("task cycles %0d expected %0d", {v2, v}, exp_task))
    host_rd(R_OPER, v);
    `CHECK(v[9:0] == 10'(exp_op[0]) && v[19:10] == 10'(exp_op[1]) && v[31:20] == 0,
           $sformatf("operation counts %0d %0d expected %0d %0d", v[9:0], v[19:10], exp_op[0], exp_op[1]))
    host_rd(R_TS_COUNT, v);
    `CHECK(v == 3, $sformatf("three records in the VAL window, got %0d", v))
    begin
      int idx [3] = '{0, 2, 3};  // writes that fell in the window
      logic [31:0] t_prev;
      for (int j = 0; j < 3; j++) begin
        logic [31:0] t, val;
        host_rd_addr(14'h2000 + 14'(8 * j), t);
        host_rd_addr(14'h2000 + 14'(8 * j) + 4, val);
        `CHECK(val == 32'(ts_val[idx[j]]), $sformatf("record %0d VAL %0d", j, val))
        if (j > 0)
          `CHECK(t - t_prev == 32'(ts_cyc[idx[j]] - ts_cyc[idx[j - 1]]),
                 $sformatf("record %0d timestamp distance %0d expected %0d", j, t - t_prev,
                           ts_cyc[idx[j]] - ts_cyc[idx[j - 1]]))
        t_prev = t;
        m_ts++;
      end
    end
    host_rd(R_TS, v); host_rd(R_TS, v2);
    `CHECK(v == v2 && v != 0, "time base frozen while stopped")

    // 4. NO-FILTERING transaction run to saturation; operation saturation
    exp_bytes = 0;
    host_wr(R_CTRL, ctrl(0, 1, 2'b11, 2'b00, 2'b11, 2'b10));   // soft reset, task sniffer IDLE
    repeat (3) @(negedge clk);   // result capture follows the count by two cycles
    host_rd(R_TRANS, v); `CHECK(v == 0, $sformatf("soft reset clears the transaction count: %0d", v))
    host_wr(R_CTRL, ctrl(1, 0, 2'b11, 2'b00, 2'b11, 2'b10));
    random_bursts(10, 0);
    m_nofilt++;
    repeat (3) @(negedge clk);
    host_rd(R_TRANS, v);
    `CHECK(64'(v) == exp_bytes, $sformatf("NO-FILTERING counts every burst: %0d expected %0d", v, exp_bytes))
    for (int i = 0; i < 260; i++) burst(32'h8000_0000 + 32'(i * 4096), 8'd255, 3'd7, 1);
    repeat (3) @(negedge clk);
    host_rd(R_TRANS, v);
    `CHECK(exp_bytes > 64'h7F_FFFF && v == 32'h7F_FFFF, $sformatf("23-bit byte count saturates: %h", v))
    if (v == 32'h7F_FFFF) m_sat_trans++;
    op_pulses(0, 1100, 1);
    repeat (3) @(negedge clk);
    host_rd(R_OPER, v);
    `CHECK(v[9:0] == 10'h3FF, $sformatf("10-bit operation count saturates: %0d", v[9:0]))
    if (v[9:0] == 10'h3FF) m_sat_op++;

    // 5. task sniffer IDLE, soft reset of the others
    host_rd(R_TASK, v2);
    host_wr(R_CTRL, ctrl(1, 0, 2'b11, 2'b00, 2'b11, 2'b10));
    run_task(40, 0);
    repeat (3) @(negedge clk);
    host_rd(R_TASK, v);
    `CHECK(v == v2, "IDLE sniffer ignores its events")
    m_idle++;
    host_wr(R_CTRL, ctrl(1, 1, 2'b11, 2'b00, 2'b11, 2'b10));
    repeat (3) @(negedge clk);
    host_rd(R_TRANS, v);  `CHECK(v == 0, "soft reset clears transaction bytes")
    host_rd(R_OPER, v);   `CHECK(v == 0, "soft reset clears operation counts")
    host_rd(R_TS_COUNT, v); `CHECK(v == 0, "soft reset clears record count")
    host_rd(R_TASK, v);   `CHECK(v == v2 && v != 0, "IDLE sniffer keeps its result through soft reset")
    m_srst++;
    host_wr(R_CTRL, 0);

    host_rd(15, v);
    `CHECK(v == 0, "DCI master side idle in slave-only configuration")
    `CHECK(!m_awvalid && !m_wvalid, "no master writes")

    // mechanisms
    `CHECK(m_init > 0, "INIT mode used")
    `CHECK(m_filter_pass > 0, "filter passed a burst")
    `CHECK(m_filter_reject > 0, "filter rejected a burst")
    `CHECK(m_nofilt > 0, "NO-FILTERING mode used")
    `CHECK(m_idle > 0, "IDLE mode used")
    `CHECK(m_pause > 0, "run bit cleared while events occur")
    `CHECK(m_srst > 0, "soft reset")
    `CHECK(m_sat_trans > 0, "transaction counter saturation")
    `CHECK(m_sat_op > 0, "operation counter saturation")
    `CHECK(m_irq > 0, "threshold interrupt")
    `CHECK(m_irq_clear > 0, "interrupt clear")
    `CHECK(m_ts > 0, "timestamp records")
    `CHECK(m_bp > 0, "write-response back pressure")
    `CHECK(m_wack > 0, "Wack register")
    $display("mechanisms: init=%0d filt_pass=%0d filt_reject=%0d nofilt=%0d idle=%0d pause=%0d srst=%0d sat_trans=%0d sat_op=%0d irq=%0d irq_clear=%0d ts=%0d backpressure=%0d wack=%0d",
             m_init, m_filter_pass, m_filter_reject, m_nofilt, m_idle, m_pause, m_srst,
             m_sat_trans, m_sat_op, m_irq, m_irq_clear, m_ts, m_bp, m_wack);
    `TB_FINISH
  end
endmodule
