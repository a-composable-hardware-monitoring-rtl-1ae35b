// hw_monitor_top -- the global monitoring system with its four sniffers, as
// evaluated on a processor + dataflow-coprocessor system.
//
// Sniffers (each an EIG + dispenser + DCAPFs), numbered as in the LMIC:
//   0 transaction level: watches the coprocessor's AXI4 slave port and
//     accumulates the bytes of the write bursts that fall in an address
//     range (23-bit counter);
//   1 task level: watches the start and done lines of the coprocessor's
//     front and back end and measures the computation time in cycles
//     (53-bit counter, two registers);
//   2 operation level: counts N_OP_EV events brought out of the data
//     cruncher, one DCAPF and an OP_CNT_W-bit counter per event;
//   3 microprocessor: when the host writes a value VAL to the timestamp
//     register, records {VAL, TIMESTAMP} in the timestamp memory; it counts
//     the records (those whose VAL lies in its filter range) and keeps a
//     32-bit free-running time base.
// One LMIC controls all four and collects their results; the DCI (an
// AXI4-Lite slave) gives the host the register space and the timestamp
// memory; the interrupt controller raises `irq` when an enabled result
// exceeds a threshold.  With DCI_MASTER = 1 the DCI also works as a bus
// master: four cycles after the host clears run (time for the last results
// to reach their registers) it copies registers 5..Wack to M_BASE + 4 x
// index on the m_* AXI4-Lite write channels.  The slave and master sides
// share the register read port, the slave first.  With DCI_MASTER = 0 (the
// evaluated system, where the host reads the results) the master port
// stays idle.
//
// Register map (32-bit registers, byte address = 4 x index), with the
// default parameters:
//   0 control   1..4 init of sniffers 0..3   5 transaction bytes
//   6,7 task cycles (low, high)   8 operation counts (event k at bits
//   10k..10k+9)   9 timestamps recorded   10 time base; a write here takes
//   a timestamp   11 Wack of every DCAPF   12 interrupt pending (write 1 to
//   clear)   13 interrupt enable   14 threshold   15 DCI status (bit 0
//   dump busy, bit 1 dump error, bit 2 dump complete)
// Timestamp record j: byte address 0x2000 + 8j (TIMESTAMP), +4 (VAL).
// With more operation events than fit in one register (N_OP_EV x OP_CNT_W
// > 32), each event gets its own register and the later registers move up.
//
// The block structure, the four sniffers, the counter sizes, one LMIC with
// sixteen 32-bit registers (one control, four initialisation, eleven for
// results) and the AXI4-Lite DCI in slave or master form follow the
// published system; the exact register assignment, the timestamp-memory
// size and layout, the dump trigger and the clock-domain bridge are this design's
// choice.  Sniffers, LMIC and DCI run on `clk` with an active-low
// asynchronous reset `rst_n`.  With HOST_ASYNC = 0 the host port s_* is
// also timed by `clk` and host_clk / host_rst_n are unused.  With
// HOST_ASYNC = 1 the host port and `irq` belong to `host_clk` (reset
// `host_rst_n`, asserted together with `rst_n`): an AXI4-Lite clock-domain
// bridge carries each host transaction to the DCI and two flip-flops bring
// `irq` across, so collecting and reading results run at their own speeds.
// The bridge adds about three cycles of each clock to every host access.
// The DCI master port m_* always stays on `clk`.
module hw_monitor_top
  import mon_pkg::*;
#(
  parameter int unsigned ADDR_W      = 14,
  parameter int unsigned COP_ADDR_W  = 32,
  parameter bit          TRANS_DIR   = 1'b0,   // 0 write bursts, 1 read
  parameter int unsigned TRANS_CNT_W = 23,
  parameter int unsigned TASK_CNT_W  = 53,
  parameter int unsigned N_OP_EV     = 2,
  parameter int unsigned OP_CNT_W    = 10,
  parameter int unsigned TS_DEPTH    = 1024,
  parameter bit          DCI_MASTER  = 1'b0,   // 1: dump results to memory after each run
  parameter int unsigned M_ADDR_W    = 32,
  parameter logic [M_ADDR_W-1:0] M_BASE = '0,
  parameter bit          HOST_ASYNC  = 1'b0    // 1: host port on its own clock
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  host_clk,
  input  logic                  host_rst_n,
  // host AXI4-Lite port of the DCI
  input  logic [ADDR_W-1:0]     s_awaddr,
  input  logic                  s_awvalid,
  output logic                  s_awready,
  input  logic [31:0]           s_wdata,
  input  logic [3:0]            s_wstrb,
  input  logic                  s_wvalid,
  output logic                  s_wready,
  output logic [1:0]            s_bresp,
  output logic                  s_bvalid,
  input  logic                  s_bready,
  input  logic [ADDR_W-1:0]     s_araddr,
  input  logic                  s_arvalid,
  output logic                  s_arready,
  output logic [31:0]           s_rdata,
  output logic [1:0]            s_rresp,
  output logic                  s_rvalid,
  input  logic                  s_rready,
  // probes on the coprocessor's AXI4 slave port (transaction level)
  input  logic                  cop_awvalid,
  input  logic                  cop_awready,
  input  logic [COP_ADDR_W-1:0] cop_awaddr,
  input  logic [7:0]            cop_awlen,
  input  logic [2:0]            cop_awsize,
  input  logic                  cop_arvalid,
  input  logic                  cop_arready,
  input  logic [COP_ADDR_W-1:0] cop_araddr,
  input  logic [7:0]            cop_arlen,
  input  logic [2:0]            cop_arsize,
  // probes on the coprocessor's front and back end (task level)
  input  logic                  task_start,
  input  logic                  task_done,
  // probes on the data cruncher (operation level)
  input  logic                  op_ev [N_OP_EV],
  // AXI4-Lite master of the DCI (write channels), used when DCI_MASTER = 1
  output logic [M_ADDR_W-1:0]   m_awaddr,
  output logic                  m_awvalid,
  input  logic                  m_awready,
  output logic [31:0]           m_wdata,
  output logic [3:0]            m_wstrb,
  output logic                  m_wvalid,
  input  logic                  m_wready,
  input  logic [1:0]            m_bresp,
  input  logic                  m_bvalid,
  output logic                  m_bready,
  // interrupt towards the host
  output logic                  irq
);
  // ---------------- register map ----------------
  localparam int unsigned N_SNIF     = 4;
  localparam int unsigned N_DC       = 2 + N_OP_EV + 2;
  localparam bit          OP_PACKED  = (N_OP_EV * OP_CNT_W) <= REG_W;
  localparam int unsigned N_OP_REGS  = OP_PACKED ? 1 : N_OP_EV;
  localparam int unsigned R_TRANS    = 1 + N_SNIF;
  localparam int unsigned R_TASK     = R_TRANS + 1;
  localparam int unsigned R_OPER     = R_TASK + 2;
  localparam int unsigned R_TS_COUNT = R_OPER + N_OP_REGS;
  localparam int unsigned R_TS       = R_TS_COUNT + 1;
  localparam int unsigned R_WACK     = R_TS + 1;
  localparam int unsigned N_LMIC     = R_WACK + 1;
  localparam int unsigned R_IRQ      = N_LMIC;
  localparam int unsigned R_DCI_ST   = R_IRQ + 3;
  localparam int unsigned N_REGS_ALL = 1 << $clog2(R_DCI_ST + 1);
  localparam int unsigned IDX_W      = $clog2(N_REGS_ALL);
  localparam int unsigned LMIC_IDX_W = $clog2(N_LMIC);

  // One 8-bit field per DCAPF (DCAPF 0 lowest): result register, first bit
  // and width of each result in the LMIC result space.
  typedef bit [8*N_DC-1:0] dc_vec_t;

  function automatic dc_vec_t f_dc_reg();
    dc_vec_t a = '0;
    a[0 +: 8] = 8'(R_TRANS);
    a[8 +: 8] = 8'(R_TASK);
    for (int k = 0; k < N_OP_EV; k++) a[8*(2+k) +: 8] = 8'(OP_PACKED ? R_OPER : R_OPER + k);
    a[8*(2+N_OP_EV) +: 8] = 8'(R_TS_COUNT);
    a[8*(3+N_OP_EV) +: 8] = 8'(R_TS);
    return a;
  endfunction

  function automatic dc_vec_t f_dc_lsb();
    dc_vec_t a = '0;
    for (int k = 0; k < N_OP_EV; k++) a[8*(2+k) +: 8] = 8'(OP_PACKED ? k * OP_CNT_W : 0);
    return a;
  endfunction

  function automatic dc_vec_t f_dc_w();
    dc_vec_t a = '0;
    a[0 +: 8] = 8'(TRANS_CNT_W);
    a[8 +: 8] = 8'(TASK_CNT_W);
    for (int k = 0; k < N_OP_EV; k++) a[8*(2+k) +: 8] = 8'(OP_CNT_W);
    a[8*(2+N_OP_EV) +: 8] = 8'd32;
    a[8*(3+N_OP_EV) +: 8] = 8'd32;
    return a;
  endfunction

  localparam dc_vec_t DC_REG = f_dc_reg();
  localparam dc_vec_t DC_LSB = f_dc_lsb();
  localparam dc_vec_t DC_W   = f_dc_w();
  localparam logic [ADDR_W-1:0] TS_ADDR = ADDR_W'(R_TS * 4);
  localparam int unsigned TS_AW = $clog2(TS_DEPTH);

  // ---------------- LMIC ----------------
  logic                lmic_wr;
  logic [IDX_W-1:0]    reg_widx, reg_ridx;
  logic [REG_W-1:0]    reg_wdata, reg_rdata, lmic_rdata, ic_rdata;
  logic                run, srst;
  prog_e               prog     [N_SNIF];
  logic                init_wr  [N_SNIF];
  logic [REG_W-1:0]    init_val [N_SNIF];
  mon_info_t           info     [N_DC];
  // host port as seen on `clk` (after the bridge when HOST_ASYNC = 1)
  logic [ADDR_W-1:0] d_awaddr, d_araddr;
  logic              d_awvalid, d_awready, d_wvalid, d_wready, d_bvalid, d_bready;
  logic              d_arvalid, d_arready, d_rvalid, d_rready;
  logic [31:0]       d_wdata, d_rdata;
  logic [3:0]        d_wstrb;
  logic [1:0]        d_bresp, d_rresp;
  logic                reg_wr;

  always_comb lmic_wr = reg_wr && (32'(reg_widx) < N_LMIC);

  lmic #(
    .N_SNIF  (N_SNIF),
    .N_DCAPF (N_DC),
    .N_REGS  (N_LMIC),
    .WACK_REG(R_WACK),
    .DC_REG  (DC_REG),
    .DC_LSB  (DC_LSB),
    .DC_W    (DC_W)
  ) u_lmic (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (lmic_wr),
    .wr_idx  (LMIC_IDX_W'(reg_widx)),
    .wr_data (reg_wdata),
    .rd_idx  (LMIC_IDX_W'(reg_ridx)),
    .rd_data (lmic_rdata),
    .run     (run),
    .srst    (srst),
    .prog    (prog),
    .init_wr (init_wr),
    .init_val(init_val),
    .info    (info)
  );

  // ---------------- sniffer 0: transaction level ----------------
  event_inst_t ev_trans [1];
  mon_info_t   info_trans [1];

  eig_axi_burst #(.ADDR_W(COP_ADDR_W), .DIR(TRANS_DIR)) u_eig_trans (
    .clk    (clk),
    .rst_n  (rst_n),
    .awvalid(cop_awvalid),
    .awready(cop_awready),
    .awaddr (cop_awaddr),
    .awlen  (cop_awlen),
    .awsize (cop_awsize),
    .arvalid(cop_arvalid),
    .arready(cop_arready),
    .araddr (cop_araddr),
    .arlen  (cop_arlen),
    .arsize (cop_arsize),
    .ev     (ev_trans[0])
  );

  sniffer #(
    .N_DCAPF       (1),
    .SNIFFER_ID    (ID_W'(1)),
    .CONFIG        (3'b100),
    .EVMON_CONFIG  (3'b011),   // filter, catcher
    .TIMEMON_CONFIG(4'b0000),
    .CNT_EV_W      (8'(TRANS_CNT_W)),
    .CNT_TIME_W    (8'd1)
  ) u_snif_trans (
    .clk     (clk),
    .rst_n   (rst_n),
    .run     (run),
    .srst    (srst),
    .prog    (prog[0]),
    .init_wr (init_wr[0]),
    .init_val(init_val[0]),
    .ev_in   (ev_trans),
    .info    (info_trans)
  );

  // ---------------- sniffer 1: task level ----------------
  event_inst_t ev_task [1];
  mon_info_t   info_task [1];

  eig_task u_eig_task (
    .clk  (clk),
    .rst_n(rst_n),
    .start(task_start),
    .done (task_done),
    .ev   (ev_task[0])
  );

  sniffer #(
    .N_DCAPF       (1),
    .SNIFFER_ID    (ID_W'(2)),
    .CONFIG        (3'b010),
    .EVMON_CONFIG  (3'b000),
    .TIMEMON_CONFIG(4'b0010),  // time capture only
    .CNT_EV_W      (8'd1),
    .CNT_TIME_W    (8'(TASK_CNT_W))
  ) u_snif_task (
    .clk     (clk),
    .rst_n   (rst_n),
    .run     (run),
    .srst    (srst),
    .prog    (prog[1]),
    .init_wr (init_wr[1]),
    .init_val(init_val[1]),
    .ev_in   (ev_task),
    .info    (info_task)
  );

  // ---------------- sniffer 2: operation level ----------------
  event_inst_t ev_op   [N_OP_EV];
  mon_info_t   info_op [N_OP_EV];
  logic [0:0]  op_occ  [N_OP_EV];

  always_comb for (int k = 0; k < N_OP_EV; k++) op_occ[k] = op_ev[k];

  eig_opevents #(.N_EV(N_OP_EV), .OCC_W(1)) u_eig_op (
    .clk  (clk),
    .rst_n(rst_n),
    .occ  (op_occ),
    .ev   (ev_op)
  );

  sniffer #(
    .N_DCAPF       (N_OP_EV),
    .SNIFFER_ID    (ID_W'(3)),
    .CONFIG        ({N_OP_EV{3'b100}}),
    .EVMON_CONFIG  ({N_OP_EV{3'b000}}),  // event capture and counter only
    .TIMEMON_CONFIG({N_OP_EV{4'b0000}}),
    .CNT_EV_W      ({N_OP_EV{8'(OP_CNT_W)}}),
    .CNT_TIME_W    ({N_OP_EV{8'd1}})
  ) u_snif_op (
    .clk     (clk),
    .rst_n   (rst_n),
    .run     (run),
    .srst    (srst),
    .prog    (prog[2]),
    .init_wr (init_wr[2]),
    .init_val(init_val[2]),
    .ev_in   (ev_op),
    .info    (info_op)
  );

  // ---------------- sniffer 3: microprocessor timestamps ----------------
  // DCAPF 0: event monitor with filter, catcher and acknowledger (records);
  // DCAPF 1: time monitor without time capture (free-running time base).
  localparam bit [5:0]  CPU_CONFIG     = {3'b010, 3'b100};
  localparam bit [5:0]  CPU_EVMON      = {3'b000, 3'b111};
  localparam bit [7:0]  CPU_TIMEMON    = {4'b0000, 4'b0000};
  localparam bit [15:0] CPU_CNT_EV_W   = {8'd1, 8'd32};
  localparam bit [15:0] CPU_CNT_TIME_W = {8'd32, 8'd1};

  event_inst_t ev_cpu_one;
  event_inst_t ev_cpu   [2];
  mon_info_t   info_cpu [2];

  eig_axil_ts #(.ADDR_W(ADDR_W), .TS_ADDR(TS_ADDR)) u_eig_cpu (
    .clk    (clk),
    .rst_n  (rst_n),
    .awvalid(d_awvalid),
    .awready(d_awready),
    .awaddr (d_awaddr),
    .wvalid (d_wvalid),
    .wready (d_wready),
    .wdata  (d_wdata),
    .ev     (ev_cpu_one)
  );

  always_comb begin
    ev_cpu[0] = ev_cpu_one;
    ev_cpu[1] = ev_cpu_one;
  end

  sniffer #(
    .N_DCAPF       (2),
    .SNIFFER_ID    (ID_W'(4)),
    .CONFIG        (CPU_CONFIG),
    .EVMON_CONFIG  (CPU_EVMON),
    .TIMEMON_CONFIG(CPU_TIMEMON),
    .CNT_EV_W      (CPU_CNT_EV_W),
    .CNT_TIME_W    (CPU_CNT_TIME_W)
  ) u_snif_cpu (
    .clk     (clk),
    .rst_n   (rst_n),
    .run     (run),
    .srst    (srst),
    .prog    (prog[3]),
    .init_wr (init_wr[3]),
    .init_val(init_val[3]),
    .ev_in   (ev_cpu),
    .info    (info_cpu)
  );

  // Record {VAL, TIMESTAMP} when the record count has just grown.
  logic             ts_we;
  logic [TS_AW-1:0] ts_waddr;
  logic [63:0]      ts_wdata;
  logic             mem_re;
  logic [TS_AW-1:0] mem_raddr;
  logic [63:0]      mem_rdata;

  always_comb begin
    ts_we    = info_cpu[0].catch_s && (info_cpu[0].result != '0);
    ts_waddr = TS_AW'(info_cpu[0].result - 1'b1);
    ts_wdata = {info_cpu[0].attr, info_cpu[1].result[31:0]};
  end

  tst_mem #(.DEPTH(TS_DEPTH), .W(64)) u_tst_mem (
    .clk  (clk),
    .we   (ts_we),
    .waddr(ts_waddr),
    .wdata(ts_wdata),
    .re   (mem_re),
    .raddr(mem_raddr),
    .rdata(mem_rdata)
  );

  // ---------------- monitoring information to the LMIC ----------------
  always_comb begin
    info[0] = info_trans[0];
    info[1] = info_task[0];
    for (int k = 0; k < N_OP_EV; k++) info[2 + k] = info_op[k];
    info[2 + N_OP_EV] = info_cpu[0];
    info[3 + N_OP_EV] = info_cpu[1];
  end

  // ---------------- interrupt controller ----------------
  logic             irq_c;                 // interrupt on the monitor clock
  logic [RES_W-1:0] irq_res [N_DC];
  logic             ic_wr;

  always_comb begin
    for (int k = 0; k < N_DC; k++) irq_res[k] = info[k].result;
    ic_wr = reg_wr && (32'(reg_widx) >= R_IRQ) && (32'(reg_widx) < R_IRQ + 3);
  end

  interrupt_ctrl #(.N_SRC(N_DC)) u_ic (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (ic_wr),
    .wr_idx (2'(32'(reg_widx) - R_IRQ)),
    .wr_data(reg_wdata),
    .rd_idx (2'(32'(reg_ridx) - R_IRQ)),
    .rd_data(ic_rdata),
    .result (irq_res),
    .irq    (irq_c)
  );

  // DCI slave/master signals (see the DCI section below)
  logic             s_rd_hs, m_busy, m_done, m_err, m_start, run_q, dumped_q;
  logic [2:0]       drain_q;
  logic [IDX_W-1:0] s_ridx, m_ridx;

  always_comb begin
    if (32'(reg_ridx) < N_LMIC)          reg_rdata = lmic_rdata;
    else if (32'(reg_ridx) < R_IRQ + 3) reg_rdata = ic_rdata;
    else if (32'(reg_ridx) == R_DCI_ST) reg_rdata = REG_W'({dumped_q, m_err, m_busy || m_done});
    else                                 reg_rdata = '0;
  end

  // ---------------- DCI ----------------
  // The slave side and the master side share the register read port; the
  // slave has priority in the cycle it accepts a read address.

  always_comb begin
    s_rd_hs  = s_arvalid && s_arready;
    reg_ridx = (m_busy && !s_rd_hs) ? m_ridx : s_ridx;
  end

  // Master mode: when run falls, wait for the last results to reach the
  // registers, then copy the result registers and Wack to memory.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q    <= 1'b0;
      drain_q  <= '0;
      dumped_q <= 1'b0;
    end else begin
      run_q <= run;
      if (m_start)     dumped_q <= 1'b0;
      else if (m_done) dumped_q <= 1'b1;
      if (DCI_MASTER && run_q && !run) drain_q <= 3'd4;
      else if (drain_q != '0)          drain_q <= drain_q - 1'b1;
    end
  end
  always_comb m_start = (drain_q == 3'd1);

  dci_axil_master #(
    .M_ADDR_W(M_ADDR_W),
    .IDX_W   (IDX_W),
    .FIRST   (R_TRANS),
    .LAST    (R_WACK)
  ) u_dci_m (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (m_start),
    .base     (M_BASE),
    .busy     (m_busy),
    .done     (m_done),
    .err      (m_err),
    .rd_grant (!s_rd_hs),
    .reg_ridx (m_ridx),
    .reg_rdata(reg_rdata),
    .m_awaddr (m_awaddr),
    .m_awvalid(m_awvalid),
    .m_awready(m_awready),
    .m_wdata  (m_wdata),
    .m_wstrb  (m_wstrb),
    .m_wvalid (m_wvalid),
    .m_wready (m_wready),
    .m_bresp  (m_bresp),
    .m_bvalid (m_bvalid),
    .m_bready (m_bready)
  );

  // ---- host port: same clock, or through the clock-domain bridge ----

  if (HOST_ASYNC) begin : g_async
    logic [1:0] irq_sync;
    axil_cdc #(.ADDR_W(ADDR_W)) u_cdc (
      .s_clk    (host_clk),
      .s_rst_n  (host_rst_n),
      .s_awaddr (s_awaddr),
      .s_awvalid(s_awvalid),
      .s_awready(s_awready),
      .s_wdata  (s_wdata),
      .s_wstrb  (s_wstrb),
      .s_wvalid (s_wvalid),
      .s_wready (s_wready),
      .s_bresp  (s_bresp),
      .s_bvalid (s_bvalid),
      .s_bready (s_bready),
      .s_araddr (s_araddr),
      .s_arvalid(s_arvalid),
      .s_arready(s_arready),
      .s_rdata  (s_rdata),
      .s_rresp  (s_rresp),
      .s_rvalid (s_rvalid),
      .s_rready (s_rready),
      .c_clk    (clk),
      .c_rst_n  (rst_n),
      .c_awaddr (d_awaddr),
      .c_awvalid(d_awvalid),
      .c_awready(d_awready),
      .c_wdata  (d_wdata),
      .c_wstrb  (d_wstrb),
      .c_wvalid (d_wvalid),
      .c_wready (d_wready),
      .c_bresp  (d_bresp),
      .c_bvalid (d_bvalid),
      .c_bready (d_bready),
      .c_araddr (d_araddr),
      .c_arvalid(d_arvalid),
      .c_arready(d_arready),
      .c_rdata  (d_rdata),
      .c_rresp  (d_rresp),
      .c_rvalid (d_rvalid),
      .c_rready (d_rready)
    );
    always_ff @(posedge host_clk or negedge host_rst_n)
      if (!host_rst_n) irq_sync <= '0;
      else             irq_sync <= {irq_sync[0], irq_c};
    assign irq = irq_sync[1];
  end else begin : g_sync
    assign d_awaddr  = s_awaddr;
    assign d_awvalid = s_awvalid;
    assign s_awready = d_awready;
    assign d_wdata   = s_wdata;
    assign d_wstrb   = s_wstrb;
    assign d_wvalid  = s_wvalid;
    assign s_wready  = d_wready;
    assign s_bresp   = d_bresp;
    assign s_bvalid  = d_bvalid;
    assign d_bready  = s_bready;
    assign d_araddr  = s_araddr;
    assign d_arvalid = s_arvalid;
    assign s_arready = d_arready;
    assign s_rdata   = d_rdata;
    assign s_rresp   = d_rresp;
    assign s_rvalid  = d_rvalid;
    assign d_rready  = s_rready;
    assign irq       = irq_c;
  end

  dci_axil #(.ADDR_W(ADDR_W), .N_REGS(N_REGS_ALL), .MEM_AW(TS_AW)) u_dci (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_awaddr (d_awaddr),
    .s_awvalid(d_awvalid),
    .s_awready(d_awready),
    .s_wdata  (d_wdata),
    .s_wstrb  (d_wstrb),
    .s_wvalid (d_wvalid),
    .s_wready (d_wready),
    .s_bresp  (d_bresp),
    .s_bvalid (d_bvalid),
    .s_bready (d_bready),
    .s_araddr (d_araddr),
    .s_arvalid(d_arvalid),
    .s_arready(d_arready),
    .s_rdata  (d_rdata),
    .s_rresp  (d_rresp),
    .s_rvalid (d_rvalid),
    .s_rready (d_rready),
    .reg_wr   (reg_wr),
    .reg_widx (reg_widx),
    .reg_wdata(reg_wdata),
    .reg_ridx (s_ridx),
    .reg_rdata(reg_rdata),
    .mem_re   (mem_re),
    .mem_raddr(mem_raddr),
    .mem_rdata(mem_rdata)
  );
endmodule
