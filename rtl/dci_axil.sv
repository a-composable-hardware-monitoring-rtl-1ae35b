// dci_axil -- Data Collector Interface, AXI4-Lite slave.
//
// Gives the host one uniform access point to everything the monitoring
// system collects.  Address map (byte addresses, ADDR_W = 14):
//   0x0000 + 4*i   register i (i < N_REGS) on the register bus: LMIC
//                  control, initialisation and result registers and the
//                  interrupt controller's registers;
//   0x2000 + 8*j   timestamp-memory record j: +0 TIMESTAMP, +4 VAL
//                  (read only).
// Write: the address and data channels are accepted together, in the cycle
// both are valid and no response is pending; a register write appears on
// the register bus in that cycle; BRESP is always OKAY and WSTRB is ignored
// (registers are written whole).  Read: a register read returns RVALID one
// cycle after the address is accepted, a memory read two cycles after (the
// memory is synchronous).  One transaction of each kind is in flight at a
// time.
// The published DCI can be accessed as a slave or write the results to an
// external memory as a bus master; this module is the slave side, the one
// used in the evaluated system, and dci_axil_master the master side.  The
// address map is this design's choice.
module dci_axil
  import mon_pkg::*;
#(
  parameter int unsigned ADDR_W   = 14,
  parameter int unsigned N_REGS   = DCI_REGS,
  parameter int unsigned MEM_AW   = 10,
  localparam int unsigned IDX_W   = $clog2(N_REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // register bus
  output logic              reg_wr,
  output logic [IDX_W-1:0]  reg_widx,
  output logic [REG_W-1:0]  reg_wdata,
  output logic [IDX_W-1:0]  reg_ridx,
  input  logic [REG_W-1:0]  reg_rdata,
  // timestamp memory read port
  output logic              mem_re,
  output logic [MEM_AW-1:0] mem_raddr,
  input  logic [63:0]       mem_rdata
);
  localparam int unsigned MEM_BIT = ADDR_W - 1;

  logic wr_hs, rd_hs, rd_mem, rd_pend_q, word_q;
  logic reg_in_range_w, reg_in_range_r;

  // ---------------- write channel ----------------
  always_comb begin
    wr_hs          = s_awvalid && s_wvalid && !s_bvalid;
    s_awready      = wr_hs;
    s_wready       = wr_hs;
    reg_in_range_w = !s_awaddr[MEM_BIT] && (32'(s_awaddr[MEM_BIT-1:2]) < N_REGS);
    reg_wr         = wr_hs && reg_in_range_w;
    reg_widx       = IDX_W'(s_awaddr[MEM_BIT-1:2]);
    reg_wdata      = s_wdata;
    s_bresp        = 2'b00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    s_bvalid <= 1'b0;
    else if (wr_hs)                s_bvalid <= 1'b1;
    else if (s_bvalid && s_bready) s_bvalid <= 1'b0;
  end

  // ---------------- read channel ----------------
  always_comb begin
    s_arready      = !s_rvalid && !rd_pend_q;
    rd_hs          = s_arvalid && s_arready;
    rd_mem         = s_araddr[MEM_BIT];
    reg_in_range_r = !rd_mem && (32'(s_araddr[MEM_BIT-1:2]) < N_REGS);
    reg_ridx       = IDX_W'(s_araddr[MEM_BIT-1:2]);
    mem_re         = rd_hs && rd_mem;
    mem_raddr      = s_araddr[3 +: MEM_AW];
    s_rresp        = 2'b00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid  <= 1'b0;
      s_rdata   <= '0;
      rd_pend_q <= 1'b0;
      word_q    <= 1'b0;
    end else begin
      if (rd_hs && !rd_mem) begin
        s_rvalid <= 1'b1;
        s_rdata  <= reg_in_range_r ? reg_rdata : '0;
      end else if (rd_hs && rd_mem) begin
        rd_pend_q <= 1'b1;
        word_q    <= s_araddr[2];
      end else if (rd_pend_q) begin
        rd_pend_q <= 1'b0;
        s_rvalid  <= 1'b1;
        s_rdata   <= word_q ? mem_rdata[63:32] : mem_rdata[31:0];
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // AXI rules: a response is held until it is taken.
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);

  logic unused_ok;
  always_comb unused_ok = ^s_wstrb;
endmodule
