// axil_cdc - AXI4-Lite clock-domain bridge for the host port of the monitor.
//
// What it does: carries single AXI4-Lite transactions from a host running
// on `s_clk` to the register slave (the DCI) running on `c_clk`, so that
// collecting monitoring information and reading it can run at different
// speeds. The two clocks may be unrelated.
//
// How: the host side accepts one transaction at a time (a write when AW
// and W are both valid, which wins over a read; otherwise a read), stores
// address, data and strobes, and flips a request toggle. The core side
// passes that toggle through two flip-flops, sees the flip, replays the
// transaction on its own AXI4-Lite master port and stores the response
// (BRESP, or RDATA and RRESP). It then flips an acknowledge toggle that
// returns through two flip-flops, and the host side presents B or R.
// Every multi-bit value crosses only while it is held stable by the
// outstanding toggle, so no bit is sampled while it changes.
//
// Interface: s_* is the host-facing AXI4-Lite slave (s_clk, s_rst_n);
// c_* is the core-facing AXI4-Lite master (c_clk, c_rst_n). AWREADY and
// WREADY rise together. Both resets must be asserted together.
//
// Timing: one transaction in flight; a round trip takes about three
// cycles of each clock plus the slave's own latency.
//
// The published system states only that gathering and retrieving information are
// decoupled and may run at different speeds; the toggle handshake, the
// one-transaction limit and write-over-read priority are this design's own.
module axil_cdc #(
  parameter int unsigned ADDR_W = 14
) (
  // host side
  input  logic              s_clk,
  input  logic              s_rst_n,
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
  // core side
  input  logic              c_clk,
  input  logic              c_rst_n,
  output logic [ADDR_W-1:0] c_awaddr,
  output logic              c_awvalid,
  input  logic              c_awready,
  output logic [31:0]       c_wdata,
  output logic [3:0]        c_wstrb,
  output logic              c_wvalid,
  input  logic              c_wready,
  input  logic [1:0]        c_bresp,
  input  logic              c_bvalid,
  output logic              c_bready,
  output logic [ADDR_W-1:0] c_araddr,
  output logic              c_arvalid,
  input  logic              c_arready,
  input  logic [31:0]       c_rdata,
  input  logic [1:0]        c_rresp,
  input  logic              c_rvalid,
  output logic              c_rready
);
  // ---------------- host side ----------------
  logic              h_busy;                 // transaction in flight or response pending
  logic              h_req_t;                // request toggle
  logic [1:0]        h_ack_sync;             // acknowledge toggle synchroniser
  logic              h_ack_seen;
  logic              h_wr;                   // payload, stable while h_busy
  logic [ADDR_W-1:0] h_addr;
  logic [31:0]       h_data;
  logic [3:0]        h_strb;
  logic              h_take_w, h_take_r;

  // payload returned by the core side, stable while the ack toggle is new
  logic [31:0]       c_rdata_q;
  logic [1:0]        c_resp_q;
  logic              c_ack_t;                // acknowledge toggle

  assign h_take_w  = !h_busy && s_awvalid && s_wvalid;
  assign h_take_r  = !h_busy && !(s_awvalid && s_wvalid) && s_arvalid;
  assign s_awready = h_take_w;
  assign s_wready  = h_take_w;
  assign s_arready = h_take_r;

  always_ff @(posedge s_clk or negedge s_rst_n)
    if (!s_rst_n) begin
      h_busy     <= 1'b0;
      h_req_t    <= 1'b0;
      h_ack_sync <= '0;
      h_ack_seen <= 1'b0;
      h_wr       <= 1'b0;
      h_addr     <= '0;
      h_data     <= '0;
      h_strb     <= '0;
      s_bvalid   <= 1'b0;
      s_bresp    <= '0;
      s_rvalid   <= 1'b0;
      s_rdata    <= '0;
      s_rresp    <= '0;
    end else begin
      h_ack_sync <= {h_ack_sync[0], c_ack_t};
      if (h_take_w || h_take_r) begin
        h_busy  <= 1'b1;
        h_req_t <= !h_req_t;
        h_wr    <= h_take_w;
        h_addr  <= h_take_w ? s_awaddr : s_araddr;
        h_data  <= s_wdata;
        h_strb  <= s_wstrb;
      end
      if (h_ack_sync[1] != h_ack_seen) begin
        h_ack_seen <= h_ack_sync[1];
        if (h_wr) begin
          s_bvalid <= 1'b1;
          s_bresp  <= c_resp_q;
        end else begin
          s_rvalid <= 1'b1;
          s_rdata  <= c_rdata_q;
          s_rresp  <= c_resp_q;
        end
      end
      if (s_bvalid && s_bready) begin s_bvalid <= 1'b0; h_busy <= 1'b0; end
      if (s_rvalid && s_rready) begin s_rvalid <= 1'b0; h_busy <= 1'b0; end
    end

  // ---------------- core side ----------------
  typedef enum logic [1:0] {C_IDLE, C_ADDR, C_RESP} c_state_e;
  c_state_e   c_st;
  logic [1:0] c_req_sync;
  logic       c_req_seen;
  logic       c_wr;

  assign c_bready = (c_st == C_RESP) && c_wr;
  assign c_rready = (c_st == C_RESP) && !c_wr;
  assign c_awaddr = h_addr;
  assign c_araddr = h_addr;
  assign c_wdata  = h_data;
  assign c_wstrb  = h_strb;

  always_ff @(posedge c_clk or negedge c_rst_n)
    if (!c_rst_n) begin
      c_st       <= C_IDLE;
      c_req_sync <= '0;
      c_req_seen <= 1'b0;
      c_ack_t    <= 1'b0;
      c_wr       <= 1'b0;
      c_awvalid  <= 1'b0;
      c_wvalid   <= 1'b0;
      c_arvalid  <= 1'b0;
      c_rdata_q  <= '0;
      c_resp_q   <= '0;
    end else begin
      c_req_sync <= {c_req_sync[0], h_req_t};
      unique case (c_st)
        C_IDLE:
          if (c_req_sync[1] != c_req_seen) begin
            c_req_seen <= c_req_sync[1];
            c_wr       <= h_wr;
            c_awvalid  <= h_wr;
            c_wvalid   <= h_wr;
            c_arvalid  <= !h_wr;
            c_st       <= C_ADDR;
          end
        C_ADDR: begin
          if (c_awvalid && c_awready) c_awvalid <= 1'b0;
          if (c_wvalid && c_wready)   c_wvalid  <= 1'b0;
          if (c_arvalid && c_arready) c_arvalid <= 1'b0;
          if ((!c_awvalid || c_awready) && (!c_wvalid || c_wready) &&
              (!c_arvalid || c_arready))
            c_st <= C_RESP;
        end
        C_RESP:
          if (c_wr && c_bvalid) begin
            c_resp_q <= c_bresp;
            c_ack_t  <= !c_ack_t;
            c_st     <= C_IDLE;
          end else if (!c_wr && c_rvalid) begin
            c_resp_q  <= c_rresp;
            c_rdata_q <= c_rdata;
            c_ack_t   <= !c_ack_t;
            c_st      <= C_IDLE;
          end
        default: c_st <= C_IDLE;
      endcase
    end

  // host handshake rules: a presented response holds until accepted
  a_b_hold: assert property (@(posedge s_clk) disable iff (!s_rst_n)
                             s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge s_clk) disable iff (!s_rst_n)
                             s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
  // core handshake rules: a request holds until accepted
  a_aw_hold: assert property (@(posedge c_clk) disable iff (!c_rst_n)
                              c_awvalid && !c_awready |=> c_awvalid && $stable(c_awaddr));
  a_ar_hold: assert property (@(posedge c_clk) disable iff (!c_rst_n)
                              c_arvalid && !c_arready |=> c_arvalid && $stable(c_araddr));
endmodule
