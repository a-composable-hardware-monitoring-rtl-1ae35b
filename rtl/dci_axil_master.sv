// dci_axil_master -- Data Collector Interface, bus-master side.
//
// Instead of waiting for the host to read the results, the DCI can push
// them into an external memory.  On a `start` pulse this block copies
// registers FIRST..LAST of the register space, one at a time, to the
// memory at `base + 4 x index` (the memory holds a mirror of the register
// space) with AXI4-Lite single writes, then pulses `done`.  Per register:
//   READ  put the index on the register read port and take the data in a
//         cycle with `rd_grant` high (the read port is shared with the
//         slave side, which has priority);
//   SEND  raise AWVALID and WVALID together; each stays high until its own
//         handshake, and neither waits for READY;
//   RESP  accept the write response; a response other than OKAY sets the
//         sticky `err` flag, cleared by the next `start`.
// So one register takes at least three cycles plus the slave's latency.
// `start` is ignored while busy.  The published system names this mode
// (the DCI writing the monitoring information to an external memory) but
// does not describe it; the mirror layout, the register range, the
// one-write-at-a-time sequence and the error flag are this design's
// choices.
module dci_axil_master
  import mon_pkg::*;
#(
  parameter int unsigned M_ADDR_W = 32,
  parameter int unsigned IDX_W    = 4,
  parameter int unsigned FIRST    = REG_TRANS,
  parameter int unsigned LAST     = REG_WACK
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [M_ADDR_W-1:0] base,
  output logic                busy,
  output logic                done,
  output logic                err,
  // register read port (shared)
  input  logic                rd_grant,
  output logic [IDX_W-1:0]    reg_ridx,
  input  logic [REG_W-1:0]    reg_rdata,
  // AXI4-Lite master, write channels
  output logic [M_ADDR_W-1:0] m_awaddr,
  output logic                m_awvalid,
  input  logic                m_awready,
  output logic [31:0]         m_wdata,
  output logic [3:0]          m_wstrb,
  output logic                m_wvalid,
  input  logic                m_wready,
  input  logic [1:0]          m_bresp,
  input  logic                m_bvalid,
  output logic                m_bready
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_SEND, S_RESP} state_e;
  state_e           state_q;
  logic [IDX_W-1:0] idx_q;
  logic [31:0]      data_q;
  logic             aw_pend_q, w_pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      idx_q     <= '0;
      data_q    <= '0;
      aw_pend_q <= 1'b0;
      w_pend_q  <= 1'b0;
      err       <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE:
          if (start) begin
            state_q <= S_READ;
            idx_q   <= IDX_W'(FIRST);
            err     <= 1'b0;
          end
        S_READ:
          if (rd_grant) begin
            data_q    <= reg_rdata;
            aw_pend_q <= 1'b1;
            w_pend_q  <= 1'b1;
            state_q   <= S_SEND;
          end
        S_SEND: begin
          if (m_awready) aw_pend_q <= 1'b0;
          if (m_wready)  w_pend_q  <= 1'b0;
          if ((m_awready || !aw_pend_q) && (m_wready || !w_pend_q)) state_q <= S_RESP;
        end
        S_RESP:
          if (m_bvalid) begin
            if (m_bresp != 2'b00) err <= 1'b1;
            if (32'(idx_q) == LAST) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end else begin
              idx_q   <= idx_q + 1'b1;
              state_q <= S_READ;
            end
          end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state_q != S_IDLE);
    reg_ridx  = idx_q;
    m_awaddr  = base + M_ADDR_W'(4 * 32'(idx_q));
    m_awvalid = (state_q == S_SEND) && aw_pend_q;
    m_wdata   = data_q;
    m_wstrb   = 4'hF;
    m_wvalid  = (state_q == S_SEND) && w_pend_q;
    m_bready  = (state_q == S_RESP);
  end

  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr));
  a_w_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                              m_wvalid && !m_wready |=> m_wvalid && $stable(m_wdata));
endmodule
