// eig_axil_ts -- Event Instance Generator of the microprocessor sniffer.
//
// The processor marks a point of its program by writing a value VAL to one
// register of the monitoring system's AXI4-Lite port.  This EIG watches the
// write channels of that port without driving them.  Interfacer: the
// write-address and write-data channels; address and data may be accepted
// in different cycles, so each is held until the other arrives.  Condition
// Checker: the write address equals TS_ADDR.  Emitter: one cycle after both
// halves of such a write were accepted, an event instance with EVENT DATA =
// VAL and EVENT INCREMENT = 1.
// The published design takes a timestamp when the processor writes VAL to a
// specific location; the choice of location and the channel handling are
// this design's own.
module eig_axil_ts
  import mon_pkg::*;
#(
  parameter int unsigned ADDR_W  = 14,
  parameter logic [ADDR_W-1:0] TS_ADDR = ADDR_W'(40)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              awvalid,
  input  logic              awready,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic              wvalid,
  input  logic              wready,
  input  logic [31:0]       wdata,
  output event_inst_t       ev
);
  logic              aw_hs, w_hs, aw_seen, w_seen;
  logic [ADDR_W-1:0] addr_q;
  logic [31:0]       data_q;
  logic [ADDR_W-1:0] addr_now;
  logic [31:0]       data_now;
  logic              complete;

  always_comb begin
    aw_hs    = awvalid && awready;
    w_hs     = wvalid && wready;
    addr_now = aw_hs ? awaddr : addr_q;
    data_now = w_hs ? wdata : data_q;
    complete = (aw_hs || aw_seen) && (w_hs || w_seen);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_seen <= 1'b0;
      w_seen  <= 1'b0;
      addr_q  <= '0;
      data_q  <= '0;
      ev      <= EV_NONE;
    end else begin
      if (aw_hs) addr_q <= awaddr;
      if (w_hs)  data_q <= wdata;
      aw_seen <= complete ? 1'b0 : (aw_seen || aw_hs);
      w_seen  <= complete ? 1'b0 : (w_seen || w_hs);
      ev.good <= complete && (addr_now == TS_ADDR);
      ev.inc  <= EV_INC_W'(1);
      if (complete) ev.data <= EV_DATA_W'(data_now);
    end
  end
endmodule
