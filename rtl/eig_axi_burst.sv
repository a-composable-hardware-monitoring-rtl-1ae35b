// eig_axi_burst -- Event Instance Generator of the transaction-level sniffer.
//
// Watches the address channel of an AXI4 (full) slave port without driving
// it.  Interfacer: the write-address channel (DIR = 0) or the read-address
// channel (DIR = 1).  Condition Checker: the channel's VALID and READY are
// both high, i.e. a burst has been accepted.  Emitter: one cycle later it
// emits an event instance whose EVENT DATA is the burst's start address and
// whose EVENT INCREMENT is the number of bytes in the burst,
// (LEN + 1) << SIZE.  A DCAPF with an Event Monitor then accumulates the
// bytes transferred inside an address range.
// Using the address phase (rather than counting data beats) and taking the
// byte count from LEN and SIZE are this design's choice; the published
// description gives the address and the burst byte count as the event's
// data and increment.
module eig_axi_burst
  import mon_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter bit          DIR    = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // write-address channel of the monitored port
  input  logic              awvalid,
  input  logic              awready,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [7:0]        awlen,
  input  logic [2:0]        awsize,
  // read-address channel of the monitored port
  input  logic              arvalid,
  input  logic              arready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic [2:0]        arsize,
  output event_inst_t       ev
);
  // Interfacer
  logic              valid, ready;
  logic [ADDR_W-1:0] addr;
  logic [7:0]        len;
  logic [2:0]        size;
  // Condition Checker
  logic              hit;

  always_comb begin
    valid = DIR ? arvalid : awvalid;
    ready = DIR ? arready : awready;
    addr  = DIR ? araddr  : awaddr;
    len   = DIR ? arlen   : awlen;
    size  = DIR ? arsize  : awsize;
    hit   = valid && ready;
  end

  // Emitter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev <= EV_NONE;
    end else begin
      ev.good <= hit;
      if (hit) begin
        ev.data <= EV_DATA_W'(addr);
        ev.inc  <= EV_INC_W'((17'(len) + 17'd1) << size);
      end
    end
  end
endmodule
