// aggregator -- the Aggregator of a DCAPF.
//
// Turns the outputs of the extractors into one monitoring-information record
// (Wack, Catch, event attribute, metric ID, sniffer ID, result):
//   * result: the Event Monitor count when only it is built, the Time
//     Monitor count when only it is built, and {time[31:0], events[31:0]}
//     when both are;
//   * Catch: high when any built extractor raises Catch;
//   * Wack: high when every built extractor raises Wack;
//   * event attribute: EVENT DATA of the last good event instance seen (for
//     the transaction sniffer, the last address accessed).
// The record layout follows the published sniffer-output structure; the
// combination rules and the meaning given to the attribute are this
// design's choice.  Result and flags are combinational; the attribute is a
// register updated on every good event instance.
module aggregator
  import mon_pkg::*;
#(
  parameter bit              HAS_EVENT  = 1'b1,
  parameter bit              HAS_TIME   = 1'b0,
  parameter int unsigned     CNT_EV_W   = 64,
  parameter int unsigned     CNT_TIME_W = 64,
  parameter logic [ID_W-1:0] SNIFFER_ID = '0,
  parameter logic [ID_W-1:0] METRIC_ID  = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  srst,
  input  event_inst_t           ev,
  input  logic [CNT_EV_W-1:0]   out_event,
  input  logic                  ev_catch,
  input  logic                  ev_wack,
  input  logic [CNT_TIME_W-1:0] out_time,
  input  logic                  tm_catch,
  input  logic                  tm_wack,
  output mon_info_t             info
);
  logic [EV_DATA_W-1:0] attr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       attr_q <= '0;
    else if (srst)    attr_q <= '0;
    else if (ev.good) attr_q <= ev.data;
  end

  always_comb begin
    info            = '0;
    info.attr       = attr_q;
    info.metric_id  = METRIC_ID;
    info.sniffer_id = SNIFFER_ID;
    if (HAS_EVENT && HAS_TIME) begin
      info.result  = {32'(out_time), 32'(out_event)};
      info.catch_s = ev_catch || tm_catch;
      info.wack    = ev_wack && tm_wack;
    end else if (HAS_TIME) begin
      info.result  = RES_W'(out_time);
      info.catch_s = tm_catch;
      info.wack    = tm_wack;
    end else if (HAS_EVENT) begin
      info.result  = RES_W'(out_event);
      info.catch_s = ev_catch;
      info.wack    = ev_wack;
    end
  end
endmodule
