// Testbench for aggregator: record layout, IDs, result selection and the
// Catch/Wack combination for event-only, time-only and combined DCAPFs,
// and the event attribute (last good EVENT DATA).
`include "tb_check.svh"
module tb_aggregator;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, srst = 0;
  event_inst_t ev;
  logic [39:0] out_event;
  logic [52:0] out_time;
  logic ev_catch, ev_wack, tm_catch, tm_wack;
  mon_info_t info_e, info_t, info_b;

  aggregator #(.HAS_EVENT(1), .HAS_TIME(0), .CNT_EV_W(40), .CNT_TIME_W(53), .SNIFFER_ID(4'd3), .METRIC_ID(4'd1)) dut (
    .clk, .rst_n, .srst, .ev, .out_event, .ev_catch, .ev_wack, .out_time, .tm_catch, .tm_wack, .info(info_e));
  aggregator #(.HAS_EVENT(0), .HAS_TIME(1), .CNT_EV_W(40), .CNT_TIME_W(53), .SNIFFER_ID(4'd2), .METRIC_ID(4'd0)) dut_t (
    .clk, .rst_n, .srst, .ev, .out_event, .ev_catch, .ev_wack, .out_time, .tm_catch, .tm_wack, .info(info_t));
  aggregator #(.HAS_EVENT(1), .HAS_TIME(1), .CNT_EV_W(40), .CNT_TIME_W(53), .SNIFFER_ID(4'd9), .METRIC_ID(4'd7)) dut_b (
    .clk, .rst_n, .srst, .ev, .out_event, .ev_catch, .ev_wack, .out_time, .tm_catch, .tm_wack, .info(info_b));

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    ev = EV_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      out_event = {$urandom, $urandom};
      out_time  = {$urandom, $urandom};
      {ev_catch, ev_wack, tm_catch, tm_wack} = 4'($urandom);
      #1;
      `CHECK(info_e.result == RES_W'(out_event) && info_e.catch_s == ev_catch && info_e.wack == ev_wack, "event-only record")
      `CHECK(info_e.sniffer_id == 3 && info_e.metric_id == 1, "event-only IDs")
      `CHECK(info_t.result == RES_W'(out_time) && info_t.catch_s == tm_catch && info_t.wack == tm_wack, "time-only record")
      `CHECK(info_b.result == {out_time[31:0], out_event[31:0]}, "combined result")
      `CHECK(info_b.catch_s == (ev_catch || tm_catch) && info_b.wack == (ev_wack && tm_wack), "combined flags")
      `CHECK(info_b.sniffer_id == 9 && info_b.metric_id == 7, "combined IDs")
    end
    ev.good = 1; ev.data = 32'hCAFE_0001;
    @(negedge clk); ev.good = 0; ev.data = 32'h1234;
    @(negedge clk);
    `CHECK(info_e.attr == 32'hCAFE_0001, "attribute is last good event data")
    srst = 1; @(negedge clk); srst = 0;
    `CHECK(info_e.attr == 0, "attribute cleared by soft reset")
    `TB_FINISH
  end
endmodule
