// dcapf -- Data CAPturer and Filter: computes one metric of a sniffer.
//
// Receives the event instances of its sniffer and the control and
// initialisation lines from the sniffer's dispenser, and produces one
// monitoring-information record.  Inside: Init DCAPF (range bounds INF and
// SUP), optional Data Gating, an Event Monitor and/or a Time Monitor, and
// the Aggregator.  Which blocks exist is set, as in the published
// configuration constants, by
//   CONFIG         from the LSB: data gating, time monitor, event monitor
//   EVMON_CONFIG   from the LSB: filter, catcher, acknowledger
//   TIMEMON_CONFIG from the LSB: filter, time capture, catcher, acknowledger
// and the counter sizes by CNT_EV_W and CNT_TIME_W (published default 64).
// Timing: one cycle from event instance to count, plus one with data gating.
module dcapf
  import mon_pkg::*;
#(
  parameter bit [2:0]        CONFIG         = 3'b100,
  parameter bit [2:0]        EVMON_CONFIG   = 3'b111,
  parameter bit [3:0]        TIMEMON_CONFIG = 4'b1111,
  parameter int unsigned     CNT_EV_W       = 64,
  parameter int unsigned     CNT_TIME_W     = 64,
  parameter logic [ID_W-1:0] SNIFFER_ID     = '0,
  parameter logic [ID_W-1:0] METRIC_ID      = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dcapf_ctrl_t ctrl,
  input  event_inst_t ev_in,
  output mon_info_t   info
);
  localparam bit HAS_GATING = CONFIG[0];
  localparam bit HAS_TIME   = CONFIG[1];
  localparam bit HAS_EVENT  = CONFIG[2];

  logic [EV_DATA_W-1:0]  inf, sup;
  event_inst_t           ev;
  logic [CNT_EV_W-1:0]   out_event;
  logic [CNT_TIME_W-1:0] out_time;
  logic ev_catch, ev_wack, tm_catch, tm_wack;

  init_dcapf #(.W(EV_DATA_W)) u_init (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_inf  (ctrl.wr_inf),
    .wr_sup  (ctrl.wr_sup),
    .init_val(ctrl.init_val),
    .inf     (inf),
    .sup     (sup)
  );

  if (HAS_GATING) begin : g_gating
    data_gating u_gating (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (ctrl.en),
      .ev_in (ev_in),
      .ev_out(ev)
    );
  end else begin : g_no_gating
    always_comb ev = ev_in;
  end

  if (HAS_EVENT) begin : g_event
    event_monitor #(.CNT_W(CNT_EV_W), .CONFIG(EVMON_CONFIG)) u_event (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (ctrl.en),
      .filt     (ctrl.filt),
      .srst     (ctrl.srst),
      .inf      (inf),
      .sup      (sup),
      .ev       (ev),
      .out_event(out_event),
      .catch_o  (ev_catch),
      .wack_o   (ev_wack)
    );
  end else begin : g_no_event
    always_comb begin
      out_event = '0;
      ev_catch  = 1'b0;
      ev_wack   = 1'b1;
    end
  end

  if (HAS_TIME) begin : g_time
    time_monitor #(.CNT_W(CNT_TIME_W), .CONFIG(TIMEMON_CONFIG)) u_time (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (ctrl.en),
      .filt    (ctrl.filt),
      .srst    (ctrl.srst),
      .inf     (inf),
      .sup     (sup),
      .ev      (ev),
      .out_time(out_time),
      .catch_o (tm_catch),
      .wack_o  (tm_wack)
    );
  end else begin : g_no_time
    always_comb begin
      out_time = '0;
      tm_catch = 1'b0;
      tm_wack  = 1'b1;
    end
  end

  aggregator #(
    .HAS_EVENT (HAS_EVENT),
    .HAS_TIME  (HAS_TIME),
    .CNT_EV_W  (CNT_EV_W),
    .CNT_TIME_W(CNT_TIME_W),
    .SNIFFER_ID(SNIFFER_ID),
    .METRIC_ID (METRIC_ID)
  ) u_agg (
    .clk      (clk),
    .rst_n    (rst_n),
    .srst     (ctrl.srst),
    .ev       (ev),
    .out_event(out_event),
    .ev_catch (ev_catch),
    .ev_wack  (ev_wack),
    .out_time (out_time),
    .tm_catch (tm_catch),
    .tm_wack  (tm_wack),
    .info     (info)
  );
endmodule
