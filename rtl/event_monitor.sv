// event_monitor -- the Event Monitor extractor of a DCAPF.
//
// Counts event instances, each weighted by its EVENT INCREMENT.  Inside:
//   * Filter (optional): EVENT DATA must lie in [inf, sup]; bypassed in
//     NO-FILTERING mode.
//   * Event Capture: enables the count for a good, in-range event instance
//     while the DCAPF is enabled.
//   * Counter: adds EVENT INCREMENT, CNT_W bits, saturating.
//   * Catcher (optional): `catch_o` pulses for one cycle after the count has
//     changed, telling the LMIC to copy the result.  Without a catcher
//     `catch_o` stays high and the LMIC copies the result every cycle.
//   * Acknowledger (optional): `wack_o` is high once the monitor has run and
//     has been stopped again (run low), i.e. the count is final.  Without an
//     acknowledger `wack_o` stays high.
// The split into these parts and their optional presence (config bits: from
// the LSB filter, catcher, acknowledger) follow the published structure; the
// exact timing of Catch and Wack is this design's choice.
// Timing: an event instance presented in cycle t is in `out_event` at t+1.
module event_monitor
  import mon_pkg::*;
#(
  parameter int unsigned CNT_W  = 64,
  parameter bit [2:0]    CONFIG = 3'b111
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 filt,
  input  logic                 srst,
  input  logic [EV_DATA_W-1:0] inf,
  input  logic [EV_DATA_W-1:0] sup,
  input  event_inst_t          ev,
  output logic [CNT_W-1:0]     out_event,
  output logic                 catch_o,
  output logic                 wack_o
);
  localparam bit HAS_FILTER  = CONFIG[0];
  localparam bit HAS_CATCHER = CONFIG[1];
  localparam bit HAS_ACK     = CONFIG[2];

  logic event_in_range, en_count, changed, ran_q;

  range_filter #(.W(EV_DATA_W)) u_filter (
    .data    (ev.data),
    .inf     (inf),
    .sup     (sup),
    .bypass  (!HAS_FILTER || !filt),
    .in_range(event_in_range)
  );

  // Event Capture
  always_comb en_count = en && ev.good && event_in_range && !srst;

  mon_counter #(.CNT_W(CNT_W), .INC_W(EV_INC_W)) u_counter (
    .clk     (clk),
    .rst_n   (rst_n),
    .clr     (srst),
    .en_count(en_count),
    .inc     (ev.inc),
    .count   (out_event),
    .changed (changed)
  );

  // Acknowledger state: has the monitor run since the last soft reset?
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ran_q <= 1'b0;
    else if (srst) ran_q <= 1'b0;
    else if (en)   ran_q <= 1'b1;
  end

  always_comb begin
    catch_o = HAS_CATCHER ? changed : 1'b1;
    wack_o  = HAS_ACK ? (ran_q && !en) : 1'b1;
  end
endmodule
