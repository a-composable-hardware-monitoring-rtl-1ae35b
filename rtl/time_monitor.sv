// time_monitor -- the Time Monitor extractor of a DCAPF.
//
// Measures, in clock cycles, how long the monitored value stays inside a
// range.  Every good event instance reports a new value of the monitored
// quantity in EVENT DATA (the task-level EIG sends 1 at the start of a
// computation and 0 at its end).  Inside:
//   * Filter (optional): in FILTERING mode the value is "in range" when it
//     lies in [inf, sup]; otherwise (NO-FILTERING, or no filter built) a
//     value is in range when it is non-zero.
//   * Time Capture (optional): remembers whether the last reported value was
//     in range and enables the counter on every cycle that it was.  The cycle
//     that reports the entering value is not counted and the cycle that
//     reports the leaving value is, so the count equals the distance in
//     cycles between the two event instances.  Without a Time Capture the
//     counter counts every enabled cycle: the monitor is then a free-running
//     time base (used for timestamps).
//   * Counter: CNT_W bits, +1 per counted cycle, saturating; it accumulates
//     over successive intervals until a soft reset.
//   * Catcher (optional): `catch_o` pulses after the count changed (high
//     constantly without a catcher).
//   * Acknowledger (optional): `wack_o` goes high when a measured interval
//     has closed (with Time Capture) or when the monitor has been stopped
//     after running (without); high constantly without an acknowledger.
// Config bits, from the LSB: filter, time capture, catcher, acknowledger, as
// in the published configuration constant.  The rule for NO-FILTERING and
// the Catch/Wack timing are this design's choice.
module time_monitor
  import mon_pkg::*;
#(
  parameter int unsigned CNT_W  = 64,
  parameter bit [3:0]    CONFIG = 4'b1111
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 filt,
  input  logic                 srst,
  input  logic [EV_DATA_W-1:0] inf,
  input  logic [EV_DATA_W-1:0] sup,
  input  event_inst_t          ev,
  output logic [CNT_W-1:0]     out_time,
  output logic                 catch_o,
  output logic                 wack_o
);
  localparam bit HAS_FILTER  = CONFIG[0];
  localparam bit HAS_CAPTURE = CONFIG[1];
  localparam bit HAS_CATCHER = CONFIG[2];
  localparam bit HAS_ACK     = CONFIG[3];

  logic in_filter, event_in_range, en_count, changed;
  logic active_q, done_q, ran_q;

  range_filter #(.W(EV_DATA_W)) u_filter (
    .data    (ev.data),
    .inf     (inf),
    .sup     (sup),
    .bypass  (1'b0),
    .in_range(in_filter)
  );

  always_comb
    event_in_range = (HAS_FILTER && filt) ? in_filter : (ev.data != '0);

  // Time Capture
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      done_q   <= 1'b0;
      ran_q    <= 1'b0;
    end else if (srst) begin
      active_q <= 1'b0;
      done_q   <= 1'b0;
      ran_q    <= 1'b0;
    end else begin
      if (en) ran_q <= 1'b1;
      if (en && ev.good) begin
        active_q <= event_in_range;
        if (active_q && !event_in_range) done_q <= 1'b1;
        if (!active_q && event_in_range) done_q <= 1'b0;
      end
    end
  end

  always_comb
    en_count = en && !srst && (HAS_CAPTURE ? active_q : 1'b1);

  mon_counter #(.CNT_W(CNT_W), .INC_W(1)) u_counter (
    .clk     (clk),
    .rst_n   (rst_n),
    .clr     (srst),
    .en_count(en_count),
    .inc     (1'b1),
    .count   (out_time),
    .changed (changed)
  );

  always_comb begin
    catch_o = HAS_CATCHER ? changed : 1'b1;
    if (!HAS_ACK)         wack_o = 1'b1;
    else if (HAS_CAPTURE) wack_o = done_q && !active_q;
    else                  wack_o = ran_q && !en;
  end
endmodule
