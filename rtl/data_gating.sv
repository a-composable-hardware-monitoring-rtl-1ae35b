// data_gating -- the optional Data Gating block of a DCAPF.
//
// Registers the incoming event instance and lets it through only while the
// DCAPF is enabled (run high and the sniffer filtering or not filtering);
// outside a run, event instances are dropped before they reach the
// extractors.  The published description names the block and says only that
// it performs gating actions on event instances; gating on the run state and
// the one-cycle register stage are this design's choice.  The register keeps
// the probe wires of the monitored block off any long path.
// Latency: one cycle, equal for every event, so measured times are unchanged.
module data_gating
  import mon_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  event_inst_t ev_in,
  output event_inst_t ev_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_out <= EV_NONE;
    end else begin
      ev_out.good <= ev_in.good && en;
      if (ev_in.good) begin
        ev_out.inc  <= ev_in.inc;
        ev_out.data <= ev_in.data;
      end
    end
  end
endmodule
