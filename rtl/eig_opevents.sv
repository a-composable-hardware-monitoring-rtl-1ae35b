// eig_opevents -- Event Instance Generator of the operation-level sniffer.
//
// Watches N_EV event lines brought out of the coprocessor's data cruncher.
// Each line carries the number of occurrences of its event in the current
// cycle (OCC_W bits; one bit for a simple strobe).  Condition Checker k: the
// count of event k is non-zero.  Emitter: on lane k, one cycle later, an
// event instance with EVENT INCREMENT = the count and EVENT DATA = k, the
// event's index.  Lane k feeds DCAPF k of the sniffer, so each DCAPF counts
// one event, as published; the lane layout is this design's choice.
module eig_opevents
  import mon_pkg::*;
#(
  parameter int unsigned N_EV  = 2,
  parameter int unsigned OCC_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [OCC_W-1:0] occ [N_EV],
  output event_inst_t      ev  [N_EV]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_EV; k++) ev[k] <= EV_NONE;
    end else begin
      for (int k = 0; k < N_EV; k++) begin
        ev[k].good <= (occ[k] != '0);
        ev[k].inc  <= EV_INC_W'(occ[k]);
        ev[k].data <= EV_DATA_W'(k);
      end
    end
  end
endmodule
