// eig_task -- Event Instance Generator of the task-level sniffer.
//
// Watches the coprocessor's I/O manager (front end and back end).
// Interfacer: the front end's `start` line and the back end's `done` line,
// both level signals.  Condition Checkers: a rising edge of `start` marks
// the start of a computation, a rising edge of `done` its end.  Emitter: one
// cycle after the edge, an event instance with EVENT DATA = 1 for a start
// and 0 for an end, EVENT INCREMENT = 1.  If both edges fall in the same
// cycle the end wins.  A Time Monitor counts the cycles while the last
// value is non-zero, i.e. the computation time.
// The published description gives the start and end indications as EVENT
// DATA; the edge detection and the values 1 and 0 are this design's choice.
module eig_task
  import mon_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        done,
  output event_inst_t ev
);
  logic start_q, done_q, start_edge, done_edge;

  always_comb begin
    start_edge = start && !start_q;
    done_edge  = done && !done_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      done_q  <= 1'b0;
      ev      <= EV_NONE;
    end else begin
      start_q <= start;
      done_q  <= done;
      ev.good <= start_edge || done_edge;
      ev.inc  <= EV_INC_W'(1);
      ev.data <= (done_edge) ? '0 : EV_DATA_W'(1);
    end
  end
endmodule
