// init_dcapf -- the Init DCAPF block.
//
// Holds the two initialisation values of one DCAPF, the lower (INF) and the
// upper (SUP) bound of the range its filters work on.  The dispenser of the
// sniffer loads them one at a time from the sniffer's initialisation
// register: `wr_inf` or `wr_sup` for one cycle stores `init_val`.
// After reset the range is the whole value space (INF = 0, SUP = all ones),
// so a filtering sniffer that was never initialised counts everything; the
// reset values are this design's choice.
module init_dcapf #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_inf,
  input  logic         wr_sup,
  input  logic [W-1:0] init_val,
  output logic [W-1:0] inf,
  output logic [W-1:0] sup
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inf <= '0;
      sup <= '1;
    end else begin
      if (wr_inf) inf <= init_val;
      if (wr_sup) sup <= init_val;
    end
  end
endmodule
