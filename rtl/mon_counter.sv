// mon_counter -- the Counter of the Event and Time Monitors.
//
// Adds `inc` to the count on every cycle that `en_count` is high, and clears
// on `clr` (soft reset), which wins over counting.  The count saturates at
// its maximum instead of wrapping, so that an overflowed count never reads
// back as a small value; saturation is this design's choice, the published
// description does not say what the counter does at its limit.
// `changed` is high in the cycle after the count took a new value; the
// Catcher uses it.  Width CNT_W is the published per-monitor counter size.
module mon_counter #(
  parameter int unsigned CNT_W = 64,
  parameter int unsigned INC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en_count,
  input  logic [INC_W-1:0] inc,
  output logic [CNT_W-1:0] count,
  output logic             changed
);
  localparam int unsigned SUM_W = (CNT_W > INC_W ? CNT_W : INC_W) + 1;
  logic [SUM_W-1:0] sum;
  logic [CNT_W-1:0] next;

  always_comb begin
    sum  = SUM_W'(count) + SUM_W'(inc);
    next = count;
    if (clr)
      next = '0;
    else if (en_count)
      next = (sum > SUM_W'({CNT_W{1'b1}})) ? {CNT_W{1'b1}} : sum[CNT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      changed <= 1'b0;
    end else begin
      count   <= next;
      changed <= (next != count);
    end
  end
endmodule
