// range_filter -- the Filter of an extractor.
//
// Tells whether EVENT DATA lies in the closed range [inf, sup]; both bounds
// are part of the range, as the published description of the Event Monitor
// filter states.  When `bypass` is high (the sniffer is in NO-FILTERING mode,
// or the monitor was built without a filter) every value is in range.
// Purely combinational; the bounds come from the Init DCAPF registers.
module range_filter #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] data,
  input  logic [W-1:0] inf,
  input  logic [W-1:0] sup,
  input  logic         bypass,
  output logic         in_range
);
  always_comb in_range = bypass || ((data >= inf) && (data <= sup));
endmodule
