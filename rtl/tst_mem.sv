// tst_mem -- timestamp memory of the microprocessor sniffer.
//
// A simple dual-port RAM, DEPTH words of W bits: one write port, written by
// the sniffer with {VAL, TIMESTAMP} records, and one read port, read by the
// DCI for the host.  Reads are synchronous (data one cycle after the
// address), so the array maps onto FPGA block RAM.  The contents are not
// reset.  The published design stores the records in a block RAM; its depth
// and word layout are this design's choice: 1024 x 64 bits, two 36-kbit
// block RAMs.
module tst_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
