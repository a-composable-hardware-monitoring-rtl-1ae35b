// Host-side AXI4-Lite helper tasks for the system-level testbenches.  Included
// inside a testbench module that declares the s_* port signals and `clk`.
// host_wr: full 32-bit write, waits for and accepts the response.
// host_rd_addr / host_rd: read a byte address / a register index.
task automatic host_wr(input int idx, input logic [31:0] v);
  s_awaddr = 14'(4 * idx); s_awvalid = 1; s_wdata = v; s_wvalid = 1;
  #1;
  while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
  @(negedge clk);
  s_awvalid = 0; s_wvalid = 0;
  while (!s_bvalid) @(negedge clk);
  s_bready = 1; @(negedge clk); s_bready = 0;
endtask

task automatic host_rd_addr(input logic [13:0] a, output logic [31:0] v);
  s_araddr = a; s_arvalid = 1;
  #1;
  while (!s_arready) begin @(negedge clk); #1; end
  @(negedge clk); s_arvalid = 0;
  while (!s_rvalid) @(negedge clk);
  v = s_rdata;
  s_rready = 1; @(negedge clk); s_rready = 0;
endtask

task automatic host_rd(input int idx, output logic [31:0] v);
  host_rd_addr(14'(4 * idx), v);
endtask
