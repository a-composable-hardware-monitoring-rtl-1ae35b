// Testbench for dci_axil with a register-file and memory model on its
// register bus and memory port: AXI4-Lite writes and reads of registers,
// reads of both words of timestamp records, out-of-range registers, back
// pressure on B and R, and the response latencies (register read: RVALID
// one cycle after the address handshake, memory read: two).
`include "tb_check.svh"
module tb_dci_axil;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [13:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [3:0] s_wstrb = 4'hF;
  logic [1:0] s_bresp, s_rresp;
  logic reg_wr, mem_re;
  logic [3:0] reg_widx, reg_ridx;
  logic [31:0] reg_wdata, reg_rdata;
  logic [9:0] mem_raddr;
  logic [63:0] mem_rdata;
  logic [31:0] regs [16];
  int lat;
  logic [31:0] d;

  dci_axil #(.ADDR_W(14), .N_REGS(16), .MEM_AW(10)) dut (.*);

  // models: register file of 12 registers; memory word = {~addr, addr}
  always_ff @(posedge clk) if (reg_wr) regs[reg_widx] <= reg_wdata;
  always_comb reg_rdata = regs[reg_ridx];
  always_ff @(posedge clk) if (mem_re) mem_rdata <= {22'h3F_FFFF, ~mem_raddr, 22'd0, mem_raddr};

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic axi_write(input logic [13:0] a, input logic [31:0] v, input int bdelay);
    s_awaddr = a; s_awvalid = 1; s_wdata = v; s_wvalid = 1;
    do @(negedge clk); while (!(s_awvalid && s_awready) && !s_bvalid);
    s_awvalid = 0; s_wvalid = 0;
    repeat (bdelay) begin `CHECK(s_bvalid, "B held under back pressure") @(negedge clk); end
    `CHECK(s_bvalid && s_bresp == 0, "write response")
    s_bready = 1; @(negedge clk); s_bready = 0;
  endtask

  task automatic axi_read(input logic [13:0] a, input int rdelay, output logic [31:0] v, output int latency);
    s_araddr = a; s_arvalid = 1; latency = 0;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_arvalid = 0;
    latency = 1;
    while (!s_rvalid) begin @(negedge clk); latency++; end
    repeat (rdelay) @(negedge clk);
    `CHECK(s_rvalid, "R held under back pressure")
    v = s_rdata;
    s_rready = 1; @(negedge clk); s_rready = 0;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) regs[i] = 32'(i * 1000);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    axi_write(14'h0004, 32'h1111_2222, 0);
    axi_write(14'h0030, 32'h3333_4444, 3);
    `CHECK(regs[1] == 32'h1111_2222 && regs[12] == 32'h3333_4444, "registers written")
    axi_read(14'h0004, 0, d, lat);
    `CHECK(d == 32'h1111_2222 && lat == 1, $sformatf("register read %h latency %0d", d, lat))
    axi_read(14'h0008, 4, d, lat);
    `CHECK(d == 2000, "register read under back pressure")
    axi_read(14'h2000 + 14'(8 * 37), 0, d, lat);
    `CHECK(d == 37 && lat == 2, $sformatf("record word 0 %0d latency %0d", d, lat))
    axi_read(14'h2000 + 14'(8 * 37) + 4, 0, d, lat);
    `CHECK(d == {22'h3F_FFFF, ~10'd37}, "record word 1")
    axi_read(14'h0100, 0, d, lat);
    `CHECK(d == 0, "unmapped register reads zero")
    axi_write(14'h2010, 32'hFFFF, 0);
    `CHECK(regs[4] == 4000, "memory region is read-only")
    `TB_FINISH
  end
endmodule
