// Testbench for lmic with its default register map (4 sniffers, 6 DCAPFs):
// control-register decoding (run, soft reset, PROG of each sniffer),
// init-register writes and their one-cycle pulses, result capture on Catch
// into the packed result registers (23-bit, 53-bit split over two
// registers, two 10-bit fields in one register, two 32-bit), no capture
// without Catch, the Wack register and read-only results.
`include "tb_check.svh"
module tb_lmic;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [3:0] wr_idx = 0, rd_idx = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic run, srst;
  prog_e prog [4];
  logic init_wr [4];
  logic [31:0] init_val [4];
  mon_info_t info [6];
  logic [63:0] r [6];

  lmic dut (.*);

  always #50 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic wr(input int idx, input logic [31:0] d);
    wr_en = 1; wr_idx = 4'(idx); wr_data = d; @(negedge clk); wr_en = 0;
  endtask
  logic [31:0] rv [16];
  // read every register through the combinational read port
  task automatic rd_all();
    for (int i = 0; i < 16; i++) begin rd_idx = 4'(i); #1 rv[i] = rd_data; end
  endtask

  initial begin
    for (int k = 0; k < 6; k++) info[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // PROG: sniffer0 INIT, sniffer1 FILT, sniffer2 NOFILT, sniffer3 IDLE; run=1 srst=0
    wr(0, {22'd0, 2'b00, 2'b11, 2'b10, 2'b01, 1'b0, 1'b1});
    `CHECK(run && !srst, "run bit 0, soft reset bit 1")
    `CHECK(prog[0] == PROG_INIT && prog[1] == PROG_FILT && prog[2] == PROG_NOFILT && prog[3] == PROG_IDLE, "PROG fields")
    rd_all();
    `CHECK(rv[0] == 32'h0000_00E5, "control readback")
    wr(0, 32'h2); `CHECK(!run && srst, "soft reset bit")
    // init registers
    wr_en = 1; wr_idx = 3; wr_data = 32'hABCD; @(negedge clk); wr_en = 0;
    `CHECK(init_wr[2] && !init_wr[0] && !init_wr[1] && !init_wr[3], "one-cycle pulse to sniffer 2")
    `CHECK(init_val[2] == 32'hABCD, "init value")
    @(negedge clk);
    `CHECK(!init_wr[2], "pulse is one cycle")
    rd_all();
    `CHECK(rv[3] == 32'hABCD, "init readback")
    // results with catch
    r[0] = 64'h7F_FFFF; r[1] = 64'h1F_ABCD_1234_5678; r[2] = 10'h155; r[3] = 10'h2AA; r[4] = 64'd77; r[5] = 64'hDEAD_BEEF;
    for (int k = 0; k < 6; k++) begin info[k].result = r[k] | 64'hFFFF_FFFF_0000_0000 * (k == 0 || k >= 2); info[k].catch_s = 1; end
    @(negedge clk);
    for (int k = 0; k < 6; k++) info[k].catch_s = 0;
    rd_all();
    `CHECK(rv[5] == 32'h007F_FFFF, "23-bit transaction result, upper bits clear")
    rd_all();
    `CHECK(rv[6] == 32'h1234_5678 && rv[7] == 32'h001F_ABCD, "53-bit task result in two registers")
    rd_all();
    `CHECK(rv[8] == {12'd0, 10'h2AA, 10'h155}, "two 10-bit operation counts packed")
    rd_all();
    `CHECK(rv[9] == 77 && rv[10] == 32'hDEAD_BEEF, "32-bit results")
    info[0].result = 5; @(negedge clk);
    rd_all();
    `CHECK(rv[5] == 32'h007F_FFFF, "no capture without catch")
    info[0].catch_s = 1; @(negedge clk); info[0].catch_s = 0;
    rd_all();
    `CHECK(rv[5] == 5, "capture with catch")
    wr(5, 32'h1234);
    rd_all();
    `CHECK(rv[5] == 5, "results read-only")
    info[1].wack = 1; info[4].wack = 1;
    rd_all();
    `CHECK(rv[11] == 32'b01_0010, "wack register")
    `TB_FINISH
  end
endmodule
