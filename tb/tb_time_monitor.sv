// Testbench for time_monitor.  Instance A (filter, time capture, catcher,
// acknowledger): start/end intervals of random length must give exactly
// the distance in cycles between the two event instances, accumulated over
// intervals; in FILTERING mode only values in [inf, sup] count as inside.
// Instance B (no time capture): free-running time base while enabled.
`include "tb_check.svh"
module tb_time_monitor;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, filt = 0, srst = 0;
  logic [31:0] inf = 0, sup = 0;
  event_inst_t ev;
  logic [15:0] out_time, out_b;
  logic catch_o, wack_o, catch_b, wack_b;
  int expect_total, len, gap;

  time_monitor #(.CNT_W(16), .CONFIG(4'b1111)) dut (.*);
  time_monitor #(.CNT_W(16), .CONFIG(4'b0000)) dut_b (
    .clk(clk), .rst_n(rst_n), .en(en), .filt(filt), .srst(srst), .inf(inf), .sup(sup),
    .ev(ev), .out_time(out_b), .catch_o(catch_b), .wack_o(wack_b));

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic send(input logic [31:0] v);
    ev.good = 1; ev.data = v; ev.inc = 1;
    @(negedge clk);
    ev.good = 0;
  endtask

  initial begin
    ev = EV_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(catch_b && wack_b, "no catcher/acknowledger: both high")
    en = 1;
    expect_total = 0;
    for (int i = 0; i < 20; i++) begin
      len = $urandom_range(1, 40);
      gap = $urandom_range(0, 10);
      send(1);                          // start
      `CHECK(!wack_o, "wack low while measuring")
      repeat (len - 1) @(negedge clk);
      send(0);                          // end, len cycles after start
      expect_total += len;
      `CHECK(out_time == 16'(expect_total), $sformatf("time %0d expected %0d", out_time, expect_total))
      `CHECK(wack_o, "wack once the interval closed")
      repeat (gap) @(negedge clk);
      `CHECK(out_time == 16'(expect_total), "no counting outside interval")
    end
    // catch pulses while counting
    send(1);
    @(negedge clk);
    `CHECK(catch_o, "catch while counting")
    send(0);
    @(negedge clk);
    `CHECK(!catch_o, "no catch when idle")
    // filtering mode: inside means value in [5, 7]
    srst = 1; @(negedge clk); srst = 0;
    `CHECK(out_time == 0, "soft reset clears")
    filt = 1; inf = 5; sup = 7;
    send(9);  repeat (5) @(negedge clk);
    `CHECK(out_time == 0, "out-of-range value not timed")
    send(6);  repeat (9) @(negedge clk);
    send(2);
    `CHECK(out_time == 10, $sformatf("filtered interval %0d expected 10", out_time))
    // free-running time base counts every enabled cycle
    srst = 1; @(negedge clk); srst = 0;
    repeat (17) @(negedge clk);
    `CHECK(out_b == 17, $sformatf("time base %0d expected 17", out_b))
    en = 0; repeat (5) @(negedge clk);
    `CHECK(out_b == 17, "time base stops with run")
    `TB_FINISH
  end
endmodule
