// Testbench for event_monitor (full configuration: filter, catcher,
// acknowledger): random event instances, modes and soft resets against a
// cycle-level reference model of the count, Catch and Wack; then a
// directed check of the range bounds and of saturation.
`include "tb_check.svh"
module tb_event_monitor;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, filt = 0, srst = 0;
  logic [31:0] inf = 0, sup = 0;
  event_inst_t ev;
  logic [15:0] out_event;
  logic catch_o, wack_o;
  longint model, prev;
  bit ran, inr;

  event_monitor #(.CNT_W(16), .CONFIG(3'b111)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic step();
    prev = model;
    inr  = !filt || (ev.data >= inf && ev.data <= sup);
    if (srst) begin
      model = 0; ran = 0;
    end else begin
      if (en && ev.good && inr) model = (model + ev.inc > 65535) ? 65535 : model + ev.inc;
      if (en) ran = 1;
    end
    @(negedge clk);
    `CHECK(out_event == 16'(model), $sformatf("count %0d expected %0d", out_event, model))
    `CHECK(catch_o == (model != prev), "catch pulses after a change")
  endtask

  initial begin
    ev = EV_NONE; model = 0; ran = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    inf = 100; sup = 200;
    for (int i = 0; i < 2000; i++) begin
      if (i % 200 == 0) filt = $urandom_range(0, 1);
      en      = ($urandom_range(0, 9) != 0);
      srst    = ($urandom_range(0, 150) == 0);
      ev.good = $urandom_range(0, 1);
      ev.data = $urandom_range(50, 250);
      ev.inc  = 16'($urandom_range(1, 64));
      step();
      `CHECK(wack_o == (ran && !en), "wack once stopped after running")
    end
    // directed: bounds included, value outside ignored
    srst = 1; en = 0; ev.good = 0; step(); srst = 0;
    en = 1; filt = 1; ev.good = 1; ev.inc = 1;
    ev.data = 100; step();
    ev.data = 200; step();
    ev.data = 99;  step();
    ev.data = 201; step();
    `CHECK(out_event == 2, "only the two bound values counted")
    ev.good = 0; en = 0; step();
    `CHECK(wack_o, "wack after run stops")
    // saturation
    en = 1; filt = 0; ev.good = 1; ev.inc = 16'hFFFF;
    step(); step();
    `CHECK(out_event == 16'hFFFF, "count saturates")
    `TB_FINISH
  end
endmodule
