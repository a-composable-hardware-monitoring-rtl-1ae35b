// Testbench for dcapf.  Instance E: data gating + event monitor (filter,
// catcher, acknowledger); instance T: time monitor with time capture only.
// Bounds are loaded through the control record, then random event
// instances are counted against a reference (one extra cycle of latency
// from the gating register).  The monitoring record must carry the IDs.
`include "tb_check.svh"
module tb_dcapf;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  dcapf_ctrl_t ctrl;
  event_inst_t ev;
  mon_info_t info_e, info_t;
  longint model;

  dcapf #(.CONFIG(3'b101), .EVMON_CONFIG(3'b111), .CNT_EV_W(32), .SNIFFER_ID(4'd5), .METRIC_ID(4'd2)) dut (
    .clk, .rst_n, .ctrl, .ev_in(ev), .info(info_e));
  dcapf #(.CONFIG(3'b010), .TIMEMON_CONFIG(4'b0010), .CNT_TIME_W(53)) dut_t (
    .clk, .rst_n, .ctrl, .ev_in(ev), .info(info_t));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    ctrl = '0; ev = EV_NONE; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ctrl.init_val = 1000; ctrl.wr_inf = 1; @(negedge clk); ctrl.wr_inf = 0;
    ctrl.init_val = 1999; ctrl.wr_sup = 1; @(negedge clk); ctrl.wr_sup = 0;
    ctrl.en = 1; ctrl.filt = 1;
    for (int i = 0; i < 1000; i++) begin
      ev.good = $urandom_range(0, 1);
      ev.data = $urandom_range(500, 2500);
      ev.inc  = 16'($urandom_range(1, 300));
      if (ev.good && ev.data >= 1000 && ev.data <= 1999) model += ev.inc;
      @(negedge clk);
    end
    ev.good = 0;
    repeat (2) @(negedge clk);
    `CHECK(info_e.result == RES_W'(model), $sformatf("filtered bytes %0d expected %0d", info_e.result, model))
    `CHECK(info_e.sniffer_id == 5 && info_e.metric_id == 2, "IDs in record")
    `CHECK(!info_e.wack, "no wack while running")
    ctrl.en = 0; @(negedge clk);
    `CHECK(info_e.wack, "wack after stop")
    // events while stopped are gated out
    ev.good = 1; ev.data = 1500; ev.inc = 10; @(negedge clk); ev.good = 0;
    repeat (2) @(negedge clk);
    `CHECK(info_e.result == RES_W'(model), "gated while stopped")
    // time DCAPF: start/end 25 cycles apart
    ctrl.en = 1; ctrl.filt = 0; ctrl.srst = 1; @(negedge clk); ctrl.srst = 0;
    `CHECK(info_e.result == 0 && info_t.result == 0, "soft reset clears both")
    ev.good = 1; ev.data = 1; ev.inc = 1; @(negedge clk); ev.good = 0;
    repeat (24) @(negedge clk);
    ev.good = 1; ev.data = 0; @(negedge clk); ev.good = 0;
    repeat (3) @(negedge clk);
    `CHECK(info_t.result == 25, $sformatf("time %0d expected 25", info_t.result))
    `CHECK(info_t.catch_s && info_t.wack, "no catcher/acknowledger: both high")
    `TB_FINISH
  end
endmodule
