// Testbench for sniffer with two event-monitor DCAPFs (filter, catcher,
// acknowledger), driven as the LMIC would: INIT with four init writes
// (INF/SUP of each DCAPF), then FILTERING and NO-FILTERING runs with
// random events on both lanes, soft reset, and IDLE (ignores run and soft
// reset).
`include "tb_check.svh"
module tb_sniffer;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, srst = 0, init_wr = 0;
  prog_e prog = PROG_IDLE;
  logic [31:0] init_val = 0;
  event_inst_t ev_in [2];
  mon_info_t info [2];
  longint m0, m1;

  sniffer #(.N_DCAPF(2), .SNIFFER_ID(4'd6), .CONFIG(6'b100_100), .EVMON_CONFIG(6'b111_111),
            .CNT_EV_W({8'd24, 8'd24}), .CNT_TIME_W({8'd8, 8'd8})) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic wr(input int v);
    init_val = v; init_wr = 1; @(negedge clk); init_wr = 0; @(negedge clk);
  endtask

  task automatic burst(input int n, input bit filt);
    for (int i = 0; i < n; i++) begin
      for (int k = 0; k < 2; k++) begin
        ev_in[k].good = $urandom_range(0, 1);
        ev_in[k].data = $urandom_range(0, 99);
        ev_in[k].inc  = 16'($urandom_range(1, 5));
      end
      if (run && prog != PROG_IDLE && prog != PROG_INIT) begin
        if (ev_in[0].good && (!filt || (ev_in[0].data >= 10 && ev_in[0].data <= 19))) m0 += ev_in[0].inc;
        if (ev_in[1].good && (!filt || (ev_in[1].data >= 50 && ev_in[1].data <= 59))) m1 += ev_in[1].inc;
      end
      @(negedge clk);
    end
    ev_in[0].good = 0; ev_in[1].good = 0;
    @(negedge clk);
  endtask

  initial begin
    ev_in[0] = EV_NONE; ev_in[1] = EV_NONE; m0 = 0; m1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prog = PROG_INIT;
    wr(10); wr(19); wr(50); wr(59);
    prog = PROG_FILT; run = 1;
    burst(500, 1);
    `CHECK(info[0].result == RES_W'(m0), $sformatf("DCAPF0 filtered %0d expected %0d", info[0].result, m0))
    `CHECK(info[1].result == RES_W'(m1), $sformatf("DCAPF1 filtered %0d expected %0d", info[1].result, m1))
    `CHECK(info[0].sniffer_id == 6 && info[1].metric_id == 1, "IDs")
    prog = PROG_NOFILT;
    burst(300, 0);
    `CHECK(info[0].result == RES_W'(m0) && info[1].result == RES_W'(m1), "no-filtering counts all")
    run = 0; @(negedge clk);
    `CHECK(info[0].wack && info[1].wack, "wack after stop")
    burst(50, 0);
    `CHECK(info[0].result == RES_W'(m0), "stopped: nothing counted")
    prog = PROG_IDLE; srst = 1; @(negedge clk); srst = 0; @(negedge clk);
    `CHECK(info[0].result == RES_W'(m0), "idle sniffer ignores soft reset")
    prog = PROG_FILT; srst = 1; @(negedge clk); srst = 0; @(negedge clk);
    `CHECK(info[0].result == 0 && info[1].result == 0, "soft reset clears")
    `TB_FINISH
  end
endmodule
