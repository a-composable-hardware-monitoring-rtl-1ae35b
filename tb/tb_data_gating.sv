// Testbench for data_gating: event instances pass, one cycle later, only
// while enabled.
`include "tb_check.svh"
module tb_data_gating;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  event_inst_t ev_in, ev_out;
  logic exp_good;
  event_inst_t exp_ev;

  data_gating dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    ev_in = EV_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 1);
      ev_in.good = $urandom_range(0, 1);
      ev_in.data = $urandom;
      ev_in.inc  = 16'($urandom);
      exp_good = ev_in.good && en;
      exp_ev   = ev_in;
      @(negedge clk);
      `CHECK(ev_out.good == exp_good, "good gated by enable, one cycle later")
      if (exp_good) `CHECK(ev_out.data == exp_ev.data && ev_out.inc == exp_ev.inc, "payload forwarded")
      ev_in.good = 0;
    end
    `TB_FINISH
  end
endmodule
