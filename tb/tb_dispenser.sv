// Testbench for dispenser (3 DCAPFs): mode decoding for all four PROG
// codes, soft-reset gating, and routing of 2 x N_DCAPF init writes in the
// order INF0, SUP0, INF1, SUP1, ... with restart on leaving INIT.
`include "tb_check.svh"
module tb_dispenser;
  import mon_pkg::*;
  localparam int N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, srst = 0, init_wr = 0;
  prog_e prog = PROG_IDLE;
  logic [31:0] init_val = 0;
  dcapf_ctrl_t ctrl [N];

  dispenser #(.N_DCAPF(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic write_init(input int v, input int exp_idx);
    init_val = v; init_wr = 1;
    #1;
    for (int k = 0; k < N; k++) begin
      `CHECK(ctrl[k].wr_inf == (prog == PROG_INIT && exp_idx == 2 * k), $sformatf("wr_inf %0d idx %0d", k, exp_idx))
      `CHECK(ctrl[k].wr_sup == (prog == PROG_INIT && exp_idx == 2 * k + 1), $sformatf("wr_sup %0d idx %0d", k, exp_idx))
      `CHECK(ctrl[k].init_val == 32'(v), "init value forwarded")
    end
    @(negedge clk); init_wr = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 4; p++) begin
      for (int r = 0; r < 4; r++) begin
        prog = prog_e'(p); {run, srst} = 2'(r);
        #1;
        for (int k = 0; k < N; k++) begin
          `CHECK(ctrl[k].en == (run && (p == 2 || p == 3)), "enable only when running and filtering/no-filtering")
          `CHECK(ctrl[k].filt == (p == 2), "filtering mode")
          `CHECK(ctrl[k].srst == (srst && p != 0), "soft reset ignored when idle")
        end
      end
    end
    run = 0; srst = 0;
    prog = PROG_INIT; @(negedge clk);
    for (int i = 0; i < 2 * N; i++) write_init(100 + i, i);
    write_init(7, 0);                 // wraps
    prog = PROG_FILT; @(negedge clk);
    write_init(8, -1);                // ignored outside INIT
    prog = PROG_INIT; @(negedge clk);
    write_init(9, 0);                 // restarted
    write_init(10, 1);
    `TB_FINISH
  end
endmodule
