// dispenser -- hands the LMIC control lines and initialisation value of one
// sniffer to the sniffer's DCAPFs.
//
// From the sniffer's two PROG bits, run and soft reset it derives, for every
// DCAPF: enable (run high and PROG = FILTERING or NO-FILTERING), filtering
// mode (PROG = FILTERING) and soft reset (soft reset high and PROG not
// IDLE).  The sniffer has a single initialisation register, so each DCAPF is
// initialised by two writes: while PROG = INIT, successive writes (one-cycle
// `init_wr` pulses) load INF of DCAPF 0, SUP of DCAPF 0, INF of DCAPF 1, and
// so on, 2 x N_DCAPF writes in all, then wrap.  The write index restarts
// whenever the sniffer leaves INIT.  The mode decoding and the two-writes-
// per-DCAPF rule follow the published description; the order INF before
// SUP and the wrap are this design's choice.
module dispenser
  import mon_pkg::*;
#(
  parameter int unsigned N_DCAPF = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             srst,
  input  prog_e            prog,
  input  logic             init_wr,
  input  logic [REG_W-1:0] init_val,
  output dcapf_ctrl_t      ctrl [N_DCAPF]
);
  localparam int unsigned IDX_W = $clog2(2 * N_DCAPF) > 0 ? $clog2(2 * N_DCAPF) : 1;

  logic [IDX_W-1:0] idx_q;
  logic             init_go;

  always_comb init_go = init_wr && (prog == PROG_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      idx_q <= '0;
    else if (prog != PROG_INIT)
      idx_q <= '0;
    else if (init_go)
      idx_q <= (32'(idx_q) == 2 * N_DCAPF - 1) ? '0 : idx_q + 1'b1;
  end

  always_comb begin
    for (int k = 0; k < N_DCAPF; k++) begin
      ctrl[k].en       = run && (prog == PROG_FILT || prog == PROG_NOFILT);
      ctrl[k].filt     = (prog == PROG_FILT);
      ctrl[k].srst     = srst && (prog != PROG_IDLE);
      ctrl[k].wr_inf   = init_go && (32'(idx_q) == 2 * k);
      ctrl[k].wr_sup   = init_go && (32'(idx_q) == 2 * k + 1);
      ctrl[k].init_val = init_val;
    end
  end
endmodule
