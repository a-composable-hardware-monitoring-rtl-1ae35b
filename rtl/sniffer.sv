// sniffer -- dispenser and DCAPFs of one sniffer.
//
// A sniffer turns low-level occurrences into monitoring information.  Its
// interconnect-specific front end, the Event Instance Generator, is a
// separate module (eig_*) whose event instances enter here; this module
// holds the parts every sniffer shares: the dispenser, which decodes the
// sniffer's PROG bits, run and soft reset and routes its initialisation
// writes, and N_DCAPF DCAPFs, one per metric.  DCAPF k takes event lane k
// and reports metric ID k.  The per-DCAPF configuration vectors hold one
// field per DCAPF, DCAPF 0 in the least significant field: the block
// selections (3, 3 and 4 bits, see dcapf) and the counter sizes (8 bits
// each).  Giving every
// DCAPF its own event lane is this design's choice: it lets one EIG feed
// DCAPFs that watch different occurrences (the operation-level sniffer).
module sniffer
  import mon_pkg::*;
#(
  parameter int unsigned     N_DCAPF               = 1,
  parameter logic [ID_W-1:0] SNIFFER_ID            = '0,
  parameter bit [3*N_DCAPF-1:0] CONFIG         = {N_DCAPF{3'b100}},
  parameter bit [3*N_DCAPF-1:0] EVMON_CONFIG   = {N_DCAPF{3'b111}},
  parameter bit [4*N_DCAPF-1:0] TIMEMON_CONFIG = {N_DCAPF{4'b1111}},
  parameter bit [8*N_DCAPF-1:0] CNT_EV_W       = {N_DCAPF{8'd64}},
  parameter bit [8*N_DCAPF-1:0] CNT_TIME_W     = {N_DCAPF{8'd64}}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             srst,
  input  prog_e            prog,
  input  logic             init_wr,
  input  logic [REG_W-1:0] init_val,
  input  event_inst_t      ev_in [N_DCAPF],
  output mon_info_t        info  [N_DCAPF]
);
  dcapf_ctrl_t ctrl [N_DCAPF];

  dispenser #(.N_DCAPF(N_DCAPF)) u_disp (
    .clk     (clk),
    .rst_n   (rst_n),
    .run     (run),
    .srst    (srst),
    .prog    (prog),
    .init_wr (init_wr),
    .init_val(init_val),
    .ctrl    (ctrl)
  );

  for (genvar k = 0; k < N_DCAPF; k++) begin : g_dcapf
    dcapf #(
      .CONFIG        (CONFIG[3*k +: 3]),
      .EVMON_CONFIG  (EVMON_CONFIG[3*k +: 3]),
      .TIMEMON_CONFIG(TIMEMON_CONFIG[4*k +: 4]),
      .CNT_EV_W      (int'(CNT_EV_W[8*k +: 8])),
      .CNT_TIME_W    (int'(CNT_TIME_W[8*k +: 8])),
      .SNIFFER_ID    (SNIFFER_ID),
      .METRIC_ID     (ID_W'(k))
    ) u_dcapf (
      .clk  (clk),
      .rst_n(rst_n),
      .ctrl (ctrl[k]),
      .ev_in(ev_in[k]),
      .info (info[k])
    );
  end
endmodule
