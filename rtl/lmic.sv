// lmic -- Local Monitoring Information Collector.
//
// Controls the sniffers of one local area and collects their results.  It
// holds the three register sets of the published design:
//   * control (index 0): bit 0 run, bit 1 soft reset, then two PROG bits per
//     sniffer, PROG(0) of sniffer i (from 0) at bit 2+2i and PROG(1) at
//     3+2i; with 32 bits, up to 15 sniffers;
//   * initialisation (indices 1..N_SNIF): one per sniffer.  A host write
//     also sends the sniffer a one-cycle `init_wr` pulse, one cycle later,
//     with the value on `init_val`;
//   * results: the host can only read them.  DCAPF k (numbered across all
//     sniffers) owns the DC_W bits that start at bit DC_LSB of result
//     register DC_REG (8-bit field k of each parameter) and may run on into the next registers (the 53-bit
//     task time fills one register and most of the next).  The LMIC copies
//     the DCAPF's result there whenever the DCAPF raises Catch.
// Register WACK_REG shows the Wack flag of every DCAPF (bit k), so the host
// can see which results are final.  Run and soft reset are levels: the host
// sets and clears them.  The register bus is the DCI's: a write is taken on
// the clock edge, a read is combinational.
// The register sets and the control-bit layout follow the published
// description; the result packing tables and the Wack register are this
// design's choice.  All registers reset to zero; result bits that no
// DCAPF owns are constant zero.
module lmic
  import mon_pkg::*;
#(
  parameter int unsigned N_SNIF   = 4,
  parameter int unsigned N_DCAPF  = 6,
  parameter int unsigned N_REGS   = LMIC_REGS,
  parameter int unsigned WACK_REG = REG_WACK,
  // one 8-bit field per DCAPF, DCAPF 0 in the least significant field
  parameter bit [8*N_DCAPF-1:0] DC_REG = {8'(REG_TS), 8'(REG_TS_COUNT), 8'(REG_OPER),
                                          8'(REG_OPER), 8'(REG_TASK_LO), 8'(REG_TRANS)},
  parameter bit [8*N_DCAPF-1:0] DC_LSB = {8'd0, 8'd0, 8'd10, 8'd0, 8'd0, 8'd0},
  parameter bit [8*N_DCAPF-1:0] DC_W   = {8'd32, 8'd32, 8'd10, 8'd10, 8'd53, 8'd23},
  localparam int unsigned IDX_W = $clog2(N_REGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // register bus from the DCI
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [REG_W-1:0] wr_data,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [REG_W-1:0] rd_data,
  // control and initialisation towards the sniffers
  output logic             run,
  output logic             srst,
  output prog_e            prog     [N_SNIF],
  output logic             init_wr  [N_SNIF],
  output logic [REG_W-1:0] init_val [N_SNIF],
  // monitoring information from the DCAPFs
  input  mon_info_t        info     [N_DCAPF]
);
  logic [REG_W-1:0] ctrl_q;
  logic [REG_W-1:0] init_q [N_SNIF];
  logic [REG_W-1:0] res_q  [N_REGS];
  logic [N_DCAPF-1:0] wack;

  // Owner of bit b of the flat result space (register r at bits 32r..32r+31):
  // the DCAPF whose field holds it, or -1; and the bit of that DCAPF's result.
  function automatic int owner(int unsigned pos);
    for (int k = 0; k < N_DCAPF; k++) begin
      int unsigned lo = int'(DC_REG[8*k +: 8]) * REG_W + int'(DC_LSB[8*k +: 8]);
      if (pos >= lo && pos < lo + int'(DC_W[8*k +: 8])) return k;
    end
    return -1;
  endfunction
  function automatic int unsigned owner_bit(int unsigned pos);
    int k = owner(pos);
    return pos - (int'(DC_REG[8*k +: 8]) * REG_W + int'(DC_LSB[8*k +: 8]));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q <= '0;
      for (int i = 0; i < N_SNIF; i++) begin
        init_q[i]  <= '0;
        init_wr[i] <= 1'b0;
      end
    end else begin
      if (wr_en && 32'(wr_idx) == 0) ctrl_q <= wr_data;
      for (int i = 0; i < N_SNIF; i++) begin
        init_wr[i] <= wr_en && (32'(wr_idx) == i + 1);
        if (wr_en && 32'(wr_idx) == i + 1) init_q[i] <= wr_data;
      end
    end
  end

  // Result capture on Catch: one flip-flop per owned bit; bits that no
  // DCAPF owns read as zero.
  for (genvar pos = 0; pos < N_REGS * REG_W; pos++) begin : g_res
    localparam int OWN = owner(pos);
    if (OWN >= 0) begin : g_own
      localparam int unsigned OB = owner_bit(pos);
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                res_q[pos / REG_W][pos % REG_W] <= 1'b0;
        else if (info[OWN].catch_s) res_q[pos / REG_W][pos % REG_W] <= info[OWN].result[OB];
      end
    end else begin : g_none
      assign res_q[pos / REG_W][pos % REG_W] = 1'b0;
    end
  end

  always_comb begin
    run  = ctrl_q[CTRL_RUN];
    srst = ctrl_q[CTRL_SRST];
    for (int i = 0; i < N_SNIF; i++) begin
      prog[i]     = prog_e'(ctrl_q[ctrl_prog_lsb(i) +: 2]);
      init_val[i] = init_q[i];
    end
    for (int k = 0; k < N_DCAPF; k++) wack[k] = info[k].wack;
  end

  always_comb begin
    if (32'(rd_idx) == 0)
      rd_data = ctrl_q;
    else if (32'(rd_idx) <= N_SNIF)
      rd_data = init_q[32'(rd_idx) - 1];
    else if (32'(rd_idx) == WACK_REG)
      rd_data = REG_W'(wack);
    else if (32'(rd_idx) < N_REGS)
      rd_data = res_q[rd_idx];
    else
      rd_data = '0;
  end
endmodule
