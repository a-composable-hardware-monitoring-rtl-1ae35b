// interrupt_ctrl -- raises an interrupt when a monitored result exceeds a
// threshold, so that the host need not poll the results.
//
// Three registers on the DCI register bus (local index 0..2):
//   0 pending: bit k set when result k rises above the threshold while
//     enabled; write 1 to a bit to clear it;
//   1 enable: bit k enables source k;
//   2 threshold: one 32-bit threshold, compared (unsigned, zero-extended)
//     with every result.
// A source sets its pending bit on the cycle its "result > threshold"
// condition becomes true, so a result that stays above the threshold does
// not re-raise the interrupt after the host has cleared it.
// `irq` is high while any enabled bit is pending.
// The published design only states that an interrupt controller triggers an
// interrupt when thresholds are exceeded; the register set, the single
// shared threshold and the edge rule are this design's choice.
module interrupt_ctrl
  import mon_pkg::*;
#(
  parameter int unsigned N_SRC = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [1:0]       wr_idx,
  input  logic [REG_W-1:0] wr_data,
  input  logic [1:0]       rd_idx,
  output logic [REG_W-1:0] rd_data,
  input  logic [RES_W-1:0] result [N_SRC],
  output logic             irq
);
  logic [N_SRC-1:0] pend_q, en_q, exc, exc_q;
  logic [REG_W-1:0] thr_q;

  always_comb
    for (int k = 0; k < N_SRC; k++) exc[k] = result[k] > RES_W'(thr_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0;
      en_q   <= '0;
      exc_q  <= '0;
      thr_q  <= '1;
    end else begin
      exc_q <= exc;
      if (wr_en && wr_idx == 2'd1) en_q  <= wr_data[N_SRC-1:0];
      if (wr_en && wr_idx == 2'd2) thr_q <= wr_data;
      for (int k = 0; k < N_SRC; k++) begin
        if (en_q[k] && exc[k] && !exc_q[k])
          pend_q[k] <= 1'b1;
        else if (wr_en && wr_idx == 2'd0 && wr_data[k])
          pend_q[k] <= 1'b0;
      end
    end
  end

  always_comb begin
    irq = |(pend_q & en_q);
    case (rd_idx)
      2'd0:    rd_data = REG_W'(pend_q);
      2'd1:    rd_data = REG_W'(en_q);
      2'd2:    rd_data = thr_q;
      default: rd_data = '0;
    endcase
  end
endmodule
