// Testbench for mon_counter: random increments against a saturating
// reference model, clear priority and the `changed` flag.
`include "tb_check.svh"
module tb_mon_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, en_count = 0, changed;
  logic [3:0] inc = 0;
  logic [7:0] count;
  int model, prev;

  mon_counter #(.CNT_W(8), .INC_W(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(count == 0, "reset value")
    for (int i = 0; i < 600; i++) begin
      en_count = $urandom_range(0, 1);
      inc      = 4'($urandom_range(0, 15));
      clr      = ($urandom_range(0, 40) == 0);
      prev     = model;
      if (clr) model = 0;
      else if (en_count) model = (model + inc > 255) ? 255 : model + inc;
      @(negedge clk);
      `CHECK(count == 8'(model), $sformatf("count %0d expected %0d", count, model))
      `CHECK(changed == (model != prev), "changed flag")
    end
    // saturation held
    clr = 0; en_count = 1; inc = 15;
    repeat (30) @(negedge clk);
    `CHECK(count == 8'hFF, "saturates at maximum")
    @(negedge clk);
    `CHECK(!changed, "no change while saturated")
    `TB_FINISH
  end
endmodule
