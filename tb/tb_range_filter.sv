// Testbench for range_filter: random and corner values against a reference
// closed-range check, with and without bypass.
`include "tb_check.svh"
module tb_range_filter;
  int checks = 0, failures = 0;
  logic [31:0] data, inf, sup;
  logic bypass, in_range;

  range_filter #(.W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    `TB_FINISH
  end

  initial begin
    // corners: both bounds are inside the range
    inf = 10; sup = 20; bypass = 0;
    data = 10; #1 `CHECK(in_range, "lower bound included")
    data = 20; #1 `CHECK(in_range, "upper bound included")
    data = 9;  #1 `CHECK(!in_range, "below range")
    data = 21; #1 `CHECK(!in_range, "above range")
    bypass = 1; #1 `CHECK(in_range, "bypass passes everything")
    for (int i = 0; i < 500; i++) begin
      data = $urandom_range(0, 64); inf = $urandom_range(0, 64); sup = $urandom_range(0, 64);
      bypass = ($urandom_range(0, 3) == 0);
      #1 `CHECK(in_range == (bypass || (data >= inf && data <= sup)), "random compare")
    end
    `TB_FINISH
  end
endmodule
