// tb_axil_cdc - self-checking testbench for the AXI4-Lite clock-domain bridge.
//
// The host clock period is 10 time units and the core clock period 8, so the two
// drift against each other. Behind the bridge sits a 16-word register file
// model with random ready delays; index 15 answers with SLVERR. The host
// issues 300 random byte-strobed writes and reads; a reference copy of the
// register file gives every expected read value and response code, and
// each transaction must complete within a fixed number of host cycles.
`include "tb_check.svh"
module tb_axil_cdc;
  int checks = 0, failures = 0;

  localparam int AW = 14;
  logic clk = 1'b0, cclk = 1'b0;
  logic rst_n = 1'b0;
  always #5   clk  = ~clk;
  always #4 cclk = ~cclk;

  logic [AW-1:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = '0;
  logic [3:0]  s_wstrb = '0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;

  logic [AW-1:0] c_awaddr, c_araddr;
  logic c_awvalid, c_wvalid, c_bready, c_arvalid, c_rready;
  logic [31:0] c_wdata;
  logic [3:0]  c_wstrb;
  logic c_awready, c_wready, c_bvalid, c_arready, c_rvalid;
  logic [1:0] c_bresp, c_rresp;
  logic [31:0] c_rdata;

  axil_cdc #(.ADDR_W(AW)) dut (
    .s_clk(clk), .s_rst_n(rst_n),
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .c_clk(cclk), .c_rst_n(rst_n),
    .c_awaddr, .c_awvalid, .c_awready, .c_wdata, .c_wstrb, .c_wvalid, .c_wready,
    .c_bresp, .c_bvalid, .c_bready, .c_araddr, .c_arvalid, .c_arready,
    .c_rdata, .c_rresp, .c_rvalid, .c_rready
  );

  // ---- core-side register file model with random ready delays ----
  logic [31:0] rf [16];
  logic        aw_got, w_got;
  logic [3:0]  aw_idx;
  logic [31:0] w_d;
  logic [3:0]  w_s;
  always_ff @(posedge cclk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) rf[i] <= '0;
      c_awready <= 0; c_wready <= 0; c_arready <= 0;
      c_bvalid <= 0; c_rvalid <= 0; c_bresp <= 0; c_rresp <= 0; c_rdata <= 0;
      aw_got <= 0; w_got <= 0; aw_idx <= 0; w_d <= 0; w_s <= 0;
    end else begin
      c_awready <= ($urandom_range(0, 2) != 0);
      c_wready  <= ($urandom_range(0, 2) != 0);
      c_arready <= ($urandom_range(0, 2) != 0);
      if (c_awvalid && c_awready) begin aw_got <= 1; aw_idx <= c_awaddr[5:2]; end
      if (c_wvalid && c_wready)   begin w_got <= 1; w_d <= c_wdata; w_s <= c_wstrb; end
      if (aw_got && w_got && !c_bvalid) begin
        for (int b = 0; b < 4; b++)
          if (w_s[b]) rf[aw_idx][8*b +: 8] <= w_d[8*b +: 8];
        c_bvalid <= 1; c_bresp <= (aw_idx == 15) ? 2'b10 : 2'b00;
        aw_got <= 0; w_got <= 0;
      end
      if (c_bvalid && c_bready) c_bvalid <= 0;
      if (c_arvalid && c_arready) begin
        c_rvalid <= 1; c_rdata <= rf[c_araddr[5:2]];
        c_rresp <= (c_araddr[5:2] == 15) ? 2'b10 : 2'b00;
      end
      if (c_rvalid && c_rready) c_rvalid <= 0;
    end

  // ---- host tasks ----
  int lat;
  task automatic hwr(input int idx, input logic [31:0] v, input logic [3:0] st,
                     output logic [1:0] resp);
    s_awaddr = AW'(4 * idx); s_awvalid = 1; s_wdata = v; s_wstrb = st; s_wvalid = 1;
    lat = 0;
    #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) begin @(negedge clk); lat++; end
    resp = s_bresp;
    s_bready = 1; @(negedge clk); s_bready = 0;
  endtask

  task automatic hrd(input int idx, output logic [31:0] v, output logic [1:0] resp);
    s_araddr = AW'(4 * idx); s_arvalid = 1;
    lat = 0;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) begin @(negedge clk); lat++; end
    v = s_rdata; resp = s_rresp;
    s_rready = 1; @(negedge clk); s_rready = 0;
  endtask

  // ---- reference and stimulus ----
  logic [31:0] ref_rf [16];
  logic [31:0] v, d;
  logic [1:0]  r;
  logic [3:0]  st;
  int idx, max_lat, n_wr, n_rd, n_err;

  initial begin
    for (int i = 0; i < 16; i++) ref_rf[i] = '0;
    max_lat = 0; n_wr = 0; n_rd = 0; n_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      idx = $urandom_range(0, 15);
      if ($urandom_range(0, 1) == 1) begin
        d  = $urandom;
        st = 4'($urandom_range(1, 15));
        hwr(idx, d, st, r);
        for (int b = 0; b < 4; b++) if (st[b]) ref_rf[idx][8*b +: 8] = d[8*b +: 8];
        `CHECK(r == ((idx == 15) ? 2'b10 : 2'b00), $sformatf("bresp idx %0d", idx))
        n_wr++;
      end else begin
        hrd(idx, v, r);
        `CHECK(v == ref_rf[idx], $sformatf("read idx %0d got %h exp %h", idx, v, ref_rf[idx]))
        `CHECK(r == ((idx == 15) ? 2'b10 : 2'b00), $sformatf("rresp idx %0d", idx))
        n_rd++;
      end
      if (r != 0) n_err++;
      if (lat > max_lat) max_lat = lat;
      if (($urandom_range(0, 3)) == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    // a round trip is a handful of cycles of each clock
    `CHECK(max_lat <= 20, $sformatf("worst response latency %0d host cycles", max_lat))
    `CHECK(n_wr > 50 && n_rd > 50 && n_err > 0, "both directions and error responses exercised")
    `TB_FINISH
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
