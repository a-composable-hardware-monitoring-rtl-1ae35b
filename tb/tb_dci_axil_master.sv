// Testbench for dci_axil_master (registers 5..11 of a 16-register space)
// against a register-file model and an AXI4-Lite memory model that delays
// AWREADY, WREADY and BVALID at random.  Checks: every register lands at
// base + 4 x index with its value; no write outside that range, also
// when rd_grant withholds the read port for a cycle; `done` pulses once per
// dump; `busy`
// covers the dump and `start` is ignored while busy; an error response
// sets `err` and the next start clears it.
`include "tb_check.svh"
module tb_dci_axil_master;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err, rd_grant = 1;
  logic [31:0] base = 32'h1000_0000;
  logic [3:0] reg_ridx;
  logic [31:0] reg_rdata;
  logic [31:0] m_awaddr, m_wdata;
  logic m_awvalid, m_awready = 0, m_wvalid, m_wready = 0, m_bvalid = 0, m_bready;
  logic [3:0] m_wstrb;
  logic [1:0] m_bresp = 0;
  logic [31:0] regs [16];
  logic [31:0] mem [logic [31:0]];
  int n_done = 0, n_writes = 0;
  bit inject_err = 0;

  dci_axil_master #(.M_ADDR_W(32), .IDX_W(4), .FIRST(5), .LAST(11)) dut (.*);

  always_comb reg_rdata = regs[reg_ridx];
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  // memory model: takes AW and W in any order, then answers on B
  initial begin
    logic [31:0] a, d;
    bit got_a, got_w;
    forever begin
      got_a = 0; got_w = 0;
      while (!(got_a && got_w)) begin
        @(negedge clk);
        m_awready = !got_a && ($urandom_range(0, 2) == 0);
        m_wready  = !got_w && ($urandom_range(0, 2) == 0);
        @(posedge clk);
        if (m_awvalid && m_awready) begin a = m_awaddr; got_a = 1; end
        if (m_wvalid && m_wready)   begin d = m_wdata;  got_w = 1; end
      end
      @(negedge clk);
      m_awready = 0; m_wready = 0;
      `CHECK(m_wstrb == 4'hF, "full-word write")
      mem[a] = d; n_writes++;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      m_bvalid = 1; m_bresp = inject_err ? 2'b10 : 2'b00;
      @(posedge clk);
      while (!m_bready) @(posedge clk);
      @(negedge clk);
      m_bvalid = 0;
    end
  end

  always @(posedge clk) if (rst_n && done) n_done++;
  // the register read port must not be used while it is not granted
  always @(posedge clk) if (rst_n && !rd_grant) rd_grant <= 1;

  initial begin
    for (int i = 0; i < 16; i++) regs[i] = $urandom();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(!busy && !m_awvalid && !m_wvalid, "idle after reset")
    start = 1; @(negedge clk); start = 0;
    `CHECK(busy, "busy after start")
    rd_grant = 0;   // slave side holds the read port for one cycle
    repeat (3) @(negedge clk);
    start = 1; @(negedge clk); start = 0;   // ignored while busy
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    `CHECK(n_done == 1, $sformatf("one done pulse, got %0d", n_done))
    `CHECK(n_writes == 7, $sformatf("seven writes, got %0d", n_writes))
    for (int i = 5; i <= 11; i++)
      `CHECK(mem.exists(base + 32'(4 * i)) && mem[base + 32'(4 * i)] == regs[i], $sformatf("register %0d mirrored", i))
    `CHECK(!mem.exists(base + 16) && !mem.exists(base + 48), "nothing outside the range")
    `CHECK(!err, "no error")
    // second dump with new values and an error response
    for (int i = 0; i < 16; i++) regs[i] = $urandom();
    base = 32'h2000_0000; inject_err = 1;
    start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    @(negedge clk);   // done is counted on the edge after busy falls
    `CHECK(n_done == 2 && err, "error response flagged")
    for (int i = 5; i <= 11; i++)
      `CHECK(mem[base + 32'(4 * i)] == regs[i], $sformatf("second dump register %0d", i))
    inject_err = 0;
    start = 1; @(negedge clk); start = 0;
    `CHECK(!err, "start clears the error flag")
    while (busy) @(negedge clk);
    `TB_FINISH
  end
endmodule
