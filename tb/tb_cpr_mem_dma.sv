// tb_cpr_mem_dma: memory DMA between two 16-entry FIFOs and a stalling AXI4
// memory. Capture: words are pushed into the Capture FIFO at a random rate;
// the DMA must start writing while words are still arriving, and memory must
// end holding every word in order. Restore: the same area is read into the
// Restore FIFO, drained at a random rate, and compared.
module tb_cpr_mem_dma;
  localparam int NW = 45;
  localparam logic [31:0] BASE = 32'h0000_0200;
  logic clk = 0, rst_n = 0;
  logic wr_start = 0, rd_start = 0, wr_done, rd_done;
  logic [31:0] n_words = NW, base = BASE;
  logic cf_wr = 0, cf_rd, cf_empty, cf_full, cf_af;
  logic [31:0] cf_wdata = 0, cf_data;
  logic [4:0] cf_count, rf_count;
  logic rf_wr, rf_rd = 0, rf_empty, rf_full, rf_af;
  logic [31:0] rf_data, rf_q;
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [7:0] m_awlen, m_arlen;
  logic [2:0] m_awsize, m_arsize;
  logic [1:0] m_awburst, m_arburst, m_bresp = 0, m_rresp = 0;
  logic [3:0] m_wstrb;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  int checks = 0, failures = 0, pushed = 0, first_aw = -1, last_push = -1, cyc = 0;
  logic [31:0] data [NW];

  cpr_fifo #(.DEPTH(16)) cfifo (.clk, .rst_n, .wr_en(cf_wr), .wr_data(cf_wdata), .rd_en(cf_rd),
    .rd_data(cf_data), .empty(cf_empty), .full(cf_full), .almost_full(cf_af), .count(cf_count));
  cpr_fifo #(.DEPTH(16)) rfifo (.clk, .rst_n, .wr_en(rf_wr), .wr_data(rf_data), .rd_en(rf_rd),
    .rd_data(rf_q), .empty(rf_empty), .full(rf_full), .almost_full(rf_af), .count(rf_count));
  cpr_mem_dma #(.MAX_BURST(16), .FIFO_DEPTH(16)) dut (.*);
  tb_axi_mem #(.WORDS(1024), .STALL(1)) mem (.clk, .rst_n,
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bvalid(m_bvalid), .bready(m_bready), .araddr(m_araddr), .arlen(m_arlen),
    .arvalid(m_arvalid), .arready(m_arready), .rdata(m_rdata), .rlast(m_rlast),
    .rvalid(m_rvalid), .rready(m_rready));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (m_awvalid && first_aw < 0) first_aw = cyc;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < NW; i++) data[i] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); wr_start = 1; @(negedge clk); wr_start = 0;
    while (pushed < NW) begin
      cf_wr = !cf_full && ($urandom_range(0, 2) != 0);
      cf_wdata = data[pushed];
      @(posedge clk);
      if (cf_wr) begin pushed++; last_push = cyc; end
      @(negedge clk);
    end
    cf_wr = 0;
    $display("pushed all at %0d", cyc);
    while (!wr_done) @(negedge clk);
    chk(first_aw > 0 && first_aw < last_push, "write starts before the FIFO has all words");
    for (int i = 0; i < NW; i++) chk(mem.mem[BASE/4 + i] == data[i], "word in memory");
    chk(mem.mem[BASE/4 + NW] == 0 && mem.mem[BASE/4 - 1] == 0, "nothing written outside");
    // restore path
    @(negedge clk); rd_start = 1; @(negedge clk); rd_start = 0;
    for (int i = 0; i < NW; i++) begin
      while (rf_empty || $urandom_range(0, 3) == 0) begin rf_rd = 0; @(negedge clk); end
      chk(rf_q == data[i], "restored word order");
      rf_rd = 1; @(negedge clk); rf_rd = 0;
    end
    repeat (5) @(negedge clk);
    chk(rd_done && rf_empty, "read complete, nothing extra");
    $display("write bursts %0d, read bursts %0d", mem.wr_bursts, mem.rd_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
