// tb_cpr_flat_sys: end-to-end test of the flattened (CPRflatten) design.
// A producer streams random samples; the host (AXI4-Lite tasks) prepares and
// captures the design in the middle of the stream, resumes it and checks the
// results against a model; then the FPGA is reset, the snapshot is restored
// and resumed, the producer is rewound to the sample after the snapshot, and
// the results must again match the model. Counted: captured and restored
// words, Capture FIFO almost_full cycles, replay cycles and whether a
// snapshot was taken between the two cycles of a sample (RAM output pending).
module tb_cpr_flat_sys;
  import cpr_pkg::*;
  localparam int CTX = 23, NS = 200;
  localparam logic [31:0] CP0 = 32'h400;

  logic clk = 0, rst_n = 0, mem_rst_n = 0;
  logic [3:0]  s_awaddr = 0, s_araddr = 0;
  logic        s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic        s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [7:0]  m_awlen, m_arlen;
  logic [2:0]  m_awsize, m_arsize;
  logic [1:0]  m_awburst, m_arburst;
  logic [3:0]  m_wstrb;
  logic        m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic        m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [31:0] x, win_sum, total, count;
  logic        x_valid, x_ready;
  logic [7:0]  cpr_status;
  assign m_bresp = 2'b00;
  assign m_rresp = 2'b00;

  cpr_flat_sys dut (.*);
  tb_axi_mem #(.WORDS(1024), .STALL(1)) cp_mem (.clk, .rst_n(mem_rst_n),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bvalid(m_bvalid), .bready(m_bready), .araddr(m_araddr), .arlen(m_arlen),
    .arvalid(m_arvalid), .arready(m_arready), .rdata(m_rdata), .rlast(m_rlast),
    .rvalid(m_rvalid), .rready(m_rready));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_cap = 0, n_rst = 0, n_af = 0, n_virt = 0, n_mid = 0;

  // producer
  logic [31:0] xs [NS];
  int pi = 0, limit = 0;
  assign x       = xs[pi];
  assign x_valid = (pi < limit);
  always @(posedge clk) if (rst_n && x_valid && x_ready) pi <= pi + 1;

  always @(posedge clk) if (rst_n) begin
    if (dut.d_cp_valid) n_cap++;
    if (dut.q_r_valid) n_rst++;
    if (dut.cpr_request == CPR_REQ_CAPTURE && dut.cf_af) n_af++;
    if (dut.virt) n_virt++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wvalid = 1;
    do @(posedge clk); while (!s_awready);
    @(negedge clk); s_awvalid = 0; s_wvalid = 0; s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    @(posedge clk); @(negedge clk); s_bready = 0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0; s_rready = 1;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(posedge clk); @(negedge clk); s_rready = 0;
  endtask
  task automatic cmd(input cpr_cmd_e c, input int bit_i);
    logic [31:0] v;
    wr(4'h0, 32'(c));
    do rd(4'h4, v); while (!v[bit_i]);
  endtask

  task automatic check_at(input int k, input string what);
    logic [31:0] w, t;
    w = 0; t = 0;
    for (int i = 0; i < k; i++) begin
      t += xs[i];
      if (i >= k - 16) w += xs[i];
    end
    chk(count == k, {what, ": count"});
    chk(total == t, {what, ": total"});
    chk(win_sum == w, {what, ": window sum"});
  endtask

  int pi_cap, cnt_cap;
  logic [31:0] v;
  initial begin
    foreach (xs[i]) xs[i] = $urandom;
    repeat (3) @(posedge clk); rst_n = 1; mem_rst_n = 1;
    rd(4'hC, v); chk(v == CTX, "context size register");
    for (int rep = 0; rep < 4; rep++) begin
      // stream, snapshot in the middle
      limit = pi + 40;
      repeat (30 + rep) @(negedge clk);
      wr(4'h8, CP0);
      cmd(CMD_PREPARE, ST_PREPARED);
      cmd(CMD_CAPTURE, ST_CAPTURED);
      pi_cap = pi; cnt_cap = count;
      if (dut.u_app.st.phase) n_mid++;
      chk(cp_mem.mem[CP0/4] == count, "first context word is Reg_0 (sample count)");
      cmd(CMD_RESUME, ST_RUNNING);
      while (pi < limit || dut.u_app.st.phase) @(negedge clk);
      @(negedge clk);
      check_at(limit, "after checkpoint and resume");
      // failure: reset, restart from the snapshot
      @(negedge clk); rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
      chk(count == 0, "state lost by the reset");
      wr(4'h8, CP0);
      cmd(CMD_PREPARE, ST_PREPARED);
      cmd(CMD_RESTORE, ST_RESTORED);
      chk(count == cnt_cap, "count restored");
      pi = pi_cap;
      cmd(CMD_RESUME, ST_RUNNING);
      while (pi < limit || dut.u_app.st.phase) @(negedge clk);
      @(negedge clk);
      check_at(limit, "after restart");
    end
    $display("captured %0d, restored %0d words, almost-full %0d, replay %0d, mid-sample snapshots %0d",
             n_cap, n_rst, n_af, n_virt, n_mid);
    chk(n_cap == 4 * CTX, "captured words");
    chk(n_rst == 4 * CTX, "restored words");
    chk(n_af > 0, "Capture FIFO almost_full backpressure");
    chk(n_virt == 8, "replay on every resume");
    chk(n_mid > 0, "snapshot taken with a RAM read pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
