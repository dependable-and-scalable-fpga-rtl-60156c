// tb_app_sum: the demonstration user logic with its two-level CPR tree,
// driven directly through the root CPR gate (no static part).
// Job A runs until a point of its RAM readback, is paused and captured;
// the logic is then reset and job B runs to completion on other data
// (overwriting the RAM); job B's results are checked; then job A's snapshot
// is restored, the RAM and multiplier inputs are replayed, and job A must
// finish with the results of an uninterrupted run. This is repeated for
// every readback index, so the child's multiplier pipeline is captured
// empty, filling, full and draining. While the registers rotate during a
// capture the user logic's outputs are meaningless, so AR and AW requests
// are gated with drive, standing in for the request throttle of the
// static part.
module tb_app_sum;
  import cpr_pkg::*;
  localparam int N = 16, CTX = 4 + 2 + N + 11;
  logic clk = 0, rst_n = 0, drive = 1, virt = 0, start = 0;
  logic [31:0] src_addr = 0, dst_addr = 0, sum, sumsq, chk_o;
  logic done;
  logic [31:0] araddr, rdata, awaddr, wdata;
  logic [7:0] arlen, awlen;
  logic arvalid, arready, rlast, rvalid, rready, awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  cpr_req_e req = CPR_REQ_NONE; cpr_state_e st;
  logic af = 0, cflag = 0, dv, qv = 0;
  logic [31:0] dcp, qr = 0;
  int checks = 0, failures = 0;
  logic [31:0] snap[$];

  app_sum #(.N_WORDS(N)) dut (.clk, .rst_n, .drive, .virt, .start, .src_addr, .dst_addr,
    .done, .sum, .sumsq, .chk(chk_o), .araddr, .arlen, .arvalid, .arready, .rdata, .rlast,
    .rvalid, .rready, .awaddr, .awlen, .awvalid, .awready, .wdata, .wlast, .wvalid, .wready,
    .bvalid, .bready, .CPR_request(req), .CPR_state(st), .cpr_out_almost_full(af),
    .capture_flag(cflag), .D_cp(dcp), .D_cp_valid(dv), .Q_r(qr), .Q_r_valid(qv));

  logic m_arvalid, m_arready, m_awvalid, m_awready;
  assign m_arvalid = arvalid && drive;
  assign arready   = m_arready && drive;
  assign m_awvalid = awvalid && drive;
  assign awready   = m_awready && drive;

  tb_axi_mem #(.WORDS(1024), .STALL(1)) mem (.clk, .rst_n(1'b1), .awaddr, .awlen,
    .awvalid(m_awvalid), .awready(m_awready), .wdata, .wlast, .wvalid, .wready, .bvalid,
    .bready, .araddr, .arlen, .arvalid(m_arvalid), .arready(m_arready), .rdata, .rlast, .rvalid, .rready);

  always #5 clk = ~clk;
  always @(posedge clk) if (dv) snap.push_back(dcp);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // reference results of one job
  task automatic golden(input int base, output logic [31:0] s, output logic [31:0] sq,
                        output logic [31:0] c);
    s = 0; sq = 0; c = 0;
    for (int i = 0; i < N; i++) begin
      s  += mem.mem[base + i];
      sq += mem.mem[base + i] * mem.mem[base + i];
      c   = {c[30:0], c[31]} ^ mem.mem[base + i];
    end
  endtask

  logic [31:0] gsa, gqa, gca, gsb, gqb, gcb;
  initial begin
   repeat (2) @(posedge clk);
   for (int k = 0; k <= N; k++) begin
    for (int i = 0; i < N; i++) begin mem.mem[i] = $urandom; mem.mem[64 + i] = $urandom; end
    golden(0, gsa, gqa, gca);
    golden(64, gsb, gqb, gcb);
    snap.delete();
    rst_n = 0; start = 0; drive = 1; @(negedge clk); rst_n = 1;
    // ---- job A, paused at readback index k ----
    @(negedge clk); src_addr = 0; dst_addr = 32'h200; start = 1;
    while (!(dut.st.phase == 4'd3 && dut.st.idx == 9'(k))) @(negedge clk);
    drive = 0;
    req = CPR_REQ_CAPTURE; cflag = 1;
    while (st != CPR_ST_DONE) begin af = ($urandom_range(0, 3) == 0); @(negedge clk); end
    af = 0; repeat (3) @(negedge clk);
    req = CPR_REQ_NONE; cflag = 0;
    chk(snap.size() == CTX, $sformatf("snapshot size %0d", snap.size()));
    // ---- reset, job B to completion ----
    rst_n = 0; start = 0; drive = 1; @(negedge clk); rst_n = 1;
    @(negedge clk); src_addr = 32'h100; dst_addr = 32'h204; start = 1;
    while (!done) @(negedge clk);
    chk(sum == gsb && sumsq == gqb && chk_o == gcb, "job B results");
    chk(mem.mem[32'h204/4] == gsb, "job B written sum");
    // ---- restore job A and resume ----
    drive = 0; src_addr = 0; dst_addr = 32'h200;
    req = CPR_REQ_RESTORE; @(negedge clk); @(negedge clk);
    for (int i = 0; i < CTX; i++) begin qv = 1; qr = snap[i]; @(negedge clk); end
    qv = 0;
    repeat (4) @(negedge clk);
    chk(st == CPR_ST_DONE, "restore done");
    req = CPR_REQ_NONE;
    virt = 1; repeat (4) @(negedge clk); virt = 0; drive = 1;
    while (!done) @(negedge clk);
    chk(sum == gsa, "job A sum");
    chk(sumsq == gqa, "job A sum of squares");
    chk(chk_o == gca, "job A readback checksum");
    repeat (3) @(negedge clk);
    chk(mem.mem[32'h200/4] == gsa, "job A written sum");
    mem.mem[32'h200/4] = 0;
    start = 0; @(negedge clk);
   end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
