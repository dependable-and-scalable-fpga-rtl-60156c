// tb_cpr_top: end-to-end test of the checkpointable designs at their default
// parameters, with the host modelled by AXI4-Lite tasks, the application
// memory and the checkpoint memory by two stalling AXI4 memories.
//  1. Checkpoint without restart: job A is prepared while its read burst is
//     in flight (PREPARE must wait for the channel), captured, resumed, and
//     must finish with the right results.
//  2. Failure and restart / multitasking: job A is captured in the middle of
//     its RAM readback, the FPGA is reset; after PREPARE job B is started and
//     its read request is held back by request throttling; job B is captured
//     there; job A is restored and resumed to completion; job B is restored
//     and resumed to completion. All results are compared with a model.
//  3. The flattened design (CPRflatten) beside it: a sample stream is
//     checkpointed, resumed and checked; after a reset the snapshot is
//     restored, the producer rewound, and the results checked again.
// Each mechanism is counted and a failure is counted for any that never
// happened. The capture latency is checked against the 32-bit word count.
module tb_cpr_top;
  import cpr_pkg::*;
  localparam int N = 16, CTX = 33;
  localparam logic [31:0] CP0 = 32'h1000, CP1 = 32'h2000;

  logic clk = 0, rst_n = 0;
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
  logic [31:0] u_araddr, u_rdata, u_awaddr, u_wdata;
  logic [7:0]  u_arlen, u_awlen;
  logic        u_arvalid, u_arready, u_rlast, u_rvalid, u_rready;
  logic        u_awvalid, u_awready, u_wlast, u_wvalid, u_wready, u_bvalid, u_bready;
  logic        app_start = 0, app_done;
  logic [31:0] app_src = 0, app_dst = 0, app_sum_o, app_sumsq_o, app_chk_o;
  logic [7:0]  cpr_status;
  logic        cpr_drive, cpr_req_en;
  // CPRflatten design
  logic [3:0]  f_s_awaddr = 0, f_s_araddr = 0;
  logic        f_s_awvalid = 0, f_s_awready, f_s_wvalid = 0, f_s_wready, f_s_bvalid, f_s_bready = 0;
  logic        f_s_arvalid = 0, f_s_arready, f_s_rvalid, f_s_rready = 0;
  logic [31:0] f_s_wdata = 0, f_s_rdata;
  logic [1:0]  f_s_bresp, f_s_rresp;
  logic [31:0] f_m_awaddr, f_m_wdata, f_m_araddr, f_m_rdata;
  logic [7:0]  f_m_awlen, f_m_arlen;
  logic [2:0]  f_m_awsize, f_m_arsize;
  logic [1:0]  f_m_awburst, f_m_arburst;
  logic [3:0]  f_m_wstrb;
  logic        f_m_awvalid, f_m_awready, f_m_wlast, f_m_wvalid, f_m_wready, f_m_bvalid, f_m_bready;
  logic        f_m_arvalid, f_m_arready, f_m_rlast, f_m_rvalid, f_m_rready;
  logic [1:0]  f_m_bresp = 2'b00, f_m_rresp = 2'b00;
  logic [31:0] f_x, f_win_sum, f_total, f_count;
  logic        f_x_valid, f_x_ready;
  logic [7:0]  f_cpr_status;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_chan_wait = 0, n_throttled = 0, n_paused = 0, n_cap_words = 0, n_rst_words = 0;
  int f_cap_words = 0, f_rst_words = 0, f_virt = 0;
  int n_af = 0, n_child_words = 0, n_ram_words = 0, n_virt = 0, n_captures = 0, n_restores = 0;

  cpr_top dut (.*);

  logic mem_rst_n = 0;
  tb_axi_mem #(.WORDS(4096), .STALL(1)) cp_mem (.clk, .rst_n(mem_rst_n),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bvalid(m_bvalid), .bready(m_bready), .araddr(m_araddr), .arlen(m_arlen),
    .arvalid(m_arvalid), .arready(m_arready), .rdata(m_rdata), .rlast(m_rlast),
    .rvalid(m_rvalid), .rready(m_rready));
  tb_axi_mem #(.WORDS(1024), .STALL(1)) app_mem (.clk, .rst_n(mem_rst_n),
    .awaddr(u_awaddr), .awlen(u_awlen), .awvalid(u_awvalid), .awready(u_awready),
    .wdata(u_wdata), .wlast(u_wlast), .wvalid(u_wvalid), .wready(u_wready),
    .bvalid(u_bvalid), .bready(u_bready), .araddr(u_araddr), .arlen(u_arlen),
    .arvalid(u_arvalid), .arready(u_arready), .rdata(u_rdata), .rlast(u_rlast),
    .rvalid(u_rvalid), .rready(u_rready));

  tb_axi_mem #(.WORDS(1024), .STALL(1)) f_mem (.clk, .rst_n(mem_rst_n),
    .awaddr(f_m_awaddr), .awlen(f_m_awlen), .awvalid(f_m_awvalid), .awready(f_m_awready),
    .wdata(f_m_wdata), .wlast(f_m_wlast), .wvalid(f_m_wvalid), .wready(f_m_wready),
    .bvalid(f_m_bvalid), .bready(f_m_bready), .araddr(f_m_araddr), .arlen(f_m_arlen),
    .arvalid(f_m_arvalid), .arready(f_m_arready), .rdata(f_m_rdata), .rlast(f_m_rlast),
    .rvalid(f_m_rvalid), .rready(f_m_rready));

  // sample producer for the flattened design
  logic [31:0] xs [64];
  int pi = 0, limit = 0;
  assign f_x       = xs[pi];
  assign f_x_valid = (pi < limit);
  always @(posedge clk) if (rst_n && f_x_valid && f_x_ready) pi <= pi + 1;

  assign m_bresp = 2'b00;
  assign m_rresp = 2'b00;

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_manager.state == 3'd1 && !dut.channels_idle) n_chan_wait++;
    if ((dut.app_arvalid && !u_arvalid) || (dut.app_awvalid && !u_awvalid)) n_throttled++;
    if (!cpr_drive) n_paused++;
    if (dut.d_cp_valid) n_cap_words++;
    if (dut.q_r_valid) n_rst_words++;
    if (dut.cpr_request == CPR_REQ_CAPTURE && dut.cf_af) n_af++;
    if (dut.u_app.a_q_cp_v[0] || dut.u_app.a_d_r_v[0]) n_child_words++;
    if (dut.u_app.ram_step || dut.u_app.ram_load) n_ram_words++;
    if (dut.virt) n_virt++;
    if (dut.u_flat.d_cp_valid) f_cap_words++;
    if (dut.u_flat.q_r_valid) f_rst_words++;
    if (dut.u_flat.virt) f_virt++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // ---------------- host model ----------------
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

  task automatic fwr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); f_s_awaddr = a; f_s_awvalid = 1; f_s_wdata = d; f_s_wvalid = 1;
    do @(posedge clk); while (!f_s_awready);
    @(negedge clk); f_s_awvalid = 0; f_s_wvalid = 0; f_s_bready = 1;
    while (!f_s_bvalid) @(negedge clk);
    @(posedge clk); @(negedge clk); f_s_bready = 0;
  endtask

  task automatic fcmd(input cpr_cmd_e c, input int bit_i);
    logic [31:0] v;
    fwr(4'h0, 32'(c));
    do begin
      @(negedge clk); f_s_araddr = 4'h4; f_s_arvalid = 1;
      do @(posedge clk); while (!f_s_arready);
      @(negedge clk); f_s_arvalid = 0; f_s_rready = 1;
      while (!f_s_rvalid) @(negedge clk);
      v = f_s_rdata;
      @(posedge clk); @(negedge clk); f_s_rready = 0;
    end while (!v[bit_i]);
  endtask

  task automatic fcheck(input int k, input string what);
    logic [31:0] w, t;
    w = 0; t = 0;
    for (int i = 0; i < k; i++) begin
      t += xs[i];
      if (i >= k - 16) w += xs[i];
    end
    chk(f_count == k && f_total == t && f_win_sum == w, what);
  endtask

  task automatic wait_status(input int bit_i);
    logic [31:0] v;
    do rd(4'h4, v); while (!v[bit_i]);
  endtask

  task automatic cpr_prepare(input logic [31:0] addr);
    wr(4'h8, addr); wr(4'h0, 32'(CMD_PREPARE)); wait_status(ST_PREPARED);
  endtask
  task automatic cpr_capture(output int cycles);
    int t0; t0 = $time;
    wr(4'h0, 32'(CMD_CAPTURE)); wait_status(ST_CAPTURED);
    cycles = ($time - t0) / 10; n_captures++;
  endtask
  task automatic cpr_restore();
    wr(4'h0, 32'(CMD_RESTORE)); wait_status(ST_RESTORED); n_restores++;
  endtask
  task automatic cpr_resume();
    wr(4'h0, 32'(CMD_RESUME)); wait_status(ST_RUNNING);
  endtask

  task automatic golden(input int base, output logic [31:0] s, output logic [31:0] sq,
                        output logic [31:0] c);
    s = 0; sq = 0; c = 0;
    for (int i = 0; i < N; i++) begin
      s  += app_mem.mem[base + i];
      sq += app_mem.mem[base + i] * app_mem.mem[base + i];
      c   = {c[30:0], c[31]} ^ app_mem.mem[base + i];
    end
  endtask

  logic [31:0] gsa, gqa, gca, gsb, gqb, gcb, v;
  int cap_cycles;
  initial begin
    for (int i = 0; i < N; i++) begin app_mem.mem[i] = $urandom; app_mem.mem[64 + i] = $urandom; end
    golden(0, gsa, gqa, gca);
    golden(64, gsb, gqb, gcb);
    repeat (3) @(posedge clk); rst_n = 1; mem_rst_n = 1;
    rd(4'hC, v); chk(v == CTX, "context size register");

    // ---- 1. checkpoint of job A without restart ----
    @(negedge clk); app_src = 0; app_dst = 32'h200; app_start = 1;
    while (!(u_arvalid && u_arready)) @(negedge clk);
    cpr_prepare(CP0);
    chk(dut.u_app.st.phase == 4'd3 || dut.u_app.st.phase > 4'd3, "prepare let the read burst finish");
    cpr_capture(cap_cycles);
    $display("capture of %0d words: %0d cycles from command to status", CTX, cap_cycles);
    chk(cap_cycles >= CTX && cap_cycles < CTX + 200, "capture latency = words + constant");
    cpr_resume();
    while (!app_done) @(negedge clk);
    chk(app_sum_o == gsa && app_sumsq_o == gqa && app_chk_o == gca, "job A after checkpoint");
    repeat (2) @(negedge clk);
    chk(app_mem.mem[32'h200/4] == gsa, "job A written sum");
    app_start = 0; repeat (3) @(negedge clk);

    // ---- 2. capture job A mid-readback, fail, run B, restart A ----
    app_dst = 32'h208; app_start = 1;
    while (!(dut.u_app.st.phase == 4'd3 && dut.u_app.st.idx == 9'd9)) @(negedge clk);
    cpr_prepare(CP0);
    cpr_capture(cap_cycles);
    for (int i = 0; i < CTX; i++) chk(cp_mem.mem[CP0/4 + i] !== 32'hx, "snapshot stored");
    // failure: FPGA reset (configuration reloaded)
    @(negedge clk); rst_n = 0; app_start = 0; repeat (2) @(negedge clk); rst_n = 1;
    cpr_prepare(CP1);
    app_src = 32'h100; app_dst = 32'h204; app_start = 1;
    repeat (20) @(negedge clk);
    chk(dut.u_app.st.phase == 4'd1 && !u_arvalid, "job B's read request held back");
    cpr_capture(cap_cycles);
    // swap A in
    wr(4'h8, CP0);
    app_src = 0; app_dst = 32'h208;
    cpr_restore();
    cpr_resume();
    while (!app_done) @(negedge clk);
    chk(app_sum_o == gsa, "job A sum after restart");
    chk(app_sumsq_o == gqa, "job A sum of squares after restart");
    chk(app_chk_o == gca, "job A checksum after restart");
    repeat (2) @(negedge clk);
    chk(app_mem.mem[32'h208/4] == gsa, "job A written sum after restart");
    // swap B in
    cpr_prepare(CP1);
    app_src = 32'h100; app_dst = 32'h204;
    cpr_restore();
    cpr_resume();
    while (!app_done) @(negedge clk);
    chk(app_sum_o == gsb && app_sumsq_o == gqb && app_chk_o == gcb, "job B after swap-in");
    repeat (2) @(negedge clk);
    chk(app_mem.mem[32'h204/4] == gsb, "job B written sum");

    // ---- 3. flattened design: checkpoint, failure, restart ----
    begin
      int pi_cap;
      foreach (xs[i]) xs[i] = $urandom;
      fwr(4'h8, 32'h100);
      limit = 40;
      repeat (45) @(negedge clk);
      fcmd(CMD_PREPARE, ST_PREPARED);
      fcmd(CMD_CAPTURE, ST_CAPTURED);
      pi_cap = pi;
      fcmd(CMD_RESUME, ST_RUNNING);
      while (pi < limit || dut.u_flat.u_app.st.phase) @(negedge clk);
      @(negedge clk);
      fcheck(40, "flattened design after checkpoint");
      @(negedge clk); rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
      fwr(4'h8, 32'h100);
      fcmd(CMD_PREPARE, ST_PREPARED);
      fcmd(CMD_RESTORE, ST_RESTORED);
      pi = pi_cap;
      fcmd(CMD_RESUME, ST_RUNNING);
      while (pi < limit || dut.u_flat.u_app.st.phase) @(negedge clk);
      @(negedge clk);
      fcheck(40, "flattened design after restart");
    end

    $display("mechanisms: channel-wait %0d, throttled %0d, paused %0d, captured words %0d, restored words %0d",
             n_chan_wait, n_throttled, n_paused, n_cap_words, n_rst_words);
    $display("            almost-full %0d, child words %0d, RAM words %0d, replay %0d, captures %0d, restores %0d",
             n_af, n_child_words, n_ram_words, n_virt, n_captures, n_restores);
    chk(n_chan_wait > 0, "PREPARE waited for an active channel");
    chk(n_throttled > 0, "request throttling held a request");
    chk(n_paused > 0, "logic throttling");
    chk(n_cap_words == 3 * CTX, "captured words");
    chk(n_rst_words == 2 * CTX, "restored words");
    chk(n_af > 0, "Capture FIFO almost_full backpressure");
    chk(n_child_words == 5 * 11, "child forwarding");
    chk(n_ram_words > 0, "RAM capture/restore");
    chk(n_virt == 3 * 4, "signal virtualization on every resume");
    $display("flattened: captured %0d, restored %0d words, replay %0d", f_cap_words, f_rst_words, f_virt);
    chk(f_cap_words == 23 && f_rst_words == 23, "flattened design: ring and RAM words moved");
    chk(f_virt == 2, "flattened design: replay on every resume");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
