// tb_cpr_node: a parent CPR node (two register words, a three-word RAM
// segment modelled by the testbench, two children) over two leaf nodes with
// register rings of two and one words.
// Capture, with the Capture FIFO's almost_full toggling at random, must give
// exactly parent regs, parent RAM, child 0, child 1, in order, and leave all
// registers unchanged. Restore, with gaps between words, must put a new
// image everywhere and end with the parent DONE.
module tb_cpr_node;
  import cpr_pkg::*;
  localparam int PK = 2, PR = 3, C0K = 2, C1K = 1;
  localparam int TOT = PK + PR + C0K + C1K;

  logic clk = 0, rst_n = 0, drive = 0;
  cpr_req_e   req = CPR_REQ_NONE;
  cpr_state_e pstate;
  logic af = 0, cflag = 0, dv, qv = 0;
  logic [31:0] dcp, qr = 0;
  int checks = 0, failures = 0, af_stalls = 0;

  // parent own sources
  logic p_active, p_cs, p_rs, p_step, p_load;
  logic [31:0] p_tail, p_ramw, p_rd;
  logic [32*PK-1:0] p_d = '0, p_q;
  logic [31:0] ram_img [PR], ram_rst [PR];
  int ram_idx = 0;

  // children
  cpr_req_e    a_req;
  cpr_state_e  a_state [2];
  logic        a_flag  [2];
  logic [31:0] a_d_r   [2];
  logic        a_d_r_v [2];
  logic [31:0] a_q_cp  [2];
  logic        a_q_cp_v[2];

  cpr_reg_ring #(.K(PK)) p_ring (.clk, .rst_n, .drive, .d(p_d), .q(p_q),
    .cap_shift(p_cs), .rst_shift(p_rs), .rst_data(p_rd), .tail(p_tail));

  cpr_node #(.K_WORDS(PK), .RAM_WORDS(PR), .N_CHILD(2),
             .CHILD_WORDS({32'(C1K), 32'(C0K)})) parent (
    .clk, .rst_n, .CPR_request(req), .CPR_state(pstate), .cpr_out_almost_full(af),
    .capture_flag(cflag), .D_cp(dcp), .D_cp_valid(dv), .Q_r(qr), .Q_r_valid(qv),
    .active(p_active), .reg_cap_shift(p_cs), .reg_rst_shift(p_rs), .reg_tail(p_tail),
    .ram_step(p_step), .ram_load(p_load), .ram_word(p_ramw), .rst_data(p_rd),
    .a_CPR_request(a_req), .a_CPR_state(a_state), .a_capture_flag(a_flag),
    .a_D_r(a_d_r), .a_D_r_valid(a_d_r_v), .a_Q_cp(a_q_cp), .a_Q_cp_valid(a_q_cp_v));

  // RAM segment model: word on the cycle after a step, stored on a load
  always_ff @(posedge clk) begin
    if (!p_active) ram_idx <= 0;
    else if (p_step) begin p_ramw <= ram_img[ram_idx]; ram_idx <= ram_idx + 1; end
    else if (p_load) begin ram_rst[ram_idx] <= p_rd; ram_idx <= ram_idx + 1; end
  end

  // leaf children
  logic [32*C0K-1:0] c0_d = '0, c0_q;
  logic [32*C1K-1:0] c1_d = '0, c1_q;
  for (genvar g = 0; g < 2; g++) begin : g_child
    localparam int CK = (g == 0) ? C0K : C1K;
    logic cs, rs, act, st, ld;
    logic [31:0] tl, rd;
    logic [32*CK-1:0] cq;
    cpr_state_e  n_state [1];
    logic        n_flag[1], n_drv[1], n_qv[1];
    logic [31:0] n_dr[1], n_q[1];
    cpr_req_e    n_req;
    assign n_state[0] = CPR_ST_IDLE; assign n_q[0] = '0; assign n_qv[0] = 1'b0;
    if (g == 0) begin : g0
      cpr_reg_ring #(.K(CK)) ring (.clk, .rst_n, .drive, .d(c0_d), .q(c0_q),
        .cap_shift(cs), .rst_shift(rs), .rst_data(rd), .tail(tl));
    end else begin : g1
      cpr_reg_ring #(.K(CK)) ring (.clk, .rst_n, .drive, .d(c1_d), .q(c1_q),
        .cap_shift(cs), .rst_shift(rs), .rst_data(rd), .tail(tl));
    end
    cpr_node #(.K_WORDS(CK)) node (
      .clk, .rst_n, .CPR_request(a_req), .CPR_state(a_state[g]), .cpr_out_almost_full(af),
      .capture_flag(a_flag[g]), .D_cp(a_q_cp[g]), .D_cp_valid(a_q_cp_v[g]),
      .Q_r(a_d_r[g]), .Q_r_valid(a_d_r_v[g]),
      .active(act), .reg_cap_shift(cs), .reg_rst_shift(rs), .reg_tail(tl),
      .ram_step(st), .ram_load(ld), .ram_word(32'd0), .rst_data(rd),
      .a_CPR_request(n_req), .a_CPR_state(n_state), .a_capture_flag(n_flag),
      .a_D_r(n_dr), .a_D_r_valid(n_drv), .a_Q_cp(n_q), .a_Q_cp_valid(n_qv));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [31:0] exp_q[$], got[$];
  logic [32*PK-1:0] p_img; logic [32*C0K-1:0] c0_img; logic [32*C1K-1:0] c1_img;
  int cyc;

  // collect captured words
  always @(posedge clk) if (dv) got.push_back(dcp);
  always @(posedge clk) if (req == CPR_REQ_CAPTURE && af) af_stalls++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      // normal operation: give everything a value
      p_img = {$urandom, $urandom}; c0_img = {$urandom, $urandom}; c1_img = $urandom;
      for (int i = 0; i < PR; i++) ram_img[i] = $urandom;
      @(negedge clk); drive = 1; p_d = p_img; c0_d = c0_img; c1_d = c1_img;
      @(negedge clk); drive = 0;
      exp_q.delete(); got.delete();
      for (int i = 0; i < PK; i++) exp_q.push_back(p_img[32*i +: 32]);
      for (int i = 0; i < PR; i++) exp_q.push_back(ram_img[i]);
      for (int i = 0; i < C0K; i++) exp_q.push_back(c0_img[32*i +: 32]);
      for (int i = 0; i < C1K; i++) exp_q.push_back(c1_img[32*i +: 32]);
      // capture
      req = CPR_REQ_CAPTURE; cflag = 1; cyc = 0;
      while (pstate != CPR_ST_DONE) begin
        af = (r % 2) ? ($urandom_range(0, 2) == 0) : 1'b0;
        @(negedge clk); cyc++;
      end
      af = 0;
      repeat (3) @(negedge clk);
      req = CPR_REQ_NONE; cflag = 0;
      chk(got.size() == TOT, "number of captured words");
      for (int i = 0; i < TOT && i < got.size(); i++) chk(got[i] == exp_q[i], "captured word");
      chk(p_q == p_img && c0_q == c0_img && c1_q == c1_img, "registers unchanged by capture");
      if (r == 0) begin
        // no backpressure: own words one per cycle plus pipeline and child hand-overs
        $display("capture of %0d words took %0d cycles", TOT, cyc);
        chk(cyc <= TOT + 8, "capture latency");
      end
      // restore a new image
      @(negedge clk);
      exp_q.delete();
      repeat (TOT) exp_q.push_back($urandom);
      req = CPR_REQ_RESTORE;
      @(negedge clk);
      for (int i = 0; i < TOT; i++) begin
        while ($urandom_range(0, 2) == 0) begin qv = 0; @(negedge clk); end
        qv = 1; qr = exp_q[i];
        @(negedge clk);
      end
      qv = 0;
      repeat (4) @(negedge clk);
      chk(pstate == CPR_ST_DONE, "restore done");
      req = CPR_REQ_NONE;
      chk(p_q == {exp_q[1], exp_q[0]}, "parent registers restored");
      for (int i = 0; i < PR; i++) chk(ram_rst[i] == exp_q[PK + i], "parent RAM restored");
      chk(c0_q == {exp_q[PK+PR+1], exp_q[PK+PR]}, "child 0 restored");
      chk(c1_q == exp_q[PK+PR+2], "child 1 restored");
      @(negedge clk);
    end
    chk(af_stalls > 0, "almost_full backpressure exercised");
    $display("almost_full cycles during capture: %0d", af_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
