// tb_cpr_flat_ctrl: CPRflatten controller with a 3-word shifting ring and
// two RAM circuits (32 x 4 and 40 x 2, i.e. 6 + 6 segment words), with the
// Capture FIFO's almost_full flag driven at random.
// Each round: run the user logic at random, pause, capture and compare the
// 15 words with the expected layout (ring words Reg_0 first, then each RAM's
// input history and entries), check that the ring and the RAMs are unchanged,
// scramble everything, restore the captured words with random gaps, replay
// the RAM inputs and check registers, RAM contents and RAM outputs.
// Capture time must be TOTAL cycles plus the cycles almost_full was high,
// plus the two-cycle step-to-FIFO latency.
module tb_cpr_flat_ctrl;
  import cpr_pkg::*;
  localparam int C = 3, TOTAL = 15;
  logic clk = 0, rst_n = 0;
  cpr_req_e    req = CPR_REQ_NONE;
  cpr_state_e  st;
  logic        af = 0, flag = 0, q_r_valid = 0, drive = 0, virt = 0;
  logic [31:0] d_cp, q_r = 0;
  logic        d_cp_valid;
  logic        ring_cap, ring_rst, active;
  logic [31:0] ring_tail, rst_data;
  logic        ram_step [2], ram_load [2];
  logic [31:0] ram_word [2];
  logic [32*C-1:0] ring_d = '0, ring_q;
  // RAM 0: 32 x 4, RAM 1: 40 x 2
  logic        we0 = 0, we1 = 0;
  logic [1:0]  a0 = 0;
  logic        a1 = 0;
  logic [31:0] w0 = 0, r0;
  logic [39:0] w1 = 0, r1;
  int checks = 0, failures = 0;

  cpr_flat_ctrl #(.C(C), .N_RAM(2), .RAM_WORDS({32'd6, 32'd6})) dut (
    .clk, .rst_n, .CPR_request(req), .CPR_state(st), .cpr_out_almost_full(af),
    .capture_flag(flag), .D_cp(d_cp), .D_cp_valid(d_cp_valid), .Q_r(q_r),
    .Q_r_valid(q_r_valid), .ring_cap_shift(ring_cap), .ring_rst_shift(ring_rst),
    .ring_tail, .active, .ram_step, .ram_load, .ram_word, .rst_data);
  cpr_reg_ring #(.K(C)) u_ring (.clk, .rst_n, .drive, .d(ring_d), .q(ring_q),
    .cap_shift(ring_cap), .rst_shift(ring_rst), .rst_data, .tail(ring_tail));
  cpr_ram_ckpt #(.DW(32), .AW(2)) u_r0 (.clk, .rst_n, .u_we(we0), .u_addr(a0),
    .u_wdata(w0), .u_rdata(r0), .drive, .virt, .active, .step(ram_step[0]),
    .load(ram_load[0]), .rst_data, .cap_word(ram_word[0]));
  cpr_ram_ckpt #(.DW(40), .AW(1)) u_r1 (.clk, .rst_n, .u_we(we1), .u_addr(a1),
    .u_wdata(w1), .u_rdata(r1), .drive, .virt, .active, .step(ram_step[1]),
    .load(ram_load[1]), .rst_data, .cap_word(ram_word[1]));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [31:0] m0 [4];
  logic [39:0] m1 [2];
  logic [31:0] words [$];
  logic [32*C-1:0] s_q;
  logic [31:0] s_r0;
  logic [39:0] s_r1;
  int af_cycles, cyc, af_events = 0;

  always @(posedge clk) if (d_cp_valid) words.push_back(d_cp);

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      drive = 1;
      ring_d = {$urandom, $urandom, $urandom};
      we0 = 1'($urandom); a0 = 2'($urandom); w0 = $urandom;
      we1 = 1'($urandom); a1 = 1'($urandom); w1 = {8'($urandom), $urandom};
      if (we0) m0[a0] = w0;
      if (we1) m1[a1] = w1;
    end
    @(negedge clk);
    drive = 0; we0 = 0; we1 = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // fill the RAMs once so that the model knows every entry
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); drive = 1; we0 = 1; a0 = 2'(i); w0 = $urandom; m0[i] = w0;
      we1 = 1; a1 = 1'(i); w1 = {8'($urandom), $urandom}; m1[i % 2] = w1;
    end
    for (int r = 0; r < 10; r++) begin
      run(20);
      s_q = ring_q; s_r0 = r0; s_r1 = r1;
      chk(s_r0 == m0[u_r0.h_addr] && s_r1 == m1[u_r1.h_addr], "RAM outputs before pause");
      // capture
      words.delete(); af_cycles = 0; cyc = 0;
      @(negedge clk); req = CPR_REQ_CAPTURE; flag = 1;
      while (st != CPR_ST_DONE) begin
        af = ($urandom_range(0, 3) == 0);
        if (af && st == CPR_ST_BUSY && dut.cnt < TOTAL) begin af_cycles++; af_events++; end
        @(negedge clk); cyc++;
      end
      af = 0;
      chk(words.size() == TOTAL, "captured word count");
      chk(cyc <= TOTAL + af_cycles + 4, "capture: one word per cycle unless almost full");
      for (int k = 0; k < C; k++) chk(words[k] == s_q[32*k +: 32], "ring word");
      chk(ring_q == s_q, "ring unchanged after capture");
      for (int i = 0; i < 4; i++) chk(words[3 + 2 + i] == m0[i], "RAM 0 entry");
      for (int i = 0; i < 2; i++) begin
        chk(words[9 + 2 + 2*i] == m1[i][31:0], "RAM 1 entry low");
        chk(words[9 + 3 + 2*i] == {24'd0, m1[i][39:32]}, "RAM 1 entry high");
      end
      for (int i = 0; i < 4; i++) chk(u_r0.u_bram.mem[i] == m0[i], "RAM 0 unchanged");
      @(negedge clk); req = CPR_REQ_NONE; flag = 0;
      @(negedge clk);
      chk(st == CPR_ST_IDLE, "idle after request removed");
      // scramble, then restore
      begin
        logic [31:0] k0 [4];
        logic [39:0] k1 [2];
        k0 = m0; k1 = m1;
        run(12);
        m0 = k0; m1 = k1;
      end
      @(negedge clk); req = CPR_REQ_RESTORE;
      @(negedge clk);
      for (int k = 0; k < TOTAL; k++) begin
        while ($urandom_range(0, 2) == 0) begin q_r_valid = 0; @(negedge clk); end
        q_r = words[k]; q_r_valid = 1; @(negedge clk);
      end
      q_r_valid = 0;
      @(negedge clk);
      chk(st == CPR_ST_DONE, "restore done");
      req = CPR_REQ_NONE;
      @(negedge clk);
      chk(ring_q == s_q, "ring restored");
      for (int i = 0; i < 4; i++) chk(u_r0.u_bram.mem[i] == m0[i], "RAM 0 restored");
      for (int i = 0; i < 2; i++) chk(u_r1.u_bram.mem[i] == m1[i], "RAM 1 restored");
      virt = 1; @(negedge clk); virt = 0;
      chk(r0 == s_r0 && r1 == s_r1, "RAM outputs replayed");
    end
    chk(af_events > 0, "almost_full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
