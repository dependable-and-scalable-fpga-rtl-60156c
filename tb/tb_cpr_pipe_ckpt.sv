// tb_cpr_pipe_ckpt: checkpointing of a 4-stage pipelined multiplier through
// its input history. In every running cycle the output must equal the
// product (and valid) of the inputs presented 4 running cycles earlier, also
// across pauses: each round pauses, captures the 9 history words (checked
// against the last 4 inputs), rotates them back, then either resumes
// directly or resets the block, scrambles nothing (the pipeline is lost),
// restores the words and replays them for 4 cycles before resuming.
module tb_cpr_pipe_ckpt;
  localparam int LAT = 4, WORDS = 2 * LAT + 1;
  logic clk = 0, rst_n = 0, drive = 0, virt = 0, step = 0, load = 0, in_valid = 0;
  logic [31:0] a = 0, b = 0, rst_data = 0, p, cap_word;
  logic p_valid, busy;
  int checks = 0, failures = 0;

  cpr_pipe_ckpt #(.LAT(LAT)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // inputs of every running cycle, in order
  logic [31:0] qa [$], qb [$];
  logic        qv [$];

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      drive = 1;
      // output of this running cycle: inputs LAT running cycles ago
      if (qv.size() >= LAT) begin
        int k;
        k = qv.size() - LAT;
        chk(p_valid == qv[k], "valid");
        if (qv[k]) chk(p == qa[k] * qb[k], "product");
      end
      in_valid = 1'($urandom); a = $urandom; b = $urandom;
      qa.push_back(a); qb.push_back(b); qv.push_back(in_valid);
    end
    @(negedge clk); drive = 0; in_valid = 0;
  endtask

  logic [31:0] words [WORDS];
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // fill the pipeline with known values first
    for (int i = 0; i < LAT; i++) begin
      qa.push_back(0); qb.push_back(0); qv.push_back(0);
    end
    run(LAT);
    for (int r = 0; r < 12; r++) begin
      run($urandom_range(1, 12));
      repeat (3) @(negedge clk);
      // capture
      for (int k = 0; k < WORDS; k++) begin
        step = 1; @(negedge clk); step = 0; words[k] = cap_word;
      end
      begin
        int n;
        logic [31:0] vb;
        n = qv.size();
        vb = '0;
        for (int i = 0; i < LAT; i++) vb[i] = qv[n - 1 - i];
        chk(words[0] == vb, "history valid word");
        chk(busy == (vb != 0), "busy flags valid inputs in flight");
        for (int i = 0; i < LAT; i++) begin
          chk(words[1 + 2*i] == qa[n - 1 - i], "history a");
          chk(words[2 + 2*i] == qb[n - 1 - i], "history b");
        end
      end
      if (r % 2 == 1) begin
        // failure: the pipeline and the history are lost, restore them
        @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
        for (int k = 0; k < WORDS; k++) begin
          load = 1; rst_data = words[k]; @(negedge clk);
        end
        load = 0;
      end
      // replay
      virt = 1; repeat (LAT) @(negedge clk); virt = 0;
    end
    run(8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
