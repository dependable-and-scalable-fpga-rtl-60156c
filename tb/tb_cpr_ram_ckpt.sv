// tb_cpr_ram_ckpt: block RAM with its checkpoint circuit, at DW = 40 (two
// checkpoint words per entry) and AW = 3.
// Each round: fill the RAM in normal operation, end on a read or a write,
// pause, capture the segment (input history first, then every entry) and
// compare it with the model, replay the history (virt) and check that the
// RAM output is the one seen before the pause; then restore a different
// image, replay, and read every entry back in normal operation.
module tb_cpr_ram_ckpt;
  localparam int DW = 40, AW = 3, N = 8;
  localparam int HB = 1 + AW + DW, HW = (HB + 31) / 32, RW = (DW + 31) / 32;
  localparam int SEG = HW + N * RW;
  logic clk = 0, rst_n = 0;
  logic u_we = 0, drive = 0, virt = 0, active = 0, step = 0, load = 0;
  logic [AW-1:0] u_addr = 0;
  logic [DW-1:0] u_wdata = 0, u_rdata;
  logic [31:0] rst_data = 0, cap_word;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [N];
  logic [32*HW-1:0] hist_exp;
  logic [DW-1:0] out_exp;
  logic [31:0] words [SEG];

  cpr_ram_ckpt #(.DW(DW), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [DW-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      // normal operation: fill the RAM
      drive = 1;
      for (int i = 0; i < N; i++) begin
        @(negedge clk); u_we = 1; u_addr = AW'(i); u_wdata = rnd(); model[i] = u_wdata;
      end
      // last running cycle: a read (even rounds) or a write (odd rounds)
      @(negedge clk);
      u_addr = AW'($urandom_range(0, N - 1));
      u_we = r[0];
      u_wdata = rnd();
      if (u_we) model[u_addr] = u_wdata;
      out_exp  = model[u_addr];
      hist_exp = (32*HW)'({u_we, u_addr, u_wdata});
      @(negedge clk);
      drive = 0; u_we = 0; u_addr = '0; u_wdata = '0;
      chk(u_rdata == out_exp, "output before pause");
      // capture the segment
      active = 1;
      for (int w = 0; w < SEG; w++) begin
        step = 1; @(negedge clk); step = 0;
        words[w] = cap_word;
      end
      active = 0;
      for (int w = 0; w < HW; w++) chk(words[w] == hist_exp[32*w +: 32], "captured history word");
      for (int e = 0; e < N; e++)
        for (int s = 0; s < RW; s++)
          chk(words[HW + e*RW + s] == 32'((64'(model[e])) >> (32*s)), "captured RAM word");
      @(negedge clk);
      // resume: replay the history, output must be back
      virt = 1; @(negedge clk); virt = 0;
      chk(u_rdata == out_exp, "output after replay");
      // restore a new image
      for (int e = 0; e < N; e++) model[e] = rnd();
      hist_exp = (32*HW)'({1'b0, AW'($urandom_range(0, N - 1)), rnd()});
      active = 1;
      for (int w = 0; w < SEG; w++) begin
        load = 1;
        if (w < HW) rst_data = hist_exp[32*w +: 32];
        else        rst_data = 32'((64'(model[(w - HW) / RW])) >> (32*((w - HW) % RW)));
        @(negedge clk);
      end
      load = 0; active = 0;
      @(negedge clk);
      virt = 1; @(negedge clk); virt = 0;
      chk(u_rdata == model[hist_exp[DW +: AW]], "output after restore and replay");
      // normal reads of every entry
      drive = 1;
      for (int i = 0; i < N; i++) begin
        u_we = 0; u_addr = AW'(i);
        @(negedge clk);
        chk(u_rdata == model[i], "restored RAM entry");
      end
      drive = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
