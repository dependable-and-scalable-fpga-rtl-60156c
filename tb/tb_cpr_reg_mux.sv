// tb_cpr_reg_mux: the MUX-based register bank, checked as a drop-in for the
// shifting ring. Loads random state, captures it with K steps (the tail
// must give Reg_0, Reg_1, ... one cycle after each step and the bank must
// stay unchanged), captures a second time without running in between (the
// word pointer must have wrapped), restores another image with K steps and
// checks that throttled cycles hold. K = 2, the size the document
// recommends this circuit for, and K = 3.
module tb_cpr_reg_mux;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // two banks, driven alike
  logic rst_n = 0, drive = 0, cap_shift = 0, rst_shift = 0;
  logic [95:0] d = '0, q3;
  logic [63:0] q2;
  logic [31:0] rst_data = '0, tail2, tail3;

  cpr_reg_mux #(.K(2)) dut2 (
    .clk, .rst_n, .drive, .d(d[63:0]), .q(q2),
    .cap_shift, .rst_shift, .rst_data, .tail(tail2)
  );
  cpr_reg_mux #(.K(3)) dut3 (
    .clk, .rst_n, .drive, .d, .q(q3),
    .cap_shift, .rst_shift, .rst_data, .tail(tail3)
  );

  logic [95:0] img, img2;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      img = {$urandom, $urandom, $urandom};
      @(negedge clk); drive = 1; d = img;
      @(negedge clk); drive = 0; d = '0;
      chk(q2 == img[63:0] && q3 == img, "load");
      repeat (3) @(negedge clk);
      chk(q2 == img[63:0] && q3 == img, "hold while paused");
      // capture; the third step wraps K = 2 back to Reg_0
      for (int j = 0; j < 3; j++) begin
        cap_shift = 1;
        @(negedge clk);
        cap_shift = 0;
        chk(tail3 == img[32*j +: 32], "captured word order (K=3)");
        chk(tail2 == img[32*(j % 2) +: 32], "captured word order (K=2)");
      end
      chk(q3 == img, "unchanged after capture (K=3)");
      // second capture of K = 3 right away
      for (int j = 0; j < 3; j++) begin
        cap_shift = 1;
        @(negedge clk);
        cap_shift = 0;
        chk(tail3 == img[32*j +: 32], "second capture (K=3)");
      end
      // one run cycle (resets the pointers), then restore another image
      @(negedge clk); drive = 1; d = img;
      @(negedge clk); drive = 0;
      img2 = {$urandom, $urandom, $urandom};
      for (int j = 0; j < 3; j++) begin
        rst_shift = 1; rst_data = img2[32*j +: 32];
        @(negedge clk);
      end
      rst_shift = 0;
      chk(q3 == img2, "restored image (K=3)");
      // K = 2 wrapped on the third word: Reg_0 overwritten by word 2
      chk(q2 == {img2[63:32], img2[95:64]}, "restore wraps (K=2)");
      repeat (2) @(negedge clk);
      chk(q3 == img2, "hold after restore");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
