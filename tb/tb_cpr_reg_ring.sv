// tb_cpr_reg_ring: loads random state, captures it with K shifts (the tail
// must give Reg_0, Reg_1, ... and the bank must end unchanged), restores
// another image with K shift-ins, and checks that throttled cycles hold.
module tb_cpr_reg_ring;
  localparam int K = 3;
  logic clk = 0, rst_n = 0, drive = 0, cap_shift = 0, rst_shift = 0;
  logic [32*K-1:0] d = '0, q;
  logic [31:0] rst_data = '0, tail;
  int checks = 0, failures = 0;
  logic [32*K-1:0] img, img2;

  cpr_reg_ring #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      img = {$urandom, $urandom, $urandom};
      @(negedge clk); drive = 1; d = img;
      @(negedge clk); drive = 0; d = '0;
      chk(q == img, "load");
      // throttled: holds
      repeat (3) @(negedge clk);
      chk(q == img, "hold while paused");
      // capture
      for (int j = 0; j < K; j++) begin
        cap_shift = 1;
        @(negedge clk);
        cap_shift = 0;
        chk(tail == img[32*j +: 32], "captured word order");
      end
      chk(q == img, "unchanged after capture");
      // restore another image
      img2 = {$urandom, $urandom, $urandom};
      for (int j = 0; j < K; j++) begin
        rst_shift = 1; rst_data = img2[32*j +: 32];
        @(negedge clk);
      end
      rst_shift = 0;
      chk(q == img2, "restored image");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
