// tb_cpr_fifo: random pushes and pops against a queue model; checks data
// order, empty/full/almost_full and the count.
module tb_cpr_fifo;
  localparam int DEPTH = 16, GAP = 6;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, empty, full, almost_full;
  logic [31:0] wr_data = 0, rd_data;
  logic [4:0] count;
  int checks = 0, failures = 0, saw_full = 0, saw_af = 0;
  logic [31:0] q[$];

  cpr_fifo #(.DW(32), .DEPTH(DEPTH), .AF_GAP(GAP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // phases that lean toward filling, then draining
      wr_en   = (q.size() < DEPTH) && ($urandom_range(0, 9) < ((i / 200) % 2 ? 3 : 8));
      rd_en   = (q.size() > 0) && ($urandom_range(0, 9) < ((i / 200) % 2 ? 8 : 3));
      wr_data = $urandom;
      checks++;
      if (q.size() > 0 && rd_data != q[0]) failures++;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) ||
          almost_full != (q.size() >= DEPTH - GAP) || count != q.size()) begin
        failures++;
        if (failures < 5) $display("flag mismatch size=%0d count=%0d", q.size(), count);
      end
      if (full) saw_full++;
      if (almost_full) saw_af++;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    checks++; if (saw_full == 0 || saw_af == 0) failures++;
    $display("full seen %0d cycles, almost_full %0d cycles", saw_full, saw_af);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
