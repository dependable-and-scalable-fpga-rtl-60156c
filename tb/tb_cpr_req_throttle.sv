// tb_cpr_req_throttle: all 16 input combinations; with req_en low neither the
// valid nor the ready may pass, with req_en high both pass unchanged.
module tb_cpr_req_throttle;
  logic req_en, valid_in, valid_out, ready_in, ready_out;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cpr_req_throttle dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {req_en, valid_in, ready_in} = 3'(i);
      #1;
      checks += 2;
      if (valid_out !== (req_en ? valid_in : 1'b0)) failures++;
      if (ready_out !== (req_en ? ready_in : 1'b0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
