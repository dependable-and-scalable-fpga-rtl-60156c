// tb_cpr_channel_fsm: random start/finish traffic against a counter model;
// checks the idle flag and the outstanding-request count every cycle.
module tb_cpr_channel_fsm;
  logic clk = 0, rst_n = 0, start = 0, finish = 0, idle;
  logic [3:0] count;
  int checks = 0, failures = 0, model = 0, went_active = 0, went_idle = 0;
  logic prev_idle = 1;

  cpr_channel_fsm #(.CNT_W(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      start  = ($urandom_range(0, 2) == 0) && model < 15;
      finish = ($urandom_range(0, 2) == 0) && (model > 0 || start) && !(model == 0);
      @(posedge clk);
      if (start && !finish) model++;
      else if (finish && !start) model--;
      #1;
      checks++;
      if (count != model || idle != (model == 0)) begin
        failures++;
        if (failures < 5) $display("mismatch cycle %0d: count=%0d model=%0d idle=%0b", i, count, model, idle);
      end
      if (prev_idle && !idle) went_active++;
      if (!prev_idle && idle) went_idle++;
      prev_idle = idle;
    end
    checks++; if (went_active == 0 || went_idle == 0) failures++;
    $display("Idle->Active %0d times, Active->Idle %0d times", went_active, went_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
