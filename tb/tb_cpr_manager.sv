// tb_cpr_manager: the manager against a scripted environment (channels, root
// node state, FIFO and DMA flags). Checks each procedure's outputs: request
// throttling and waiting for idle channels in PREPARE, logic throttling, the
// tree command and a single DMA start in CAPTURE and RESTORE, the pump limit
// of TOTAL_WORDS, the VIRT_CYCLES replay in RESUME, status bits, and that a
// command in the wrong state is ignored.
module tb_cpr_manager;
  import cpr_pkg::*;
  localparam int TOT = 5, VC = 2;
  logic clk = 0, rst_n = 0;
  cpr_cmd_e cmd = CMD_NONE; logic cmd_valid = 0;
  logic [7:0] status;
  logic channels_idle = 0, req_en, drive, virt, capture_flag, q_r_valid;
  cpr_req_e cpr_request; cpr_state_e root_state = CPR_ST_IDLE;
  logic rf_empty = 1, rf_rd, dma_wr_start, dma_rd_start, dma_wr_done = 0;
  int checks = 0, failures = 0, wr_starts = 0, rd_starts = 0, pumps = 0, virt_cycles = 0;

  cpr_manager #(.TOTAL_WORDS(TOT), .VIRT_CYCLES(VC)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (dma_wr_start) wr_starts++;
    if (dma_rd_start) rd_starts++;
    if (rf_rd) pumps++;
    if (virt) virt_cycles++;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input cpr_cmd_e c);
    @(negedge clk); cmd = c; cmd_valid = 1; @(negedge clk); cmd_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(drive && req_en && cpr_request == CPR_REQ_NONE && status[3], "running after reset");
    send(CMD_CAPTURE);
    chk(drive && req_en && wr_starts == 0, "capture before prepare is ignored");
    // PREPARE: channels busy for a while
    send(CMD_PREPARE);
    chk(!req_en && drive, "prepare throttles requests, logic keeps running");
    repeat (5) @(negedge clk);
    chk(!status[0], "not prepared while a channel is active");
    channels_idle = 1; @(negedge clk); @(negedge clk);
    chk(status[0] && !req_en, "prepared once channels idle");
    // CAPTURE
    send(CMD_CAPTURE);
    chk(!drive && cpr_request == CPR_REQ_CAPTURE && capture_flag, "capture: paused, tree capturing");
    root_state = CPR_ST_BUSY; repeat (3) @(negedge clk);
    root_state = CPR_ST_DONE; repeat (3) @(negedge clk);
    chk(!status[1], "not captured before the DMA is done");
    dma_wr_done = 1; @(negedge clk); @(negedge clk);
    chk(status[1] && cpr_request == CPR_REQ_NONE && wr_starts == 1, "captured");
    chk(!drive && !req_en, "logic stays paused after capture");
    root_state = CPR_ST_IDLE; dma_wr_done = 0;
    // RESTORE
    send(CMD_RESTORE);
    @(negedge clk);
    chk(rd_starts == 1 && cpr_request == CPR_REQ_RESTORE && !drive, "restore started");
    rf_empty = 0; @(negedge clk);
    chk(!rf_rd, "no pumping while the root is idle");
    root_state = CPR_ST_BUSY;
    repeat (10) @(negedge clk);
    chk(pumps == TOT, "exactly TOTAL_WORDS pumped");
    root_state = CPR_ST_DONE; @(negedge clk); @(negedge clk);
    chk(status[2] && cpr_request == CPR_REQ_NONE, "restored");
    root_state = CPR_ST_IDLE; rf_empty = 1;
    // RESUME
    send(CMD_RESUME);
    chk(!drive && virt, "replaying dedicated-block inputs");
    repeat (VC + 1) @(negedge clk);
    chk(drive && req_en && !virt && virt_cycles == VC && status[3], "resumed after VIRT_CYCLES");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
