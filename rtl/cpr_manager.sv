// cpr_manager: CPR manager of the static CPR part. It turns the host's
// coarse commands into the cycle-level control of the four procedures:
//
//   PREPARE  req_en goes low (no new channel requests on either side), the
//            user logic keeps running until every channel FSM reports idle,
//            then status PREPARED is set. The logic is still running.
//   CAPTURE  (after PREPARE) DRIVE goes low (user logic paused), the tree is
//            sent CPR_request = CAPTURE with capture_flag set, and the memory
//            DMA is started to write TOTAL_WORDS words from the Capture FIFO
//            to the checkpoint address. CAPTURED is set when the root node is
//            DONE and the DMA has written the last word.
//   RESTORE  (after PREPARE) DRIVE low, the DMA reads TOTAL_WORDS words into
//            the Restore FIFO and the manager pumps them, one per cycle while
//            the FIFO is not empty, into the root node (Q_r / Q_r_valid).
//            RESTORED is set when the root node is DONE.
//   RESUME   'virt' is raised for VIRT_CYCLES cycles so that dedicated blocks
//            see their saved inputs again (signal virtualization), then DRIVE
//            and req_en return high in one cycle and RUNNING is set.
// Commands that arrive in the wrong state are ignored. Status bits are those
// of cpr_pkg (ST_*). The sequence follows the document's checkpoint/restart
// timing (the logic runs on while the manager waits for idle channels and
// is throttled at the start of CAPTURE or RESTORE); the state encoding and
// the rule that the user logic stays paused after CAPTURE until the host
// sends RESUME are this design's.
module cpr_manager
  import cpr_pkg::*;
#(
  parameter int unsigned TOTAL_WORDS = 1,
  parameter int unsigned VIRT_CYCLES = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // host commands (from the SW DMA)
  input  cpr_cmd_e    cmd,
  input  logic        cmd_valid,
  output logic [7:0]  status,
  // channels
  input  logic        channels_idle,
  output logic        req_en,
  // user logic
  output logic        drive,
  output logic        virt,
  // CPR tree root
  output cpr_req_e    cpr_request,
  output logic        capture_flag,
  input  cpr_state_e  root_state,
  output logic        q_r_valid,
  // Restore FIFO (read side)
  input  logic        rf_empty,
  output logic        rf_rd,
  // memory DMA
  output logic        dma_wr_start,
  output logic        dma_rd_start,
  input  logic        dma_wr_done
);

  typedef enum logic [2:0] {
    M_RUN, M_PREP, M_READY, M_CAP, M_RST, M_VIRT
  } mgr_state_e;

  mgr_state_e  state;
  logic [31:0] pumped;
  logic [31:0] vcnt;
  logic        prepared, captured, restored;

  assign req_en       = (state == M_RUN);
  // the logic keeps running through PREPARE and after it, until a CAPTURE or
  // RESTORE throttles it; it stays paused until RESUME
  assign drive        = (state == M_RUN) || (state == M_PREP) ||
                        (state == M_READY && !captured && !restored);
  assign virt         = (state == M_VIRT);
  assign capture_flag = (state == M_CAP);
  assign cpr_request  = (state == M_CAP) ? CPR_REQ_CAPTURE :
                        (state == M_RST) ? CPR_REQ_RESTORE : CPR_REQ_NONE;
  // pump the Restore FIFO into the root once it has left IDLE
  assign rf_rd        = (state == M_RST) && (root_state == CPR_ST_BUSY) && !rf_empty
                        && (pumped < TOTAL_WORDS);
  assign q_r_valid    = rf_rd;
  assign status       = {4'd0, drive, restored, captured, prepared};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= M_RUN;
      pumped       <= '0;
      vcnt         <= '0;
      prepared     <= 1'b0;
      captured     <= 1'b0;
      restored     <= 1'b0;
      dma_wr_start <= 1'b0;
      dma_rd_start <= 1'b0;
    end else begin
      dma_wr_start <= 1'b0;
      dma_rd_start <= 1'b0;
      if (rf_rd) pumped <= pumped + 1;
      unique case (state)
        M_RUN: if (cmd_valid && cmd == CMD_PREPARE) begin
          prepared <= 1'b0;
          captured <= 1'b0;
          restored <= 1'b0;
          state    <= M_PREP;
        end
        M_PREP: if (channels_idle) begin
          prepared <= 1'b1;
          state    <= M_READY;
        end
        M_READY: if (cmd_valid) begin
          unique case (cmd)
            CMD_CAPTURE: begin
              captured     <= 1'b0;
              dma_wr_start <= 1'b1;
              state        <= M_CAP;
            end
            CMD_RESTORE: begin
              restored     <= 1'b0;
              pumped       <= '0;
              dma_rd_start <= 1'b1;
              state        <= M_RST;
            end
            CMD_RESUME: begin
              vcnt  <= '0;
              state <= M_VIRT;
            end
            default: ;
          endcase
        end
        M_CAP: if (!dma_wr_start && root_state == CPR_ST_DONE && dma_wr_done) begin
          captured <= 1'b1;
          state    <= M_READY;
        end
        M_RST: if (root_state == CPR_ST_DONE) begin
          restored <= 1'b1;
          state    <= M_READY;
        end
        M_VIRT: begin
          vcnt <= vcnt + 1;
          if (vcnt == VIRT_CYCLES - 1) begin
            prepared <= 1'b0;
            state    <= M_RUN;
          end
        end
        default: state <= M_RUN;
      endcase
    end
  end

endmodule
