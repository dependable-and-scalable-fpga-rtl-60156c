// cpr_flat_ctrl: the capturing and restoring FSMs of the ring-based
// flattened checkpointing architecture (CPRflatten). A flattened design has
// no CPR levels: its register bits form one W-by-C shifting ring (W = 32,
// built with cpr_reg_ring, K = C) and each RAM has its own
// capturing/restoring circuit (cpr_ram_ckpt). This controller connects all
// of them straight to the Capture and Restore FIFOs.
//
// Context layout: C ring words, then the segment of RAM 0 (RAM_WORDS[31:0]
// words), RAM 1 (RAM_WORDS[63:32]), and so on; one running word counter
// covers the whole layout and comparators on it pick the source or target.
// Capture (request CAPTURE with capture_flag): while the Capture FIFO is not
// almost full, one source is stepped per cycle; its word is valid the next
// cycle and passes through the multiplexer in front of the FIFO into the
// registered D_cp / D_cp_valid (two cycles from step to FIFO write). The
// ring rotates through its output back into its input, so the registers
// are unchanged afterwards. STATE = DONE when the last word has left.
// Restore (request RESTORE): every Q_r_valid word goes to the element the
// counter selects: shifted into the ring or loaded into a RAM segment.
// Request NONE returns the controller to IDLE. The gate signals are those of
// the tree architecture's root so the same static part drives both.
// The split into a ring and separate RAM circuits, the FIFO multiplexer and
// the restore comparators follow the document; the counter layout and the
// timing are this design's.
module cpr_flat_ctrl
  import cpr_pkg::*;
#(
  parameter int unsigned C     = 1,          // ring words
  parameter int unsigned N_RAM = 1,
  localparam int unsigned NR   = (N_RAM > 0) ? N_RAM : 1,
  parameter logic [32*NR-1:0] RAM_WORDS = '0 // words per RAM segment
) (
  input  logic        clk,
  input  logic        rst_n,
  // gate toward the static part
  input  cpr_req_e    CPR_request,
  output cpr_state_e  CPR_state,
  input  logic        cpr_out_almost_full,
  input  logic        capture_flag,
  output logic [31:0] D_cp,
  output logic        D_cp_valid,
  input  logic [31:0] Q_r,
  input  logic        Q_r_valid,
  // shifting ring
  output logic        ring_cap_shift,
  output logic        ring_rst_shift,
  input  logic [31:0] ring_tail,
  // RAM circuits
  output logic        active,
  output logic        ram_step [NR],
  output logic        ram_load [NR],
  input  logic [31:0] ram_word [NR],
  output logic [31:0] rst_data
);

  function automatic int unsigned seg_words(int unsigned r);
    return int'(RAM_WORDS[32*r +: 32]);
  endfunction
  function automatic int unsigned seg_start(int unsigned r);
    int unsigned s = C;
    for (int unsigned j = 0; j < r; j++) s += seg_words(j);
    return s;
  endfunction
  localparam int unsigned TOTAL = seg_start(N_RAM);

  typedef enum logic [1:0] {F_IDLE, F_RUN, F_DONE} flat_state_e;
  flat_state_e state;
  logic        is_cap;
  logic [31:0] cnt;
  logic        go, pend, pend_ring;
  logic [31:0] pend_sel;
  logic        in_ring;
  logic [31:0] sel;          // RAM selected by the counter
  logic        last_word;

  assign active   = (CPR_request != CPR_REQ_NONE);
  assign rst_data = Q_r;
  assign in_ring  = (cnt < C);

  always_comb begin
    sel = '0;
    for (int unsigned r = 0; r < N_RAM; r++)
      if (cnt >= seg_start(r) && cnt < seg_start(r) + seg_words(r)) sel = r;
  end

  assign go             = (state == F_RUN) && is_cap && capture_flag && !cpr_out_almost_full
                          && (cnt < TOTAL);
  assign ring_cap_shift = go && in_ring;
  assign ring_rst_shift = (state == F_RUN) && !is_cap && Q_r_valid && in_ring;
  always_comb begin
    for (int unsigned r = 0; r < NR; r++) begin
      ram_step[r] = go && !in_ring && (sel == r);
      ram_load[r] = (state == F_RUN) && !is_cap && Q_r_valid && !in_ring && (sel == r);
    end
  end
  assign last_word = (cnt == TOTAL - 1);

  // multiplexer in front of the Capture FIFO
  logic [31:0] cap_mux;
  always_comb begin
    cap_mux = ring_tail;
    if (!pend_ring)
      for (int unsigned r = 0; r < NR; r++)
        if (pend_sel == r) cap_mux = ram_word[r];
  end

  always_comb begin
    case (state)
      F_IDLE:  CPR_state = CPR_ST_IDLE;
      F_DONE:  CPR_state = CPR_ST_DONE;
      default: CPR_state = CPR_ST_BUSY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= F_IDLE;
      is_cap     <= 1'b0;
      cnt        <= '0;
      pend       <= 1'b0;
      pend_ring  <= 1'b0;
      pend_sel   <= '0;
      D_cp       <= '0;
      D_cp_valid <= 1'b0;
    end else begin
      pend       <= go;
      pend_ring  <= ring_cap_shift;
      pend_sel   <= sel;
      D_cp_valid <= pend;
      if (pend) D_cp <= cap_mux;
      if (CPR_request == CPR_REQ_NONE) begin
        state <= F_IDLE;
      end else begin
        unique case (state)
          F_IDLE: begin
            cnt <= '0;
            if (CPR_request == CPR_REQ_CAPTURE && capture_flag) begin
              is_cap <= 1'b1;
              state  <= F_RUN;
            end else if (CPR_request == CPR_REQ_RESTORE) begin
              is_cap <= 1'b0;
              state  <= F_RUN;
            end
          end
          F_RUN: begin
            if (is_cap) begin
              if (go) cnt <= cnt + 1;
              // done once the last word has been registered into D_cp
              if (cnt == TOTAL && !go && !pend) state <= F_DONE;
            end else if (Q_r_valid) begin
              cnt <= cnt + 1;
              if (last_word) state <= F_DONE;
            end
          end
          default: ;
        endcase
      end
    end
  end

`ifndef SYNTHESIS
  a_restore_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    Q_r_valid |-> (state == F_RUN) && CPR_request == CPR_REQ_RESTORE);
`endif

endmodule
