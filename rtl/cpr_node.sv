// cpr_node: control part of one CPR node of the tree-based checkpointing
// architecture (CPRtree): the CPR gate toward the parent (next CPR level),
// the CPR interfaces toward the children (previous CPR level), and the
// capturing and restoring FSMs.
//
// A node's context stream is: its own register words (K_WORDS, from a
// cpr_reg_ring), then its RAM segment (RAM_WORDS, from a cpr_ram_ckpt), then
// the streams of its children in order (CHILD_WORDS[i] words each, packed
// 32 bits per child, child 0 in the low bits). Capture and restore use the
// same order.
//
// Capture (CPR_request = CAPTURE): once capture_flag is set by the parent,
// the node steps its own sources one word per cycle, but only while the
// Capture FIFO is not almost full (cpr_out_almost_full). Each word arrives
// one cycle after its step and is registered into D_cp with D_cp_valid, so a
// word leaves the gate two cycles after its step. Then the node sets
// a_capture_flag of one child at a time and copies every valid word of that
// child into D_cp, without looking at almost_full (so the FIFO must keep a
// guard gap larger than the words in flight). CPR_state becomes DONE after the
// last word has been sent.
// Restore (CPR_request = RESTORE): every Q_r_valid word is consumed in stream
// order: shifted into the register ring, loaded into the RAM segment, or
// copied to a_D_r/a_D_r_valid of the child whose turn it is. CPR_state
// becomes DONE when all words have been placed and all children are DONE.
// CPR_request NONE returns the node to IDLE.
// There is no handshake between levels: words move one per cycle, and the
// word counts are fixed when the hardware is built. The gate and interface
// signal names follow the document; the stream order, the counters and the
// two-cycle word latency are this design's.
module cpr_node
  import cpr_pkg::*;
#(
  parameter int unsigned K_WORDS   = 1,
  parameter int unsigned RAM_WORDS = 0,
  parameter int unsigned N_CHILD   = 0,
  localparam int unsigned NC = (N_CHILD > 0) ? N_CHILD : 1,
  parameter logic [32*NC-1:0] CHILD_WORDS = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPR gate (to the parent / CPR manager)
  input  cpr_req_e        CPR_request,
  output cpr_state_e      CPR_state,
  input  logic            cpr_out_almost_full,
  input  logic            capture_flag,
  output logic [31:0]     D_cp,
  output logic            D_cp_valid,
  input  logic [31:0]     Q_r,
  input  logic            Q_r_valid,
  // own state-holding elements
  output logic            active,
  output logic            reg_cap_shift,
  output logic            reg_rst_shift,
  input  logic [31:0]     reg_tail,
  output logic            ram_step,
  output logic            ram_load,
  input  logic [31:0]     ram_word,
  output logic [31:0]     rst_data,
  // CPR interfaces (to the children)
  output cpr_req_e        a_CPR_request,
  input  cpr_state_e      a_CPR_state   [NC],
  output logic            a_capture_flag[NC],
  output logic [31:0]     a_D_r         [NC],
  output logic            a_D_r_valid   [NC],
  input  logic [31:0]     a_Q_cp        [NC],
  input  logic            a_Q_cp_valid  [NC]
);

  localparam int unsigned OWN = K_WORDS + RAM_WORDS;

  function automatic int unsigned child_words(int unsigned i);
    return int'(CHILD_WORDS[32*i +: 32]);
  endfunction

  // first child index >= i with a non-empty stream, or N_CHILD if none
  function automatic int unsigned next_child(int unsigned i);
    for (int unsigned j = i; j < N_CHILD; j++)
      if (child_words(j) != 0) return j;
    return N_CHILD;
  endfunction

  typedef enum logic [2:0] {
    S_IDLE, S_OWN, S_CHILD, S_WAIT, S_DONE
  } node_state_e;

  node_state_e state;
  logic        is_cap;            // current operation is a capture
  logic [31:0] cnt;               // word counter within the current part
  logic [31:0] ci;                // current child
  logic        pend;              // an own word arrives this cycle
  logic        pend_reg;          // ... and it comes from the register ring
  logic        own_go;            // step own sources this cycle

  assign active        = (CPR_request != CPR_REQ_NONE);
  assign a_CPR_request = CPR_request;
  assign rst_data      = Q_r;

  assign own_go        = (state == S_OWN) && (OWN > 0) && is_cap && capture_flag && !cpr_out_almost_full;
  assign reg_cap_shift = own_go && (cnt < K_WORDS);
  assign ram_step      = own_go && (cnt >= K_WORDS);
  assign reg_rst_shift = (state == S_OWN) && (OWN > 0) && !is_cap && Q_r_valid && (cnt < K_WORDS);
  assign ram_load      = (state == S_OWN) && (OWN > 0) && !is_cap && Q_r_valid && (cnt >= K_WORDS);

  always_comb begin
    case (state)
      S_IDLE:  CPR_state = CPR_ST_IDLE;
      S_DONE:  CPR_state = CPR_ST_DONE;
      default: CPR_state = CPR_ST_BUSY;
    endcase
  end

  logic all_children_done;
  always_comb begin
    all_children_done = 1'b1;
    for (int unsigned i = 0; i < N_CHILD; i++)
      if (child_words(i) != 0 && a_CPR_state[i] != CPR_ST_DONE) all_children_done = 1'b0;
  end

  // word arriving from the current child, and whether it is the last one
  logic [31:0] ch_data;
  logic        ch_valid;
  always_comb begin
    ch_data  = '0;
    ch_valid = 1'b0;
    for (int unsigned i = 0; i < N_CHILD; i++) begin
      if (ci == i) begin
        ch_data  = a_Q_cp[i];
        ch_valid = a_Q_cp_valid[i];
      end
    end
  end

  logic [31:0] cur_child_words;
  always_comb begin
    cur_child_words = '0;
    for (int unsigned i = 0; i < N_CHILD; i++)
      if (ci == i) cur_child_words = child_words(i);
  end

  // first non-empty child from 0 and after the current one
  logic [31:0] nc_first, nc_next;
  always_comb begin
    nc_first = 32'(next_child(0));
    nc_next  = N_CHILD;
    for (int unsigned i = 0; i < N_CHILD; i++)
      if (ci == i) nc_next = 32'(next_child(i + 1));
  end

  logic own_word, own_last, ch_word, ch_last;
  assign own_word = own_go || reg_rst_shift || ram_load;
  assign own_last = (OWN == 0) || (own_word && cnt == OWN - 1);
  assign ch_word  = is_cap ? ch_valid : Q_r_valid;
  assign ch_last  = ch_word && (cnt == cur_child_words - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      is_cap     <= 1'b0;
      cnt        <= '0;
      ci         <= '0;
      pend       <= 1'b0;
      pend_reg   <= 1'b0;
      D_cp       <= '0;
      D_cp_valid <= 1'b0;
      for (int unsigned i = 0; i < NC; i++) begin
        a_capture_flag[i] <= 1'b0;
        a_D_r[i]          <= '0;
        a_D_r_valid[i]    <= 1'b0;
      end
    end else begin
      // capture output register: own word or forwarded child word
      pend       <= own_go;
      pend_reg   <= reg_cap_shift;
      D_cp_valid <= 1'b0;
      if (pend) begin
        D_cp       <= pend_reg ? reg_tail : ram_word;
        D_cp_valid <= 1'b1;
      end else if (state == S_CHILD && is_cap && ch_valid) begin
        D_cp       <= ch_data;
        D_cp_valid <= 1'b1;
      end
      // restore forwarding register toward the current child
      for (int unsigned i = 0; i < NC; i++) a_D_r_valid[i] <= 1'b0;
      if (state == S_CHILD && !is_cap && Q_r_valid) begin
        for (int unsigned i = 0; i < N_CHILD; i++) begin
          if (ci == i) begin
            a_D_r[i]       <= Q_r;
            a_D_r_valid[i] <= 1'b1;
          end
        end
      end

      if (CPR_request == CPR_REQ_NONE) begin
        state <= S_IDLE;
        for (int unsigned i = 0; i < NC; i++) a_capture_flag[i] <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: begin
            cnt <= '0;
            if (CPR_request == CPR_REQ_CAPTURE && capture_flag) begin
              is_cap <= 1'b1;
              state  <= S_OWN;
            end else if (CPR_request == CPR_REQ_RESTORE) begin
              is_cap <= 1'b0;
              state  <= S_OWN;
            end
          end
          S_OWN, S_CHILD: begin
            if (own_word || ch_word) cnt <= cnt + 1;
            if ((state == S_OWN && own_last) || (state == S_CHILD && ch_last)) begin
              // move on to the next non-empty child, or finish
              cnt <= '0;
              for (int unsigned i = 0; i < NC; i++) a_capture_flag[i] <= 1'b0;
              ci <= (state == S_OWN) ? nc_first : nc_next;
              if (((state == S_OWN) ? nc_first : nc_next) < N_CHILD) begin
                state <= S_CHILD;
                for (int unsigned i = 0; i < N_CHILD; i++)
                  if (is_cap && ((state == S_OWN) ? nc_first : nc_next) == i)
                    a_capture_flag[i] <= 1'b1;
              end else begin
                state <= is_cap ? S_DONE : S_WAIT;
              end
            end
          end
          S_WAIT: begin
            if (all_children_done) state <= S_DONE;
          end
          S_DONE: ;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

`ifndef SYNTHESIS
  // a restore word may only arrive while the node still expects one
  a_restore_expected: assert property (@(posedge clk) disable iff (!rst_n)
    Q_r_valid |-> (CPR_request == CPR_REQ_RESTORE) && (state inside {S_OWN, S_CHILD}));
`endif

endmodule
