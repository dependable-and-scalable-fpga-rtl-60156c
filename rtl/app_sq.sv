// app_sq: child module of the demonstration user logic ("sum of squares"),
// made checkpointable as a leaf node of the CPR tree.
//
// Function: while drive is high, every cycle with x_valid feeds x_in to a
// four-stage pipelined multiplier (a dedicated DSP-like block, cpr_pipe_mul)
// as both operands; each valid square leaving the pipeline is added to
// sumsq and counted in count; clear zeroes both.
// Its user registers (sumsq, and count padded to 32 bits) are two words,
// so they use the MUX-based capturing/restoring circuit (cpr_reg_mux),
// which the document prefers over the shifting ring for two words with
// padding. The multiplier cannot be captured, so its inputs of the last four
// running cycles are kept by cpr_pipe_ckpt (9 words) and replayed on
// resume, which needs virt high for exactly 4 cycles. The cpr_node
// (K_WORDS = 2, the 9 history words as its second segment, no children) is
// the CPR node: 11 words.
// Timing: sumsq and count include a value five running cycles after it was
// presented.
// The application itself is not from the document (which only names its
// "Sum of Squares" test circuit); the way it is made checkpointable is.
module app_sq
  import cpr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        drive,
  input  logic        clear,
  input  logic [31:0] x_in,
  input  logic        x_valid,
  input  logic        virt,
  output logic [31:0] sumsq,
  output logic [15:0] count,
  // CPR gate
  input  cpr_req_e    CPR_request,
  output cpr_state_e  CPR_state,
  input  logic        cpr_out_almost_full,
  input  logic        capture_flag,
  output logic [31:0] D_cp,
  output logic        D_cp_valid,
  input  logic [31:0] Q_r,
  input  logic        Q_r_valid
);

  localparam int unsigned LAT   = 4;
  localparam int unsigned HWORDS = 2 * LAT + 1;

  // Reg_0 = sumsq, Reg_1 = {padding, count}
  typedef struct packed {
    logic [15:0] pad;
    logic [15:0] count;
    logic [31:0] sumsq;
  } sq_state_t;

  sq_state_t   st, nx;
  logic [31:0] p;
  logic        p_valid;

  always_comb begin
    nx = st;
    if (clear) nx = '0;
    else if (p_valid) begin
      nx.sumsq = st.sumsq + p;
      nx.count = st.count + 1'b1;
    end
    nx.pad = '0;
  end

  assign sumsq = st.sumsq;
  assign count = st.count;

  logic        active, cap_shift, rst_shift, ram_step, ram_load;
  logic [31:0] tail, rst_data, hist_word;

  cpr_reg_mux #(.K(2)) u_regs (
    .clk, .rst_n, .drive, .d(nx), .q(st),
    .cap_shift, .rst_shift, .rst_data, .tail
  );

  cpr_pipe_ckpt #(.LAT(LAT)) u_mul (
    .clk, .rst_n, .a(x_in), .b(x_in), .in_valid(x_valid), .p, .p_valid,
    .drive, .virt, .step(ram_step), .load(ram_load), .rst_data,
    .cap_word(hist_word), .busy()
  );

  cpr_state_e  a_state [1];
  logic        a_flag  [1];
  logic [31:0] a_d_r   [1];
  logic        a_d_r_v [1];
  logic [31:0] a_q_cp  [1];
  logic        a_q_cp_v[1];
  cpr_req_e    a_req;
  assign a_state[0]  = CPR_ST_IDLE;
  assign a_q_cp[0]   = '0;
  assign a_q_cp_v[0] = 1'b0;

  cpr_node #(.K_WORDS(2), .RAM_WORDS(HWORDS), .N_CHILD(0)) u_node (
    .clk, .rst_n,
    .CPR_request, .CPR_state, .cpr_out_almost_full, .capture_flag,
    .D_cp, .D_cp_valid, .Q_r, .Q_r_valid,
    .active, .reg_cap_shift(cap_shift), .reg_rst_shift(rst_shift), .reg_tail(tail),
    .ram_step, .ram_load, .ram_word(hist_word), .rst_data,
    .a_CPR_request(a_req), .a_CPR_state(a_state), .a_capture_flag(a_flag),
    .a_D_r(a_d_r), .a_D_r_valid(a_d_r_v), .a_Q_cp(a_q_cp), .a_Q_cp_valid(a_q_cp_v)
  );

endmodule
