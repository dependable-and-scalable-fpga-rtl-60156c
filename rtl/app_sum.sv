// app_sum: top module of the demonstration user logic, made checkpointable
// as the root node of a two-level CPR tree.
//
// Function (one run per rising 'start'): read N_WORDS 32-bit words from
// src_addr with one AXI4 INCR read burst; for every beat add it to 'sum'
// and store it in a block RAM; then read the RAM back in address order,
// fold every word into chk = rotl(chk, 1) ^ word and pass it to the child
// app_sq (sum of squares through a pipelined multiplier); once the child
// has counted every square, write 'sum' to dst_addr with a one-beat AXI4
// write and raise 'done' (held until start falls).
// The readback phase uses the RAM output one cycle after the address and
// the child's multiplier output four cycles after its input, so a checkpoint
// taken there needs both blocks' additional registers and the replay on
// resume. The application is this design's own test vehicle (the document
// names its "Sum" circuit but not its code).
//
// Checkpointing: the state is a packed struct of four words kept in a
// cpr_reg_ring (Reg_0 = control word, Reg_1 = sum, Reg_2 = chk, Reg_3 = last
// word); the RAM is a cpr_ram_ckpt; the cpr_node captures ring, RAM segment
// and then the child, CTX_WORDS words in all. All user registers change only
// while drive is high, and the AXI4 handshake outputs are low while it is
// low (this design's choice: the rotating control word must not show on
// the bus). The address/start inputs must be stable while a checkpoint is
// taken (the document's rule for inputs from outside).
module app_sum
  import cpr_pkg::*;
#(
  parameter int unsigned N_WORDS = 16,
  localparam int unsigned AW        = (N_WORDS > 1) ? $clog2(N_WORDS) : 1,
  localparam int unsigned K         = 4,
  localparam int unsigned SQ_WORDS  = 11,
  localparam int unsigned RAM_WORDS = (1 + AW + 32 + 31) / 32 + (2**AW),
  localparam int unsigned CTX_WORDS = K + RAM_WORDS + SQ_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        drive,
  input  logic        virt,
  // application control
  input  logic        start,
  input  logic [31:0] src_addr,
  input  logic [31:0] dst_addr,
  output logic        done,
  output logic [31:0] sum,
  output logic [31:0] sumsq,
  output logic [31:0] chk,
  // AXI4 read master (user side of the throttle)
  output logic [31:0] araddr,
  output logic [7:0]  arlen,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic        rlast,
  input  logic        rvalid,
  output logic        rready,
  // AXI4 write master (user side of the throttle)
  output logic [31:0] awaddr,
  output logic [7:0]  awlen,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic        wlast,
  output logic        wvalid,
  input  logic        wready,
  input  logic        bvalid,
  output logic        bready,
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

  typedef enum logic [3:0] {
    P_IDLE, P_AR, P_R, P_RB, P_AW, P_W, P_B, P_DONE
  } phase_e;

  typedef struct packed {
    logic [31:0] x;
    logic [31:0] chk;
    logic [31:0] sum;
    logic [14:0] pad;
    phase_e      phase;
    logic [8:0]  idx;
    logic        rd_pend;
    logic        x_v;
    logic        clr;
    logic        done;
  } app_state_t;

  app_state_t st, nx;

  // RAM user port
  logic          m_we;
  logic [15:0]   sq_count;
  logic [AW-1:0] m_addr;
  logic [31:0]   m_wdata, m_rdata;

  always_comb begin
    nx      = st;
    nx.pad  = '0;
    nx.x_v  = 1'b0;
    nx.clr  = 1'b0;
    m_we    = 1'b0;
    m_addr  = st.idx[AW-1:0];
    m_wdata = rdata;
    unique case (st.phase)
      P_IDLE: if (start) begin
        nx.sum   = '0;
        nx.chk   = '0;
        nx.idx   = '0;
        nx.clr   = 1'b1;
        nx.done  = 1'b0;
        nx.phase = P_AR;
      end
      P_AR: if (arready) nx.phase = P_R;
      P_R: if (rvalid) begin
        m_we     = 1'b1;
        nx.sum   = st.sum + rdata;
        nx.idx   = st.idx + 1'b1;
        if (rlast) begin
          nx.idx   = '0;
          nx.phase = P_RB;
        end
      end
      P_RB: begin
        nx.rd_pend = (st.idx < 9'(N_WORDS));
        if (st.idx < 9'(N_WORDS)) nx.idx = st.idx + 1'b1;
        if (st.rd_pend) begin
          nx.chk = {st.chk[30:0], st.chk[31]} ^ m_rdata;
          nx.x   = m_rdata;
          nx.x_v = 1'b1;
        end
        // leave once the child has squared every word
        if (st.idx == 9'(N_WORDS) && sq_count == 16'(N_WORDS)) nx.phase = P_AW;
      end
      P_AW: if (awready) nx.phase = P_W;
      P_W:  if (wready)  nx.phase = P_B;
      P_B:  if (bvalid) begin
        nx.done  = 1'b1;
        nx.phase = P_DONE;
      end
      P_DONE: if (!start) nx.phase = P_IDLE;
      default: nx.phase = P_IDLE;
    endcase
  end

  assign araddr  = src_addr;
  assign arlen   = 8'(N_WORDS - 1);
  // handshakes are qualified with drive: a paused FSM cannot take a beat,
  // and while the registers rotate for a checkpoint the phase field passes
  // through arbitrary values that must not reach the bus
  assign arvalid = drive && (st.phase == P_AR);
  assign rready  = drive && (st.phase == P_R);
  assign awaddr  = dst_addr;
  assign awlen   = 8'd0;
  assign awvalid = drive && (st.phase == P_AW);
  assign wdata   = st.sum;
  assign wlast   = 1'b1;
  assign wvalid  = drive && (st.phase == P_W);
  assign bready  = drive && (st.phase == P_B);
  assign done    = st.done;
  assign sum     = st.sum;
  assign chk     = st.chk;

  // ---------------- checkpointable state ----------------
  logic        active, cap_shift, rst_shift, ram_step, ram_load;
  logic [31:0] tail, ram_word, rst_data;

  cpr_reg_ring #(.K(K)) u_ring (
    .clk, .rst_n, .drive, .d(nx), .q(st),
    .cap_shift, .rst_shift, .rst_data, .tail
  );

  cpr_ram_ckpt #(.DW(32), .AW(AW)) u_ram (
    .clk, .rst_n,
    .u_we(m_we), .u_addr(m_addr), .u_wdata(m_wdata), .u_rdata(m_rdata),
    .drive, .virt, .active, .step(ram_step), .load(ram_load),
    .rst_data, .cap_word(ram_word)
  );

  // ---------------- child: sum of squares ----------------
  cpr_req_e    a_req;
  cpr_state_e  a_state [1];
  logic        a_flag  [1];
  logic [31:0] a_d_r   [1];
  logic        a_d_r_v [1];
  logic [31:0] a_q_cp  [1];
  logic        a_q_cp_v[1];

  app_sq u_sq (
    .clk, .rst_n, .drive, .virt,
    .clear(st.clr), .x_in(st.x), .x_valid(st.x_v), .sumsq, .count(sq_count),
    .CPR_request(a_req), .CPR_state(a_state[0]), .cpr_out_almost_full,
    .capture_flag(a_flag[0]), .D_cp(a_q_cp[0]), .D_cp_valid(a_q_cp_v[0]),
    .Q_r(a_d_r[0]), .Q_r_valid(a_d_r_v[0])
  );

  cpr_node #(
    .K_WORDS(K), .RAM_WORDS(RAM_WORDS), .N_CHILD(1), .CHILD_WORDS(32'(SQ_WORDS))
  ) u_node (
    .clk, .rst_n,
    .CPR_request, .CPR_state, .cpr_out_almost_full, .capture_flag,
    .D_cp, .D_cp_valid, .Q_r, .Q_r_valid,
    .active, .reg_cap_shift(cap_shift), .reg_rst_shift(rst_shift), .reg_tail(tail),
    .ram_step, .ram_load, .ram_word, .rst_data,
    .a_CPR_request(a_req), .a_CPR_state(a_state), .a_capture_flag(a_flag),
    .a_D_r(a_d_r), .a_D_r_valid(a_d_r_v), .a_Q_cp(a_q_cp), .a_Q_cp_valid(a_q_cp_v)
  );

endmodule
