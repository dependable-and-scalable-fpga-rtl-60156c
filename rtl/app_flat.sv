// app_flat: demonstration user logic checkpointed with the ring-based
// flattened architecture (CPRflatten). It keeps a moving sum over the last
// WIN (16) samples of a 32-bit input stream, plus a running total and a
// sample count, using a block RAM as the window buffer.
//
// A sample is taken in two cycles: phase 0 accepts x (x_ready) and reads the
// oldest sample at the write pointer; phase 1 writes x there and updates
// win += x - oldest (oldest = 0 for the first WIN samples), total += x,
// n += 1. The RAM output is used one cycle after its address, so a pause in
// phase 1 depends on the RAM's delayed output: the RAM circuit's input
// history and the resume replay (virt) handle that.
// All registers (phase, pointer, x, win, total, n: 133 bits) are one packed
// word padded to 160 bits: the W-by-C shifting ring with W = 32, C = 5.
// With the RAM segment (2 history words + 16 entries) the context is 23
// words. Interface: stream x / x_valid / x_ready, results win_sum, total,
// count, and the CPR gate toward the static part. DRIVE low pauses
// everything (x_ready low). The application is this design's own.
module app_flat
  import cpr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        drive,
  input  logic        virt,
  // sample stream
  input  logic [31:0] x,
  input  logic        x_valid,
  output logic        x_ready,
  output logic [31:0] win_sum,
  output logic [31:0] total,
  output logic [31:0] count,
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

  localparam int unsigned WIN  = 16;
  localparam int unsigned AW   = 4;
  localparam int unsigned C    = 5;
  localparam int unsigned SEGW = (1 + AW + 32 + 31) / 32 + WIN;

  typedef struct packed {
    logic [26:0]   pad;
    logic          phase;
    logic [AW-1:0] wp;
    logic [31:0]   xd;
    logic [31:0]   win;
    logic [31:0]   total;
    logic [31:0]   n;       // Reg_0
  } flat_regs_t;

  flat_regs_t  st, nx;
  logic [31:0] rdata, oldest;

  assign x_ready = drive && !st.phase;
  assign oldest  = (st.n < WIN) ? 32'd0 : rdata;

  always_comb begin
    nx = st;
    if (!st.phase) begin
      if (x_valid) begin
        nx.xd    = x;
        nx.phase = 1'b1;
      end
    end else begin
      nx.win   = st.win + st.xd - oldest;
      nx.total = st.total + st.xd;
      nx.n     = st.n + 1;
      nx.wp    = st.wp + 1'b1;
      nx.phase = 1'b0;
    end
  end

  assign win_sum = st.win;
  assign total   = st.total;
  assign count   = st.n;

  // shifting ring of all register bits
  logic        ring_cap, ring_rst, active;
  logic [31:0] ring_tail, rst_data;
  logic [32*C-1:0] ring_q;
  assign st = flat_regs_t'(ring_q);

  cpr_reg_ring #(.K(C)) u_ring (
    .clk, .rst_n, .drive, .d(nx), .q(ring_q),
    .cap_shift(ring_cap), .rst_shift(ring_rst), .rst_data, .tail(ring_tail)
  );

  // window buffer with its RAM capturing/restoring circuit
  logic        ram_step [1], ram_load [1];
  logic [31:0] ram_word [1];

  cpr_ram_ckpt #(.DW(32), .AW(AW)) u_ram (
    .clk, .rst_n, .u_we(st.phase), .u_addr(st.wp), .u_wdata(st.xd), .u_rdata(rdata),
    .drive, .virt, .active, .step(ram_step[0]), .load(ram_load[0]), .rst_data,
    .cap_word(ram_word[0])
  );

  cpr_flat_ctrl #(.C(C), .N_RAM(1), .RAM_WORDS(32'(SEGW))) u_ctrl (
    .clk, .rst_n, .CPR_request, .CPR_state, .cpr_out_almost_full, .capture_flag,
    .D_cp, .D_cp_valid, .Q_r, .Q_r_valid,
    .ring_cap_shift(ring_cap), .ring_rst_shift(ring_rst), .ring_tail,
    .active, .ram_step, .ram_load, .ram_word, .rst_data
  );

endmodule
