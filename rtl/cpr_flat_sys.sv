// cpr_flat_sys: a checkpointable design in the ring-based flattened
// architecture (CPRflatten): the same static CPR part as the tree-based
// design (SW DMA for the host, CPR manager, MEM DMA, 16 x 32-bit Capture and
// Restore FIFOs) with a flattened user-logic part, app_flat, whose shifting
// ring and RAM circuit are wired through one controller straight to the
// FIFOs. The context is CTX_WORDS = 23 words.
// The user logic's only channel is a valid/ready sample stream that holds
// no outstanding transactions, so there is no channel FSM and PREPARE
// completes at once (channels_idle tied high); DRIVE low closes the stream
// (x_ready low). Host protocol, register map and status are those of
// cpr_top. Constant outputs: AXI size/burst/strobe fields and the always-OKAY
// host responses. Memory-port responses are not checked.
module cpr_flat_sys
  import cpr_pkg::*;
#(
  localparam int unsigned CTX_WORDS = 5 + 2 + 16,
  localparam int unsigned CW = $clog2(16 + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  // host AXI4-Lite slave
  input  logic [3:0]  s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [3:0]  s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // checkpoint memory AXI4 master
  output logic [31:0] m_awaddr,
  output logic [7:0]  m_awlen,
  output logic [2:0]  m_awsize,
  output logic [1:0]  m_awburst,
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [31:0] m_wdata,
  output logic [3:0]  m_wstrb,
  output logic        m_wlast,
  output logic        m_wvalid,
  input  logic        m_wready,
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready,
  output logic [31:0] m_araddr,
  output logic [7:0]  m_arlen,
  output logic [2:0]  m_arsize,
  output logic [1:0]  m_arburst,
  output logic        m_arvalid,
  input  logic        m_arready,
  input  logic [31:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rlast,
  input  logic        m_rvalid,
  output logic        m_rready,
  // sample stream and results
  input  logic [31:0] x,
  input  logic        x_valid,
  output logic        x_ready,
  output logic [31:0] win_sum,
  output logic [31:0] total,
  output logic [31:0] count,
  output logic [7:0]  cpr_status
);

  cpr_cmd_e    cmd;
  logic        cmd_valid;
  logic [31:0] cp_addr;

  cpr_sw_dma #(.AW(4), .WORDS(32'(CTX_WORDS))) u_sw_dma (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .cmd, .cmd_valid, .cp_addr, .status(cpr_status)
  );

  logic        drive, virt, capture_flag, q_r_valid;
  logic        rf_empty, rf_rd, dma_wr_start, dma_rd_start, dma_wr_done;
  cpr_req_e    cpr_request;
  cpr_state_e  root_state;

  cpr_manager #(.TOTAL_WORDS(CTX_WORDS), .VIRT_CYCLES(1)) u_manager (
    .clk, .rst_n, .cmd, .cmd_valid, .status(cpr_status),
    .channels_idle(1'b1), .req_en(), .drive, .virt,
    .cpr_request, .capture_flag, .root_state, .q_r_valid,
    .rf_empty, .rf_rd, .dma_wr_start, .dma_rd_start, .dma_wr_done
  );

  logic [31:0]   d_cp, cf_data, rf_wdata, q_r;
  logic          d_cp_valid, cf_rd, cf_af, rf_wr;
  logic [CW-1:0] cf_count, rf_count;

  cpr_fifo #(.DW(32), .DEPTH(16), .AF_GAP(6)) u_capture_fifo (
    .clk, .rst_n, .wr_en(d_cp_valid), .wr_data(d_cp),
    .rd_en(cf_rd), .rd_data(cf_data), .empty(), .full(),
    .almost_full(cf_af), .count(cf_count)
  );
  cpr_fifo #(.DW(32), .DEPTH(16), .AF_GAP(6)) u_restore_fifo (
    .clk, .rst_n, .wr_en(rf_wr), .wr_data(rf_wdata),
    .rd_en(rf_rd), .rd_data(q_r), .empty(rf_empty), .full(),
    .almost_full(), .count(rf_count)
  );

  cpr_mem_dma #(.MAX_BURST(16), .FIFO_DEPTH(16)) u_mem_dma (
    .clk, .rst_n, .base(cp_addr), .n_words(32'(CTX_WORDS)),
    .wr_start(dma_wr_start), .wr_done(dma_wr_done),
    .rd_start(dma_rd_start), .rd_done(),
    .cf_data, .cf_count, .cf_rd, .rf_data(rf_wdata), .rf_wr, .rf_count,
    .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready,
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready
  );

  app_flat u_app (
    .clk, .rst_n, .drive, .virt, .x, .x_valid, .x_ready,
    .win_sum, .total, .count,
    .CPR_request(cpr_request), .CPR_state(root_state),
    .cpr_out_almost_full(cf_af), .capture_flag,
    .D_cp(d_cp), .D_cp_valid(d_cp_valid), .Q_r(q_r), .Q_r_valid(q_r_valid)
  );

endmodule
