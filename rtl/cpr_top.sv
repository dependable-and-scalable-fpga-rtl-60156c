// cpr_top: checkpointable FPGA designs in the two architectures, side by
// side, each with its own ports: the tree-based architecture (CPRtree, the
// ports without prefix) and the ring-based flattened architecture
// (CPRflatten, cpr_flat_sys, the ports prefixed f_). Both have the same
// static CPR part and host protocol.
//
// CPRtree: the static CPR part plus the user-logic-based CPR tree.
//
// Static part (fixed, independent of the user logic):
//   cpr_sw_dma     AXI4-Lite slave for the host (commands, status, address)
//   cpr_manager    runs Prepare / Capture / Restore / Resume
//   cpr_mem_dma    AXI4 master that writes/reads the context to/from memory
//   Capture FIFO, Restore FIFO (cpr_fifo, 16 x 32 bits)
//   cpr_channel_fsm x2 (user read and write channels) and
//   cpr_req_throttle x2 (user AR and AW requests)
// User-logic-based part: app_sum (root CPR node, register ring, block RAM
// with its checkpoint circuit) with its child app_sq (leaf CPR node, a
// four-stage pipelined multiplier with its additional registers).
//
// Data flow: capture words leave the root's D_cp into the Capture FIFO and
// the DMA writes them to the address the host gave; on restore the DMA fills
// the Restore FIFO and the manager pumps it into the root's Q_r. The host
// sequence is PREPARE, then CAPTURE and/or RESTORE, then RESUME, each
// acknowledged in the status register. The context is CTX_WORDS 32-bit words
// (33 for N_WORDS = 16). The user logic's AXI4 ports carry 4-byte INCR
// bursts only; their size and burst fields are implied.
// Several output bits are constant by construction: the AXI4 size, burst and
// strobe fields of the memory port, the always-OKAY host responses, the
// unused high status bits and the fixed burst lengths of the user logic
// (one N_WORDS read burst, one single-beat write). Memory-port responses are
// not checked. FIFO flags and channel counts that nothing needs are left
// unconnected.
// The partition and the block list are the document's; the user application
// and all widths other than the 32-bit checkpoint path are this design's.
module cpr_top
  import cpr_pkg::*;
#(
  parameter int unsigned N_WORDS = 16,
  localparam int unsigned AW_APP    = (N_WORDS > 1) ? $clog2(N_WORDS) : 1,
  localparam int unsigned CTX_WORDS = 4 + (1 + AW_APP + 32 + 31) / 32 + (2**AW_APP) + 11,
  localparam int unsigned CW = $clog2(16 + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  // host AXI4-Lite slave (S-Bus)
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
  // checkpoint memory AXI4 master (M-Bus)
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
  // user logic AXI4 master (channel side, after throttling)
  output logic [31:0] u_araddr,
  output logic [7:0]  u_arlen,
  output logic        u_arvalid,
  input  logic        u_arready,
  input  logic [31:0] u_rdata,
  input  logic        u_rlast,
  input  logic        u_rvalid,
  output logic        u_rready,
  output logic [31:0] u_awaddr,
  output logic [7:0]  u_awlen,
  output logic        u_awvalid,
  input  logic        u_awready,
  output logic [31:0] u_wdata,
  output logic        u_wlast,
  output logic        u_wvalid,
  input  logic        u_wready,
  input  logic        u_bvalid,
  output logic        u_bready,
  // user application control
  input  logic        app_start,
  input  logic [31:0] app_src,
  input  logic [31:0] app_dst,
  output logic        app_done,
  output logic [31:0] app_sum_o,
  output logic [31:0] app_sumsq_o,
  output logic [31:0] app_chk_o,
  // observation
  output logic [7:0]  cpr_status,
  output logic        cpr_drive,
  output logic        cpr_req_en,
  // CPRflatten design: host AXI4-Lite slave
  input  logic [3:0]   f_s_awaddr,
  input  logic         f_s_awvalid,
  output logic         f_s_awready,
  input  logic [31:0]  f_s_wdata,
  input  logic         f_s_wvalid,
  output logic         f_s_wready,
  output logic [1:0]   f_s_bresp,
  output logic         f_s_bvalid,
  input  logic         f_s_bready,
  input  logic [3:0]   f_s_araddr,
  input  logic         f_s_arvalid,
  output logic         f_s_arready,
  output logic [31:0]  f_s_rdata,
  output logic [1:0]   f_s_rresp,
  output logic         f_s_rvalid,
  input  logic         f_s_rready,
  // CPRflatten design: checkpoint memory AXI4 master
  output logic [31:0]  f_m_awaddr,
  output logic [7:0]   f_m_awlen,
  output logic [2:0]   f_m_awsize,
  output logic [1:0]   f_m_awburst,
  output logic         f_m_awvalid,
  input  logic         f_m_awready,
  output logic [31:0]  f_m_wdata,
  output logic [3:0]   f_m_wstrb,
  output logic         f_m_wlast,
  output logic         f_m_wvalid,
  input  logic         f_m_wready,
  input  logic [1:0]   f_m_bresp,
  input  logic         f_m_bvalid,
  output logic         f_m_bready,
  output logic [31:0]  f_m_araddr,
  output logic [7:0]   f_m_arlen,
  output logic [2:0]   f_m_arsize,
  output logic [1:0]   f_m_arburst,
  output logic         f_m_arvalid,
  input  logic         f_m_arready,
  input  logic [31:0]  f_m_rdata,
  input  logic [1:0]   f_m_rresp,
  input  logic         f_m_rlast,
  input  logic         f_m_rvalid,
  output logic         f_m_rready,
  // CPRflatten design: sample stream and results
  input  logic [31:0]  f_x,
  input  logic         f_x_valid,
  output logic         f_x_ready,
  output logic [31:0]  f_win_sum,
  output logic [31:0]  f_total,
  output logic [31:0]  f_count,
  output logic [7:0]   f_cpr_status
);

  // ---------------- static CPR part ----------------
  cpr_cmd_e    cmd;
  logic        cmd_valid;
  logic [31:0] cp_addr;
  logic [7:0]  status;

  cpr_sw_dma #(.AW(4), .WORDS(32'(CTX_WORDS))) u_sw_dma (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .cmd, .cmd_valid, .cp_addr, .status
  );

  logic        req_en, drive, virt, capture_flag, q_r_valid;
  logic        rf_empty, rf_rd, dma_wr_start, dma_rd_start, dma_wr_done;
  logic        channels_idle;
  cpr_req_e    cpr_request;
  cpr_state_e  root_state;

  cpr_manager #(.TOTAL_WORDS(CTX_WORDS), .VIRT_CYCLES(4)) u_manager (
    .clk, .rst_n, .cmd, .cmd_valid, .status,
    .channels_idle, .req_en, .drive, .virt,
    .cpr_request, .capture_flag, .root_state, .q_r_valid,
    .rf_empty, .rf_rd, .dma_wr_start, .dma_rd_start, .dma_wr_done
  );

  assign cpr_status = status;
  assign cpr_drive  = drive;
  assign cpr_req_en = req_en;

  // Capture FIFO
  logic [31:0]   d_cp, cf_data;
  logic          d_cp_valid, cf_rd, cf_af;
  logic [CW-1:0] cf_count;

  cpr_fifo #(.DW(32), .DEPTH(16), .AF_GAP(6)) u_capture_fifo (
    .clk, .rst_n, .wr_en(d_cp_valid), .wr_data(d_cp),
    .rd_en(cf_rd), .rd_data(cf_data), .empty(), .full(),
    .almost_full(cf_af), .count(cf_count)
  );

  // Restore FIFO
  logic [31:0]   rf_wdata, q_r;
  logic          rf_wr;
  logic [CW-1:0] rf_count;

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

  // ---------------- channel FSMs and request throttling ----------------
  logic app_arvalid, app_arready, app_awvalid, app_awready;
  logic rd_idle, wr_idle;

  cpr_req_throttle u_throttle_ar (
    .req_en, .valid_in(app_arvalid), .valid_out(u_arvalid),
    .ready_in(u_arready), .ready_out(app_arready)
  );
  cpr_req_throttle u_throttle_aw (
    .req_en, .valid_in(app_awvalid), .valid_out(u_awvalid),
    .ready_in(u_awready), .ready_out(app_awready)
  );

  cpr_channel_fsm #(.CNT_W(4)) u_rd_channel (
    .clk, .rst_n,
    .start(u_arvalid && u_arready), .finish(u_rvalid && u_rready && u_rlast),
    .idle(rd_idle), .count()
  );
  cpr_channel_fsm #(.CNT_W(4)) u_wr_channel (
    .clk, .rst_n,
    .start(u_awvalid && u_awready), .finish(u_bvalid && u_bready),
    .idle(wr_idle), .count()
  );
  assign channels_idle = rd_idle && wr_idle;

  // ---------------- user-logic-based CPR part ----------------
  app_sum #(.N_WORDS(N_WORDS)) u_app (
    .clk, .rst_n, .drive, .virt,
    .start(app_start), .src_addr(app_src), .dst_addr(app_dst),
    .done(app_done), .sum(app_sum_o), .sumsq(app_sumsq_o), .chk(app_chk_o),
    .araddr(u_araddr), .arlen(u_arlen), .arvalid(app_arvalid), .arready(app_arready),
    .rdata(u_rdata), .rlast(u_rlast), .rvalid(u_rvalid), .rready(u_rready),
    .awaddr(u_awaddr), .awlen(u_awlen), .awvalid(app_awvalid), .awready(app_awready),
    .wdata(u_wdata), .wlast(u_wlast), .wvalid(u_wvalid), .wready(u_wready),
    .bvalid(u_bvalid), .bready(u_bready),
    .CPR_request(cpr_request), .CPR_state(root_state),
    .cpr_out_almost_full(cf_af), .capture_flag,
    .D_cp(d_cp), .D_cp_valid(d_cp_valid), .Q_r(q_r), .Q_r_valid(q_r_valid)
  );

  // ---------------- ring-based flattened design (CPRflatten) ----------------
  cpr_flat_sys u_flat (
    .clk, .rst_n,
    .s_awaddr(f_s_awaddr), .s_awvalid(f_s_awvalid), .s_awready(f_s_awready), .s_wdata(f_s_wdata),
    .s_wvalid(f_s_wvalid), .s_wready(f_s_wready), .s_bresp(f_s_bresp), .s_bvalid(f_s_bvalid),
    .s_bready(f_s_bready), .s_araddr(f_s_araddr), .s_arvalid(f_s_arvalid), .s_arready(f_s_arready),
    .s_rdata(f_s_rdata), .s_rresp(f_s_rresp), .s_rvalid(f_s_rvalid), .s_rready(f_s_rready),
    .m_awaddr(f_m_awaddr), .m_awlen(f_m_awlen), .m_awsize(f_m_awsize), .m_awburst(f_m_awburst),
    .m_awvalid(f_m_awvalid), .m_awready(f_m_awready), .m_wdata(f_m_wdata), .m_wstrb(f_m_wstrb),
    .m_wlast(f_m_wlast), .m_wvalid(f_m_wvalid), .m_wready(f_m_wready), .m_bresp(f_m_bresp),
    .m_bvalid(f_m_bvalid), .m_bready(f_m_bready), .m_araddr(f_m_araddr), .m_arlen(f_m_arlen),
    .m_arsize(f_m_arsize), .m_arburst(f_m_arburst), .m_arvalid(f_m_arvalid), .m_arready(f_m_arready),
    .m_rdata(f_m_rdata), .m_rresp(f_m_rresp), .m_rlast(f_m_rlast), .m_rvalid(f_m_rvalid),
    .m_rready(f_m_rready), .x(f_x), .x_valid(f_x_valid), .x_ready(f_x_ready),
    .win_sum(f_win_sum), .total(f_total), .count(f_count), .cpr_status(f_cpr_status)
  );

endmodule
