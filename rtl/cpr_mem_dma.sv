// cpr_mem_dma: AXI4 master of the static CPR part (M-Bus) that moves the
// context between the Capture/Restore FIFOs and off-chip memory.
//
// Write path (capture): after wr_start, n_words words are written from
// 'base' upward. A burst is issued as soon as the Capture FIFO is not empty;
// its length is min(words in the FIFO, words left, MAX_BURST), so every beat
// of a burst is already in the FIFO when the burst starts and the W channel
// never waits for data. wr_done rises after the last B response.
// Read path (restore): after rd_start, n_words words are read from 'base'
// into the Restore FIFO in bursts of min(free entries, words left, MAX_BURST),
// issued only when the FIFO has room, so R beats are always accepted.
// rd_done rises after the last R beat. Both paths use INCR bursts of 4-byte
// beats on a 32-bit bus with IDs 0 and can run at the same time.
// That the write starts on a non-empty FIFO is the document's; the burst
// sizing rules are this design's. Bursts are not split at 4 KB boundaries:
// the context area is assumed not to straddle one.
module cpr_mem_dma #(
  parameter int unsigned MAX_BURST  = 16,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   base,
  input  logic [31:0]   n_words,
  input  logic          wr_start,
  output logic          wr_done,
  input  logic          rd_start,
  output logic          rd_done,
  // Capture FIFO read side
  input  logic [31:0]   cf_data,
  input  logic [CW-1:0] cf_count,
  output logic          cf_rd,
  // Restore FIFO write side
  output logic [31:0]   rf_data,
  output logic          rf_wr,
  input  logic [CW-1:0] rf_count,
  // AXI4 master
  output logic [31:0]   m_awaddr,
  output logic [7:0]    m_awlen,
  output logic [2:0]    m_awsize,
  output logic [1:0]    m_awburst,
  output logic          m_awvalid,
  input  logic          m_awready,
  output logic [31:0]   m_wdata,
  output logic [3:0]    m_wstrb,
  output logic          m_wlast,
  output logic          m_wvalid,
  input  logic          m_wready,
  input  logic [1:0]    m_bresp,
  input  logic          m_bvalid,
  output logic          m_bready,
  output logic [31:0]   m_araddr,
  output logic [7:0]    m_arlen,
  output logic [2:0]    m_arsize,
  output logic [1:0]    m_arburst,
  output logic          m_arvalid,
  input  logic          m_arready,
  input  logic [31:0]   m_rdata,
  input  logic [1:0]    m_rresp,
  input  logic          m_rlast,
  input  logic          m_rvalid,
  output logic          m_rready
);

  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_e;

  wstate_e     ws;
  rstate_e     rs;
  logic [31:0] w_addr, w_left, r_addr, r_left;
  logic [8:0]  w_len, w_beats, r_len;

  function automatic logic [8:0] min3(logic [31:0] a, logic [31:0] b);
    logic [31:0] m;
    m = (a < b) ? a : b;
    if (m > MAX_BURST) m = MAX_BURST;
    return m[8:0];
  endfunction

  // ---------------- write path ----------------
  assign m_awaddr  = w_addr;
  assign m_awlen   = 8'(w_len - 1'b1);
  assign m_awsize  = 3'd2;
  assign m_awburst = 2'b01;
  assign m_awvalid = (ws == W_ADDR);
  assign m_wdata   = cf_data;
  assign m_wstrb   = 4'hf;
  assign m_wvalid  = (ws == W_DATA);
  assign m_wlast   = (ws == W_DATA) && (w_beats == w_len - 1'b1);
  assign m_bready  = (ws == W_RESP);
  assign cf_rd     = m_wvalid && m_wready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ws      <= W_IDLE;
      w_addr  <= '0;
      w_left  <= '0;
      w_len   <= '0;
      w_beats <= '0;
      wr_done <= 1'b0;
    end else begin
      if (wr_start) begin
        w_addr  <= base;
        w_left  <= n_words;
        wr_done <= (n_words == 0);
        ws      <= W_IDLE;
      end else begin
        unique case (ws)
          W_IDLE: if (w_left != 0 && cf_count != 0) begin
            w_len <= min3(32'(cf_count), w_left);
            ws    <= W_ADDR;
          end
          W_ADDR: if (m_awready) begin
            w_beats <= '0;
            ws      <= W_DATA;
          end
          W_DATA: if (m_wready) begin
            w_beats <= w_beats + 1'b1;
            if (m_wlast) ws <= W_RESP;
          end
          W_RESP: if (m_bvalid) begin
            w_addr <= w_addr + (32'(w_len) << 2);
            w_left <= w_left - 32'(w_len);
            if (w_left == 32'(w_len)) wr_done <= 1'b1;
            ws     <= W_IDLE;
          end
          default: ws <= W_IDLE;
        endcase
      end
    end
  end

  // ---------------- read path ----------------
  logic [31:0] rf_free;
  assign rf_free   = 32'(FIFO_DEPTH) - 32'(rf_count);
  assign m_araddr  = r_addr;
  assign m_arlen   = 8'(r_len - 1'b1);
  assign m_arsize  = 3'd2;
  assign m_arburst = 2'b01;
  assign m_arvalid = (rs == R_ADDR);
  assign m_rready  = (rs == R_DATA);
  assign rf_data   = m_rdata;
  assign rf_wr     = m_rvalid && m_rready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rs      <= R_IDLE;
      r_addr  <= '0;
      r_left  <= '0;
      r_len   <= '0;
      rd_done <= 1'b0;
    end else begin
      if (rd_start) begin
        r_addr  <= base;
        r_left  <= n_words;
        rd_done <= (n_words == 0);
        rs      <= R_IDLE;
      end else begin
        unique case (rs)
          R_IDLE: if (r_left != 0 && rf_free != 0) begin
            r_len <= min3(rf_free, r_left);
            rs    <= R_ADDR;
          end
          R_ADDR: if (m_arready) rs <= R_DATA;
          R_DATA: if (m_rvalid) begin
            r_addr <= r_addr + 32'd4;
            r_left <= r_left - 1;
            if (m_rlast) begin
              if (r_left == 1) rd_done <= 1'b1;
              rs <= R_IDLE;
            end
          end
          default: rs <= R_IDLE;
        endcase
      end
    end
  end

`ifndef SYNTHESIS
  a_wdata_present: assert property (@(posedge clk) disable iff (!rst_n)
    m_wvalid |-> cf_count != 0);
  a_rf_room: assert property (@(posedge clk) disable iff (!rst_n)
    rf_wr |-> rf_count < CW'(FIFO_DEPTH));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr) && $stable(m_awlen));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr) && $stable(m_arlen));
`endif

endmodule
