// cpr_ram_ckpt: block RAM with its RAM capturing/restoring circuit and the
// additional registers that let its delayed output be resumed.
//
// Port multiplexers (one select per mode):
//   drive = 1   the user's we/addr/wdata reach the RAM (normal operation),
//               and the additional register 'hist' copies them every cycle
//   virt  = 1   (resume) hist, the RAM input of the last running cycle, is
//               replayed for one cycle so that rdata again shows the output
//               the user logic expects
//   otherwise   the checkpoint registers we_0/addr_0/wdata_0 drive the port
// A one-cycle-delay RAM needs one input tuple of history (n*w bits with n=1).
//
// Context segment, in the order it is captured and restored (SEG_WORDS words
// of 32 bits): first HW words holding hist = {we, addr, wdata} (padded), then
// every RAM entry from address 0 upward, each as RW words, low word first.
// The CPR node drives one 'step' per captured word; the word appears on
// cap_word in the next cycle. For restore it drives 'load' with the word on
// rst_data; a RAM entry is written one cycle after its last word arrives.
// 'active' low clears the segment's word counter.
// The muxes, the three checkpoint registers and the additional registers are
// the document's; the segment layout and the counter are this design's.
module cpr_ram_ckpt
  import cpr_pkg::*;
#(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 4,
  localparam int unsigned HB        = 1 + AW + DW,
  localparam int unsigned HW        = (HB + 31) / 32,
  localparam int unsigned RW        = (DW + 31) / 32,
  localparam int unsigned SEG_WORDS = HW + (2**AW) * RW
) (
  input  logic          clk,
  input  logic          rst_n,
  // user port
  input  logic          u_we,
  input  logic [AW-1:0] u_addr,
  input  logic [DW-1:0] u_wdata,
  output logic [DW-1:0] u_rdata,
  // control
  input  logic          drive,
  input  logic          virt,
  input  logic          active,
  input  logic          step,
  input  logic          load,
  input  logic [31:0]   rst_data,
  output logic [31:0]   cap_word
);

  localparam int unsigned CNT_W = $clog2(SEG_WORDS + 1);
  localparam int unsigned SUB_W = (RW > 1) ? $clog2(RW) : 1;

  // additional registers (input history), as a ring of HW words
  logic [32*HW-1:0] hist;
  logic             h_we;
  logic [AW-1:0]    h_addr;
  logic [DW-1:0]    h_wdata;
  assign {h_we, h_addr, h_wdata} = hist[HB-1:0];

  // checkpoint port registers
  logic             we_0;
  logic [AW-1:0]    addr_0;
  logic [32*RW-1:0] wdata_0;

  // segment position
  logic [CNT_W-1:0] cnt;
  logic [SUB_W-1:0] sub, sub_q;
  logic             in_hist, in_hist_q;
  assign in_hist = (cnt < CNT_W'(HW));

  // RAM port multiplexers
  logic          p_we;
  logic [AW-1:0] p_addr;
  logic [DW-1:0] p_wdata;
  always_comb begin
    if (drive) begin
      p_we = u_we;  p_addr = u_addr;  p_wdata = u_wdata;
    end else if (virt) begin
      p_we = h_we;  p_addr = h_addr;  p_wdata = h_wdata;
    end else begin
      p_we = we_0;  p_addr = addr_0;  p_wdata = wdata_0[DW-1:0];
    end
  end

  cpr_bram #(.DW(DW), .AW(AW)) u_bram (
    .clk, .we(p_we), .addr(p_addr), .wdata(p_wdata), .rdata(u_rdata)
  );

  logic [32*RW-1:0] rdata_ext;
  assign rdata_ext = (32*RW)'(u_rdata);
  assign cap_word  = in_hist_q ? hist[32*HW-1 -: 32] : rdata_ext[32*sub_q +: 32];

  // word shifts of the history ring and of the write-data assembly register
  logic [32*HW-1:0] hist_rot, hist_shin;
  logic [32*RW-1:0] wdata_shin;
  if (HW > 1) begin : g_hist_multi
    assign hist_rot  = {hist[31:0], hist[32*HW-1:32]};
    assign hist_shin = {rst_data, hist[32*HW-1:32]};
  end else begin : g_hist_single
    assign hist_rot  = hist;
    assign hist_shin = rst_data;
  end
  if (RW > 1) begin : g_wd_multi
    assign wdata_shin = {rst_data, wdata_0[32*RW-1:32]};
  end else begin : g_wd_single
    assign wdata_shin = rst_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist      <= '0;
      we_0      <= 1'b0;
      addr_0    <= '0;
      wdata_0   <= '0;
      cnt       <= '0;
      sub       <= '0;
      sub_q     <= '0;
      in_hist_q <= 1'b1;
    end else begin
      we_0 <= 1'b0;
      if (drive) begin
        hist <= (32*HW)'({u_we, u_addr, u_wdata});
      end
      if (!active) begin
        cnt    <= '0;
        sub    <= '0;
        addr_0 <= '0;
      end else if (step) begin
        // capture: hist words rotate out, then RAM entries are read at addr_0
        in_hist_q <= in_hist;
        sub_q     <= sub;
        cnt       <= cnt + 1'b1;
        if (in_hist) begin
          hist <= hist_rot;
        end else if (sub == SUB_W'(RW - 1)) begin
          sub    <= '0;
          addr_0 <= addr_0 + 1'b1;
        end else begin
          sub    <= sub + 1'b1;
        end
      end else if (load) begin
        // restore: hist words shift in, then RAM entries are assembled
        cnt <= cnt + 1'b1;
        if (in_hist) begin
          hist <= hist_shin;
        end else begin
          wdata_0 <= wdata_shin;
          if (sub == SUB_W'(RW - 1)) begin
            sub  <= '0;
            we_0 <= 1'b1;
            addr_0 <= AW'((cnt - CNT_W'(HW)) / CNT_W'(RW));
          end else begin
            sub <= sub + 1'b1;
          end
        end
      end
    end
  end

`ifndef SYNTHESIS
  a_one_mode: assert property (@(posedge clk) disable iff (!rst_n)
    !(drive && virt) && !(step && load) && !(drive && (step || load)));
`endif

endmodule
