// cpr_sw_dma: host-facing AXI4-Lite slave of the static CPR part (S-Bus).
//
// The host software drives the CPR manager through four 32-bit registers:
//   0x00 CMD     write: command code (cpr_pkg::cpr_cmd_e), pulses cmd_valid
//   0x04 STATUS  read : status code from the CPR manager
//   0x08 ADDR    read/write: base address of the checkpoint in memory
//   0x0C WORDS   read : number of 32-bit context words (fixed by the design)
// A write is accepted when AW and W are both valid and no response is
// pending; the B response follows one cycle later. A read is accepted when
// no read data is pending and the R response follows one cycle later. Both
// always answer OKAY. The register map and the acceptance rule are this
// design's choices; the document only names the block and its role of
// passing the control code, the status code and the checkpoint address.
module cpr_sw_dma
  import cpr_pkg::*;
#(
  parameter int unsigned AW = 4,
  parameter logic [31:0] WORDS = 32'd0
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite slave
  input  logic [AW-1:0] s_awaddr,
  input  logic          s_awvalid,
  output logic          s_awready,
  input  logic [31:0]   s_wdata,
  input  logic          s_wvalid,
  output logic          s_wready,
  output logic [1:0]    s_bresp,
  output logic          s_bvalid,
  input  logic          s_bready,
  input  logic [AW-1:0] s_araddr,
  input  logic          s_arvalid,
  output logic          s_arready,
  output logic [31:0]   s_rdata,
  output logic [1:0]    s_rresp,
  output logic          s_rvalid,
  input  logic          s_rready,
  // to / from the CPR manager
  output cpr_cmd_e      cmd,
  output logic          cmd_valid,
  output logic [31:0]   cp_addr,
  input  logic [7:0]    status
);

  logic wr_go, rd_go;
  assign wr_go     = s_awvalid && s_wvalid && !s_bvalid;
  assign rd_go     = s_arvalid && !s_rvalid;
  assign s_awready = wr_go;
  assign s_wready  = wr_go;
  assign s_arready = rd_go;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmd       <= CMD_NONE;
      cmd_valid <= 1'b0;
      cp_addr   <= '0;
      s_bvalid  <= 1'b0;
      s_rvalid  <= 1'b0;
      s_rdata   <= '0;
    end else begin
      cmd_valid <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (wr_go) begin
        s_bvalid <= 1'b1;
        unique case (s_awaddr[3:2])
          2'd0: begin
            cmd       <= cpr_cmd_e'(s_wdata[2:0]);
            cmd_valid <= 1'b1;
          end
          2'd2: cp_addr <= s_wdata;
          default: ;
        endcase
      end
      if (rd_go) begin
        s_rvalid <= 1'b1;
        unique case (s_araddr[3:2])
          2'd0: s_rdata <= {29'd0, cmd};
          2'd1: s_rdata <= {24'd0, status};
          2'd2: s_rdata <= cp_addr;
          default: s_rdata <= WORDS;
        endcase
      end
    end
  end

endmodule
