// cpr_bram: single-port block RAM, the user RAM template that the
// checkpointing circuit wraps (a dedicated block whose output is delayed).
//
// 2**AW words of DW bits. One port: on each clock edge, if we is set the word
// at addr is written; rdata is registered and shows, one cycle after the
// address, the word at addr (the new data on a write: write-first mode).
// The one-cycle output delay is what makes the block need "additional
// registers" for checkpointing. Write-first mode is this design's choice: it
// lets the restored last input simply be replayed on resume to regenerate
// the output. The contents are not reset.
module cpr_bram #(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
      rdata     <= wdata;
    end else begin
      rdata     <= mem[addr];
    end
  end

endmodule
