// cpr_fifo: synchronous FIFO used as the Capture FIFO and the Restore FIFO of
// the static CPR part (the on-chip level of the multi-level checkpoint).
//
// DEPTH entries of DW bits, one write and one read port in the same clock.
// rd_data shows the head entry combinationally (first-word fall-through);
// rd_en pops it. almost_full is raised when fewer than AF_GAP entries are
// free. The capture tree has no handshake between levels, so words already in
// flight when almost_full rises must still fit: AF_GAP must exceed the number
// of words in flight, which grows with the number of CPR levels.
// DEPTH = 16 and DW = 32 are the document's; AF_GAP is this design's choice.
// Writing when full and reading when empty are ignored (and flagged by
// assertions in simulation). Reset is synchronous, active low.
module cpr_fifo #(
  parameter int unsigned DW     = 32,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned AF_GAP = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [DW-1:0]              wr_data,
  input  logic                       rd_en,
  output logic [DW-1:0]              rd_data,
  output logic                       empty,
  output logic                       full,
  output logic                       almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DW-1:0] mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty       = (count == '0);
  assign full        = (count == CW'(DEPTH));
  assign almost_full = (count >= CW'(DEPTH - AF_GAP));
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign rd_data     = mem[rp];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

`ifndef SYNTHESIS
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);
`endif

endmodule
