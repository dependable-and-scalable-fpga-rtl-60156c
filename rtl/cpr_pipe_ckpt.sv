// cpr_pipe_ckpt: checkpoint circuit for a dedicated block whose output is a
// LAT-cycle delayed response to its inputs (here a cpr_pipe_mul). Its
// internal pipeline cannot be captured, so the circuit keeps the block's
// inputs of the last LAT running cycles in additional registers and saves
// those instead; on resume it replays them, oldest first, in LAT
// consecutive cycles, which refills the pipeline with the values it held.
//
//   drive = 1  the block takes the user's inputs; the history shifts in the
//              current {in_valid, a, b} (newest in slot 0).
//   virt  = 1  the block takes the oldest history slot and the history
//              rotates by one slot, so after LAT cycles it is back where it
//              was and the pipeline holds what it held at the pause. virt
//              must be high for exactly LAT cycles.
//   otherwise  the block is frozen (ce low).
// The history is kept as 2*LAT+1 32-bit words in a cpr_reg_ring: word 0
// holds the LAT valid bits, then a and b of each slot. step rotates it one
// word for capture (word valid on cap_word the next cycle), load shifts in
// rst_data for restore; both are driven by the owning CPR node as its RAM
// segment. busy tells the owner that valid inputs are still in flight.
// Additional registers and their in-order replay follow the
// document; the word layout is this design's.
module cpr_pipe_ckpt #(
  parameter int unsigned LAT = 4,
  localparam int unsigned WORDS = 2 * LAT + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // user side
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        in_valid,
  output logic [31:0] p,
  output logic        p_valid,
  // checkpoint control
  input  logic        drive,
  input  logic        virt,
  input  logic        step,
  input  logic        load,
  input  logic [31:0] rst_data,
  output logic [31:0] cap_word,
  output logic        busy        // valid inputs among the last LAT
);

  // history layout (word index): 0 = {pad, valid[LAT-1:0]},
  // 1 + 2*i = a of slot i, 2 + 2*i = b of slot i (slot 0 newest)
  logic [32*WORDS-1:0] h_q, h_d;
  logic [LAT-1:0]      hv;
  assign hv   = h_q[LAT-1:0];
  assign busy = |hv;

  function automatic logic [31:0] slot_a(logic [32*WORDS-1:0] h, int unsigned i);
    return h[32*(1 + 2*i) +: 32];
  endfunction
  function automatic logic [31:0] slot_b(logic [32*WORDS-1:0] h, int unsigned i);
    return h[32*(2 + 2*i) +: 32];
  endfunction

  // next history: shift in the user's inputs (drive) or rotate (virt)
  always_comb begin
    h_d = '0;
    if (virt) begin
      h_d[LAT-1:0]  = {hv[LAT-2:0], hv[LAT-1]};
      h_d[32 +: 64] = {slot_b(h_q, LAT-1), slot_a(h_q, LAT-1)};
      for (int unsigned i = 1; i < LAT; i++)
        h_d[32*(1 + 2*i) +: 64] = {slot_b(h_q, i-1), slot_a(h_q, i-1)};
    end else begin
      h_d[LAT-1:0]  = {hv[LAT-2:0], in_valid};
      h_d[32 +: 64] = {b, a};
      for (int unsigned i = 1; i < LAT; i++)
        h_d[32*(1 + 2*i) +: 64] = {slot_b(h_q, i-1), slot_a(h_q, i-1)};
    end
  end

  cpr_reg_ring #(.K(WORDS)) u_hist (
    .clk, .rst_n, .drive(drive || virt), .d(h_d), .q(h_q),
    .cap_shift(step), .rst_shift(load), .rst_data, .tail(cap_word)
  );

  cpr_pipe_mul #(.LAT(LAT)) u_mul (
    .clk, .rst_n, .ce(drive || virt),
    .a(virt ? slot_a(h_q, LAT-1) : a),
    .b(virt ? slot_b(h_q, LAT-1) : b),
    .in_valid(virt ? hv[LAT-1] : in_valid),
    .p, .p_valid
  );

`ifndef SYNTHESIS
  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(drive && virt));
`endif

endmodule
