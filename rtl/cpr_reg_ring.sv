// cpr_reg_ring: checkpointable register bank with the Shift-Reg-based
// capturing/restoring circuit.
//
// The user state of one module is packed into K words of 32 bits,
// Reg_0 = q[31:0] ... Reg_K-1 = q[32*K-1 -: 32] (a partial last word is padded
// by the user with a constant). The bank replaces the module's own always
// blocks:
//   drive = 1     normal operation, q <= d (d is the user's next state)
//   cap_shift = 1 capture step: Reg_j <= Reg_j+1 and Reg_0 loops back to
//                 Reg_K-1, so after K steps every register is back to its value
//   rst_shift = 1 restore step: Reg_j <= Reg_j+1 and Reg_K-1 <= rst_data, so
//                 after K steps the first word restored sits in Reg_0
//   otherwise     hold (logic throttled, DRIVE low)
// tail is Reg_K-1: in the cycle after a capture step it holds the word that
// was Reg_0, which is the word the CPR node sends. Capture and restore share
// the one shifting path, which is the point of this circuit in the document.
// Word order (Reg_0 first) and the reset value 0 are this design's choices.
module cpr_reg_ring #(
  parameter int unsigned K = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            drive,
  input  logic [32*K-1:0] d,
  output logic [32*K-1:0] q,
  input  logic            cap_shift,
  input  logic            rst_shift,
  input  logic [31:0]     rst_data,
  output logic [31:0]     tail
);

  assign tail = q[32*K-1 -: 32];

  // word-shifted view of the bank: rotate (capture) or shift-in (restore)
  logic [32*K-1:0] rot, shin;
  if (K > 1) begin : g_multi
    assign rot  = {q[31:0], q[32*K-1:32]};
    assign shin = {rst_data, q[32*K-1:32]};
  end else begin : g_single
    assign rot  = q;
    assign shin = rst_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         q <= '0;
    else if (drive)     q <= d;
    else if (cap_shift) q <= rot;
    else if (rst_shift) q <= shin;
  end

`ifndef SYNTHESIS
  a_one_mode: assert property (@(posedge clk) disable iff (!rst_n)
    !(drive && (cap_shift || rst_shift)) && !(cap_shift && rst_shift));
`endif

endmodule
