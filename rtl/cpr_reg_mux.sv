// cpr_reg_mux: checkpointable register bank with the MUX-based
// capturing/restoring circuit, a drop-in alternative to cpr_reg_ring with
// the same ports and the same word order and timing.
//
// The user state is packed into K words of 32 bits, Reg_0 = q[31:0] ...
// Reg_K-1 = q[32*K-1 -: 32]. A word pointer selects one register:
//   drive = 1     normal operation, q <= d; the pointer returns to Reg_0
//   cap_shift = 1 capture step: the pointer moves on; tail (a K-input
//                 multiplexer) then shows the register just stepped, so the
//                 word is valid in the cycle after the step, Reg_0 first
//   rst_shift = 1 restore step: rst_data is written into the register the
//                 pointer selects (one more input on each register's
//                 multiplexer) and the pointer moves on
//   otherwise     hold (logic throttled, DRIVE low)
// The registers never move, so capture leaves them unchanged. The pointer
// wraps after K steps. This circuit adds 2K multiplexer inputs against K+2
// for the shifting ring, so the document recommends it only for K <= 2
// (with a padded last word); the pointer and the reset value 0 are this
// design's choices.
module cpr_reg_mux #(
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

  localparam int unsigned PW = (K > 1) ? $clog2(K) : 1;

  logic [PW-1:0] ptr, last, ptr_nx;
  assign ptr_nx = (ptr == PW'(K - 1)) ? '0 : ptr + 1'b1;
  assign last   = (ptr == '0) ? PW'(K - 1) : ptr - 1'b1;
  assign tail   = q[32*last +: 32];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q   <= '0;
      ptr <= '0;
    end else if (drive) begin
      q   <= d;
      ptr <= '0;
    end else if (cap_shift) begin
      ptr <= ptr_nx;
    end else if (rst_shift) begin
      q[32*ptr +: 32] <= rst_data;
      ptr             <= ptr_nx;
    end
  end

`ifndef SYNTHESIS
  a_one_mode: assert property (@(posedge clk) disable iff (!rst_n)
    !(drive && (cap_shift || rst_shift)) && !(cap_shift && rst_shift));
`endif

endmodule
