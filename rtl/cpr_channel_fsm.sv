// cpr_channel_fsm: channel state tracker for one AXI4 transaction channel.
//
// A channel is Active while it has outstanding requests and Idle otherwise.
// For a read channel, 'start' is arvalid && arready (a new read request is
// accepted) and 'finish' is rvalid && rready && rlast (a read burst ends); a
// write channel uses awvalid && awready and bvalid && bready the same way.
// The CPR manager uses 'idle' to know when the channel carries nothing, so a
// snapshot taken then needs no channel state (the "virtual consistent global
// state").
//
// The two states and the request counter follow the document, which shows
// the counter moving between 0 and 1; here it is CNT_W bits wide so that
// several outstanding requests are also tracked (this design's choice).
// A start and a finish in the same cycle leave the count unchanged.
// Timing: 'idle' and 'count' are registered and reflect handshakes of the
// previous cycle. Reset is synchronous, active low.
module cpr_channel_fsm #(
  parameter int unsigned CNT_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             finish,
  output logic             idle,
  output logic [CNT_W-1:0] count
);

  typedef enum logic {CH_IDLE = 1'b0, CH_ACTIVE = 1'b1} ch_state_e;
  ch_state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= CH_IDLE;
      count <= '0;
    end else begin
      unique case ({start, finish})
        2'b10: begin
          count <= count + 1'b1;
          state <= CH_ACTIVE;
        end
        2'b01: begin
          count <= count - 1'b1;
          if (count == CNT_W'(1)) state <= CH_IDLE;
        end
        default: ;
      endcase
    end
  end

  assign idle = (state == CH_IDLE);

`ifndef SYNTHESIS
  // A transaction cannot finish on an idle channel.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (finish && !start) |-> (count != '0));
`endif

endmodule
