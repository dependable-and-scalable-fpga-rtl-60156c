// cpr_pipe_mul: pipelined multiplier standing for a dedicated DSP block:
// p = a * b (low 32 bits) with a valid bit, LAT register stages, advancing
// only when the clock enable ce is high. Its pipeline registers are inside
// the dedicated block and cannot be read or written by checkpoint logic; the
// output is a LAT-cycle delayed response to the inputs. The valid stages
// clear on reset, the data stages do not (as in a DSP slice). LAT = 4
// matches the four-stage multiplier the checkpointing method uses as its
// example of a delayed dedicated block.
module cpr_pipe_mul #(
  parameter int unsigned LAT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        in_valid,
  output logic [31:0] p,
  output logic        p_valid
);

  logic [31:0]    stage [LAT];
  logic [LAT-1:0] v;

  always_ff @(posedge clk) begin
    if (ce) begin
      stage[0] <= a * b;
      for (int unsigned i = 1; i < LAT; i++) stage[i] <= stage[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  v <= '0;
    else if (ce) v <= {v[LAT-2:0], in_valid};
  end

  assign p       = stage[LAT-1];
  assign p_valid = v[LAT-1];

endmodule
