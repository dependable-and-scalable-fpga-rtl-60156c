// tb_axi_mem: behavioural AXI4 memory for the testbenches (a stand-in for the
// off-chip / unified memory, which is outside the design).
// One write and one read burst at a time, 32-bit data, INCR bursts, word
// addressed by addr[2+:$clog2(WORDS)]. With STALL = 1 the ready/valid outputs
// are withheld on random cycles to exercise the masters' handshakes.
// Counters report how many bursts were served.
module tb_axi_mem #(
  parameter int unsigned WORDS = 4096,
  parameter bit          STALL = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic        bvalid,
  input  logic        bready,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready
);
  localparam int unsigned IW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  int unsigned wr_bursts, rd_bursts;

  typedef enum logic [1:0] {IDLE, DATA, RESP} st_e;
  st_e         ws, rs;
  logic [31:0] wa, ra;
  logic [7:0]  rleft;
  logic        go_w, go_r, go_a, go_b;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    go_w <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
    go_r <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
    go_a <= STALL ? ($urandom_range(0, 1) != 0) : 1'b1;
    go_b <= STALL ? ($urandom_range(0, 1) != 0) : 1'b1;
  end

  assign awready = (ws == IDLE) && go_a;
  assign wready  = (ws == DATA) && go_w;
  assign bvalid  = (ws == RESP) && go_b;
  assign arready = (rs == IDLE) && go_a;
  assign rvalid  = (rs == DATA) && go_r;
  assign rdata   = mem[ra[2+:IW]];
  assign rlast   = (rleft == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ws <= IDLE; rs <= IDLE; wa <= '0; ra <= '0; rleft <= '0;
      wr_bursts <= 0; rd_bursts <= 0;
    end else begin
      unique case (ws)
        IDLE: if (awvalid && awready) begin wa <= awaddr; ws <= DATA; end
        DATA: if (wvalid && wready) begin
          mem[wa[2+:IW]] <= wdata;
          wa <= wa + 4;
          if (wlast) ws <= RESP;
        end
        RESP: if (bready && bvalid) begin ws <= IDLE; wr_bursts <= wr_bursts + 1; end
        default: ws <= IDLE;
      endcase
      unique case (rs)
        IDLE: if (arvalid && arready) begin ra <= araddr; rleft <= arlen; rs <= DATA; end
        DATA: if (rvalid && rready) begin
          ra <= ra + 4;
          rleft <= rleft - 1;
          if (rleft == 0) begin rs <= IDLE; rd_bursts <= rd_bursts + 1; end
        end
        default: rs <= IDLE;
      endcase
    end
  end
endmodule
