// tb_cpr_sw_dma: AXI4-Lite register access. Writes of every command code must
// pulse cmd_valid with that code, the address register must read back, the
// status and the word count must read as driven.
module tb_cpr_sw_dma;
  import cpr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [31:0] s_wdata = 0, s_rdata, cp_addr;
  logic [1:0] s_bresp, s_rresp;
  cpr_cmd_e cmd; logic cmd_valid; logic [7:0] status = 8'h00;
  int checks = 0, failures = 0, pulses = 0;
  cpr_cmd_e last_cmd;

  cpr_sw_dma #(.AW(4), .WORDS(32'd25)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cmd_valid) begin pulses++; last_cmd = cmd; end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wvalid = 1;
    do @(posedge clk); while (!s_awready);
    @(negedge clk); s_awvalid = 0; s_wvalid = 0; s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    @(posedge clk); @(negedge clk); s_bready = 0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0; s_rready = 1;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(posedge clk); @(negedge clk); s_rready = 0;
  endtask

  logic [31:0] v;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 1; c <= 4; c++) begin
      wr(4'h0, 32'(c));
      chk(pulses == c && last_cmd == cpr_cmd_e'(c), $sformatf("command pulse %0d %0d %0d", c, pulses, last_cmd));
    end
    for (int i = 0; i < 5; i++) begin
      logic [31:0] a; a = $urandom;
      wr(4'h8, a); rd(4'h8, v); chk(v == a, "address register");
      status = 8'($urandom); rd(4'h4, v); chk(v == {24'd0, status}, "status register");
    end
    rd(4'hC, v); chk(v == 32'd25, "word count");
    chk(pulses == 4, "address writes do not pulse commands");
    chk(cp_addr != 0, "address output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
