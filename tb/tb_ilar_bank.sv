// tb_ilar_bank: instruction LAR fill, pending marks, the instruction read
// for a PC, and the one-to-one refresh: a fill of a block that another ILAR
// already holds also updates that ILAR.
`include "tb/tb_check.svh"
module tb_ilar_bank;
  import loon_pkg::*;
  localparam int W = 2048;
  logic clk = 0, rst_n = 0, pending = 0, write = 0;
  logic [PC_W-1:0] pc;
  logic [63:0] instr, line_addr;
  logic instr_ok;
  logic [7:0] p_ptr, line_ptr;
  logic [W-1:0] line_data, la, lb, lc;
  int checks = 0, failures = 0;

  ilar_bank #(.LINE_W(W), .NUM_ILAR(256)) dut (.*);

  always #5 clk = ~clk;

  task automatic fill(input int ilar, input logic [63:0] a, input logic [W-1:0] d);
    @(negedge clk); write = 1; line_ptr = 8'(ilar); line_addr = a; line_data = d;
    @(negedge clk); write = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    for (int k = 0; k < W/32; k++) begin
      la[k*32 +: 32] = $urandom; lb[k*32 +: 32] = $urandom; lc[k*32 +: 32] = $urandom;
    end
    pc = '0; p_ptr = 0; line_ptr = 0; line_addr = 0; line_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    pc = {8'd3, 5'd0};
    #1 `TB_CHECK(!instr_ok, "unfilled ILAR not ready")
    @(negedge clk); pending = 1; p_ptr = 3;
    @(negedge clk); pending = 0;
    fill(3, 64'h4000, la);
    pc = {8'd3, 5'd7};
    #1 `TB_CHECK(instr_ok && instr == la[7*64 +: 64], "ILAR 3 slot 7")
    pc = {8'd3, 5'd31};
    #1 `TB_CHECK(instr == la[31*64 +: 64], "ILAR 3 slot 31")
    // pending blocks the read until the fill lands
    @(negedge clk); pending = 1; p_ptr = 9;
    @(negedge clk); pending = 0;
    pc = {8'd9, 5'd0};
    #1 `TB_CHECK(!instr_ok, "pending ILAR not ready")
    fill(9, 64'h5000, lb);
    #1 `TB_CHECK(instr_ok && instr == lb[63:0], "ILAR 9 filled")
    // refresh: a new copy of block 0x4000 into ILAR 200 also updates ILAR 3
    fill(200, 64'h4000, lc);
    pc = {8'd3, 5'd2};
    #1 `TB_CHECK(instr == lc[2*64 +: 64], "aliasing ILAR 3 refreshed")
    pc = {8'd200, 5'd2};
    #1 `TB_CHECK(instr_ok && instr == lc[2*64 +: 64], "ILAR 200 filled")
    pc = {8'd9, 5'd2};
    #1 `TB_CHECK(instr == lb[2*64 +: 64], "ILAR 9 untouched")
    `TB_FINISH
  end
endmodule
