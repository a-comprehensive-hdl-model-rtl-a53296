// tb_branch_unit: scalar extraction at an offset and size, the zero test,
// the SEL1/SEL2 choice and the address sum.
`include "tb/tb_check.svh"
module tb_branch_unit;
  localparam int W = 2048;
  logic [W-1:0] line;
  logic [7:0] offset;
  logic [1:0] size;
  logic [12:0] sel1, sel2, next_pc;
  logic [63:0] imm, scalar, mem_addr;
  logic zero;
  int checks = 0, failures = 0;

  branch_unit #(.LINE_W(W)) dut (.line, .offset, .size, .sel1, .sel2, .imm, .scalar, .zero, .next_pc, .mem_addr);

  initial begin
    #200000 failures++; `TB_FINISH
  end

  initial begin
    sel1 = 13'h0123; sel2 = 13'h1abc;
    for (int it = 0; it < 40; it++) begin
      logic [63:0] e;
      for (int i = 0; i < W/32; i++) line[i*32 +: 32] = (it % 4 == 3) ? 32'd0 : $urandom;
      size = 2'(it % 4);
      offset = 8'($urandom % 249);
      imm = {{32{1'b0}}, $urandom};
      #1;
      e = 0;
      for (int j = 0; j < (1 << size); j++) e[j*8 +: 8] = line[(offset + j)*8 +: 8];
      `TB_CHECK(scalar == e, "scalar")
      `TB_CHECK(zero == (e == 0), "zero")
      `TB_CHECK(next_pc == ((e == 0) ? sel2 : sel1), "branch mux")
      `TB_CHECK(mem_addr == e + imm, "address adder")
    end
    `TB_FINISH
  end
endmodule
