// tb_ldu: encodes one instruction of every kind and checks the decoded
// control bundle (unit, operation, register fields, immediate, targets).
`include "tb/tb_check.svh"
module tb_ldu;
  import loon_pkg::*;
  logic [63:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  ldu dut (.instr, .ctrl);

  function automatic logic [63:0] enc(input int op, input bit vec, input int rd, input int rs1,
                                      input int rs2, input int typ, input int sz, input int cnt,
                                      input int imm);
    return {6'(op), vec, 8'(rd), 8'(rs1), 8'(rs2), 2'(typ), 2'(sz), 4'(cnt), 1'b0, 24'(imm)};
  endfunction

  initial begin
    #100000 failures++; `TB_FINISH
  end

  initial begin
    instr = enc(OP_ADD, 1, 7, 8, 9, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.unit == U_ALU && ctrl.alu_op == ALU_ADD && ctrl.vector && ctrl.writes_rd, "ADD")
    `TB_CHECK(ctrl.rd == 7 && ctrl.rs1 == 8 && ctrl.rs2 == 9, "ADD registers")
    instr = enc(OP_SUB, 0, 1, 2, 3, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.unit == U_ALU && ctrl.alu_op == ALU_SUB && !ctrl.vector, "SUB")
    instr = enc(OP_XOR, 0, 1, 2, 3, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.alu_op == ALU_XOR, "XOR")
    instr = enc(OP_SRA, 0, 1, 2, 3, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.unit == U_ASU && ctrl.asu_op[3:2] == 2'b10, "SRA")
    instr = enc(OP_SRL, 0, 1, 2, 3, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.unit == U_ASU && ctrl.asu_op[3:2] == 2'b11, "SRL")
    instr = enc(OP_SLL, 0, 1, 2, 3, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.unit == U_ASU && ctrl.asu_op[3:2] == 2'b01, "SLL")
    instr = enc(OP_MUL, 0, 1, 2, 3, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.unit == U_MUL && ctrl.writes_rd, "MUL")
    instr = enc(OP_REM, 0, 1, 2, 3, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.unit == U_DIV && ctrl.is_rem, "REM")
    instr = enc(OP_LOAD, 0, 4, 5, 0, 2, 1, 0, -16); #1;
    `TB_CHECK(ctrl.is_load && !ctrl.writes_rd && ctrl.new_type == 2 && ctrl.new_size == 1, "LOAD")
    `TB_CHECK(ctrl.imm == 64'hFFFF_FFFF_FFFF_FFF0, "LOAD immediate sign extension")
    instr = enc(OP_STORE, 0, 4, 5, 0, 0, 0, 0, 512); #1;
    `TB_CHECK(ctrl.is_store && ctrl.imm == 512, "STORE")
    instr = enc(OP_FETCH, 0, 9, 0, 0, 0, 0, 15, 4096); #1;
    `TB_CHECK(ctrl.is_fetch && ctrl.count_m1 == 15 && ctrl.rd == 9, "FETCH")
    instr = {6'(OP_SELECT), 1'b0, 8'd0, 8'd3, 8'd0, 7'd0, 13'h0040, 13'h1001}; #1;
    `TB_CHECK(ctrl.is_select && ctrl.rs1 == 3 && ctrl.sel1 == 13'h0040 && ctrl.sel2 == 13'h1001, "SELECT")
    instr = enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.is_halt, "HALT")
    instr = enc(63, 0, 1, 2, 3, 0, 0, 0, 0); #1;
    `TB_CHECK(ctrl.unit == U_NONE && !ctrl.writes_rd && !ctrl.is_load, "unknown opcode is a no-op")
    `TB_FINISH
  end
endmodule
