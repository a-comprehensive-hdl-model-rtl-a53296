// ldu: instruction decoding unit.
//
// Splits a 64-bit instruction into the control bundle (ctrl_t) that travels
// down the pipeline with the instruction. The field layout is this design's
// own (see loon_pkg): opcode [63:58], vector flag [57], rd [56:49], rs1
// [48:41], rs2 [40:33], type [32:31], size [30:29], FETCH count-1 [28:25],
// signed 24-bit immediate [23:0], SELECT targets SEL1 [25:13] and SEL2
// [12:0]. Arithmetic opcodes select the execution unit and its operation;
// unknown opcodes decode as no-ops. Combinational. Most of the bundle is
// plain wiring: register numbers, tags, count, immediate (with its sign
// copies) and branch targets come straight from instruction bits, and the
// valid flag is constant; the pipeline turns it into a bubble where needed.
module ldu
  import loon_pkg::*;
(
  input  logic [63:0] instr,
  output ctrl_t       ctrl
);
  always_comb begin
    logic [5:0] op;
    op = instr[63:58];
    ctrl           = '0;
    ctrl.valid     = 1'b1;
    ctrl.opcode    = OP_NOP;
    ctrl.unit      = U_NONE;
    ctrl.vector    = instr[57];
    ctrl.rd        = instr[56:49];
    ctrl.rs1       = instr[48:41];
    ctrl.rs2       = instr[40:33];
    ctrl.new_type  = instr[32:31];
    ctrl.new_size  = instr[30:29];
    ctrl.count_m1  = instr[28:25];
    ctrl.imm       = {{40{instr[23]}}, instr[23:0]};
    ctrl.sel1      = instr[25:13];
    ctrl.sel2      = instr[12:0];
    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR: begin
        ctrl.opcode = opcode_e'(op);
        ctrl.unit   = U_ALU;
        unique case (op)
          OP_ADD:  ctrl.alu_op = ALU_ADD;
          OP_SUB:  ctrl.alu_op = ALU_SUB;
          OP_AND:  ctrl.alu_op = ALU_AND;
          OP_OR:   ctrl.alu_op = ALU_OR;
          default: ctrl.alu_op = ALU_XOR;
        endcase
        ctrl.writes_rd = 1'b1;
      end
      OP_SLL, OP_SRL, OP_SRA: begin
        ctrl.opcode    = opcode_e'(op);
        ctrl.unit      = U_ASU;
        ctrl.asu_op    = (op == OP_SLL) ? 4'b0100 : (op == OP_SRA) ? 4'b1000 : 4'b1100;
        ctrl.writes_rd = 1'b1;
      end
      OP_MUL: begin
        ctrl.opcode = OP_MUL; ctrl.unit = U_MUL; ctrl.writes_rd = 1'b1;
      end
      OP_DIV, OP_REM: begin
        ctrl.opcode = opcode_e'(op); ctrl.unit = U_DIV; ctrl.writes_rd = 1'b1;
        ctrl.is_rem = (op == OP_REM);
      end
      OP_LOAD:   begin ctrl.opcode = OP_LOAD;   ctrl.is_load   = 1'b1; end
      OP_STORE:  begin ctrl.opcode = OP_STORE;  ctrl.is_store  = 1'b1; end
      OP_FETCH:  begin ctrl.opcode = OP_FETCH;  ctrl.is_fetch  = 1'b1; end
      OP_SELECT: begin ctrl.opcode = OP_SELECT; ctrl.is_select = 1'b1; end
      OP_HALT:   begin ctrl.opcode = OP_HALT;   ctrl.is_halt   = 1'b1; end
      default:   ctrl.opcode = OP_NOP;
    endcase
  end
endmodule
