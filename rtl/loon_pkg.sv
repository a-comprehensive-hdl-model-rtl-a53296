// loon_pkg: types and constants shared by the LOON line-associative-register
// processor.
//
// A LAR (line associative register) is a 2048-bit line of data tagged with a
// 64-bit memory address and, for data LARs, a 2-bit type and a 2-bit size
// tag. Address bits [63:8] name the 256-byte memory block held by the LAR and
// are the only bits used for associative matching; bits [7:0] are a byte
// offset inside the line that scalar operations use. The type and size tag
// encodings follow the LAR layout of the architecture. The 64-bit instruction
// encoding below is this design's own: the instruction set the processor
// targets (LARK) defines the operations but its bit layout is not reproduced
// here.
package loon_pkg;

  localparam int unsigned LAR_LINE_W = 2048;    // bits per LAR line
  localparam int unsigned ADDR_W   = 64;       // memory address width
  localparam int unsigned INSTR_W  = 64;       // LARK instructions are 64 bits
  localparam int unsigned PC_W     = 13;       // [12:5] ILAR, [4:0] offset
  localparam int unsigned BLOCK_BYTES = 256;   // one line = one memory block

  // Type tag (2 bits)
  typedef enum logic [1:0] {
    T_RSVD  = 2'b00,
    T_UINT  = 2'b01,
    T_SINT  = 2'b10,
    T_FLOAT = 2'b11
  } lar_type_e;

  // Size tag (2 bits): element width = 8 << size
  typedef enum logic [1:0] {
    SZ_8  = 2'b00,
    SZ_16 = 2'b01,
    SZ_32 = 2'b10,
    SZ_64 = 2'b11
  } lar_size_e;

  // Carry-break ALU operations
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4
  } alu_op_e;

  // Instruction opcodes (this design's encoding)
  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    OP_ADD    = 6'd1,
    OP_SUB    = 6'd2,
    OP_AND    = 6'd3,
    OP_OR     = 6'd4,
    OP_XOR    = 6'd5,
    OP_SLL    = 6'd6,
    OP_SRL    = 6'd7,
    OP_SRA    = 6'd8,
    OP_MUL    = 6'd9,
    OP_DIV    = 6'd10,
    OP_REM    = 6'd11,
    OP_LOAD   = 6'd12,
    OP_STORE  = 6'd13,
    OP_FETCH  = 6'd14,
    OP_SELECT = 6'd15,
    OP_HALT   = 6'd16
  } opcode_e;

  // Execution unit that produces the result
  typedef enum logic [2:0] {
    U_NONE = 3'd0,
    U_ALU  = 3'd1,
    U_ASU  = 3'd2,
    U_MUL  = 3'd3,
    U_DIV  = 3'd4
  } unit_e;

  // Instruction fields:
  //   [63:58] opcode   [57] vector   [56:49] rd   [48:41] rs1   [40:33] rs2
  //   [32:31] type     [30:29] size  [28:25] FETCH block count - 1
  //   [23:0]  signed immediate (LOAD/STORE/FETCH address offset)
  //   [25:13] SEL1 target, [12:0] SEL2 target (SELECT)
  typedef struct packed {
    logic             valid;      // a real instruction (not a bubble)
    opcode_e          opcode;
    unit_e            unit;
    logic [2:0]       alu_op;
    logic [3:0]       asu_op;     // size filled in later from the tags
    logic             is_rem;     // DIV unit: take remainder
    logic             vector;
    logic [7:0]       rd;
    logic [7:0]       rs1;
    logic [7:0]       rs2;
    logic [1:0]       new_type;
    logic [1:0]       new_size;
    logic [3:0]       count_m1;
    logic [63:0]      imm;
    logic [PC_W-1:0]  sel1;
    logic [PC_W-1:0]  sel2;
    logic             writes_rd;  // result written to the rd line in WB
    logic             is_load;
    logic             is_store;
    logic             is_fetch;
    logic             is_select;
    logic             is_halt;
  } ctrl_t;

  // One-cycle event flags brought out of the processor for observation
  typedef struct packed {
    logic ilar_stall;      // IF waits on a pending or unfilled ILAR
    logic pend_stall;      // LDF waits on a pending DLAR line
    logic dlq_stall;       // LOAD (or STORE into a filling line) waits for the data load queue
    logic nofree_stall;    // LOAD/STORE waits for a free line
    logic fq_stall;        // FETCH waits for the fetch queue
    logic ex_stall;        // multi-cycle multiply/divide in progress
    logic branch_sel1;     // SELECT took SEL1
    logic branch_sel2;     // SELECT took SEL2
    logic load_alias;      // LOAD matched a line already held by a DLAR
    logic load_miss;       // LOAD allocated a line and went to memory
    logic store_new;       // STORE copied a line to a fresh line
    logic store_alias;     // STORE copied a line into an aliased line
    logic dlq_preempt;     // DLQ write pre-empted by the WB stage
    logic wb_write;        // WB wrote a line
    logic fetch_issue;     // FETCH handed to the fetch queue
    logic prio_write;      // unreferenced dirty line waiting for writeback
    logic retire;          // an instruction left WB
  } events_t;

  // DLAR meta data entry
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [1:0]        typ;
    logic [1:0]        size;
  } meta_t;

  // Element width in bits for a size tag
  function automatic int unsigned elem_bits(input logic [1:0] size);
    return 8 << size;
  endfunction

  // Mask of the low (8<<size) bits
  function automatic logic [63:0] size_mask(input logic [1:0] size);
    unique case (size)
      2'd0: return 64'h0000_0000_0000_00FF;
      2'd1: return 64'h0000_0000_0000_FFFF;
      2'd2: return 64'h0000_0000_FFFF_FFFF;
      default: return '1;
    endcase
  endfunction

  // Sign bit of a (8<<size)-bit value held in 64 bits
  function automatic logic elem_sign(input logic [63:0] v, input logic [1:0] size);
    unique case (size)
      2'd0: return v[7];
      2'd1: return v[15];
      2'd2: return v[31];
      default: return v[63];
    endcase
  endfunction

endpackage
