// branch_unit: scalar extraction, zero test, branch multiplexer and memory
// address adder of the line-data-fetch stage.
//
// Shift & Mask takes the element of the given size at the DLAR's byte
// offset (zero-extended to 64 bits). Zero? tests it. The branch multiplexer
// picks the SELECT instruction's first target (SEL1) when the value is
// non-zero and its second target (SEL2) when it is zero. The memory address
// adder adds the value to the instruction's sign-extended immediate to form
// the address of a LOAD, STORE or FETCH.
//
// Interface: line, offset, size, sel1, sel2, imm in; scalar, zero, next_pc,
// mem_addr out. Combinational. The mapping of zero/non-zero to SEL2/SEL1 and
// the adder's operands are this design's choice.
module branch_unit
  import loon_pkg::*;
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W
) (
  input  logic [LINE_W-1:0] line,
  input  logic [7:0]        offset,
  input  logic [1:0]        size,
  input  logic [PC_W-1:0]   sel1,
  input  logic [PC_W-1:0]   sel2,
  input  logic [63:0]       imm,
  output logic [63:0]       scalar,
  output logic              zero,
  output logic [PC_W-1:0]   next_pc,
  output logic [63:0]       mem_addr
);
  localparam int unsigned NB = LINE_W / 8;

  always_comb begin
    logic [LINE_W-1:0] sh;
    int unsigned off;
    off    = int'(offset) % NB;
    sh     = line >> (off * 8);
    scalar = sh[63:0] & size_mask(size);
  end

  assign zero     = (scalar == 64'd0);
  assign next_pc  = zero ? sel2 : sel1;
  assign mem_addr = scalar + imm;
endmodule
