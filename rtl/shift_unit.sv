// shift_unit: operand alignment at the start of the shift-and-convert stage.
//
// For a scalar operation the element at the DLAR's byte offset is moved to
// byte 0 of the line (a right shift by offset bytes), ready for conversion;
// for a vector operation the whole line is used and passes unchanged.
//
// Interface: line_in, offset (byte offset, the low 8 bits of the DLAR
// address), vector in; line_out out. Combinational. The offset is taken
// modulo the number of bytes in a line.
module shift_unit
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W
) (
  input  logic [LINE_W-1:0] line_in,
  input  logic [7:0]        offset,
  input  logic              vector,
  output logic [LINE_W-1:0] line_out
);
  localparam int unsigned NB = LINE_W / 8;

  always_comb begin
    int unsigned off;
    off = int'(offset) % NB;
    line_out = vector ? line_in : (line_in >> (off * 8));
  end
endmodule
