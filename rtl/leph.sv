// leph: polymorphic conversion hardware for LAR lines.
//
// Converts every element of a line from its stored size to the operation
// size. Each output byte is a multiplexer that selects one input byte, a
// zero byte, or a sign byte (the top bit of a selected input byte repeated).
// For output byte j with Bo bytes per output element and Bi bytes per input
// element, element k = j / Bo and byte m = j % Bo:
//   down-conversion (Bi >= Bo): source byte k*Bi + m (simple truncation, no
//     saturation);
//   up-conversion (Bi < Bo): source byte k*Bi + m while m < Bi, above that
//     the sign byte of byte k*Bi + Bi - 1 (signed) or zero (unsigned).
// Source bytes past the end of the line give zero, so the tail of a
// down-converted line is padded with zeroes. These are the byte targets of
// the 18 integer conversions plus passthrough.
//
// Interface: in_line, src_size, dst_size (size tags), src_signed in; out_line
// out. Combinational. Floating-point conversion is not implemented.
module leph
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W
) (
  input  logic [LINE_W-1:0] in_line,
  input  logic [1:0]        src_size,
  input  logic [1:0]        dst_size,
  input  logic              src_signed,
  output logic [LINE_W-1:0] out_line
);
  localparam int unsigned NB = LINE_W / 8;

  always_comb begin
    int unsigned bo, bi;
    bo = 1 << dst_size;
    bi = 1 << src_size;
    out_line = '0;
    for (int unsigned j = 0; j < NB; j++) begin
      int unsigned k, m, src;
      k = j / bo;
      m = j % bo;
      if (m < bi) begin
        src = k * bi + m;
        if (src < NB) out_line[j*8 +: 8] = in_line[src*8 +: 8];
      end else begin
        src = k * bi + bi - 1;
        if (src < NB && src_signed) out_line[j*8 +: 8] = {8{in_line[src*8 + 7]}};
      end
    end
  end
endmodule
