// wb_shift_mask: writeback shift-mask unit.
//
// A vector result replaces the destination line. A scalar result (element 0
// of the result line, of the destination size) is shifted to the
// destination's byte offset and latched over the existing line, leaving every
// other byte as it was. Shifting and merging happen in the same cycle.
//
// Interface: result, old_line (current contents of the destination line),
// offset (destination byte offset), size (destination size tag), vector in;
// new_line out. Combinational. Bytes that would fall past the end of the line
// are dropped.
module wb_shift_mask
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W
) (
  input  logic [LINE_W-1:0] result,
  input  logic [LINE_W-1:0] old_line,
  input  logic [7:0]        offset,
  input  logic [1:0]        size,
  input  logic              vector,
  output logic [LINE_W-1:0] new_line
);
  localparam int unsigned NB = LINE_W / 8;

  always_comb begin
    int unsigned off, nb;
    off = int'(offset) % NB;
    nb  = 1 << size;
    new_line = old_line;
    if (vector) begin
      new_line = result;
    end else begin
      for (int unsigned j = 0; j < NB; j++)
        if (j >= off && j < off + nb)
          new_line[j*8 +: 8] = result[(j-off)*8 +: 8];
    end
  end
endmodule
