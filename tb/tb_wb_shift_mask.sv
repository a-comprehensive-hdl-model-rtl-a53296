// tb_wb_shift_mask: a scalar result of each size written at random offsets
// must replace exactly those bytes of the old line; a vector result replaces
// the whole line.
`include "tb/tb_check.svh"
module tb_wb_shift_mask;
  localparam int W = 2048;
  logic [W-1:0] result, old_line, new_line;
  logic [7:0] offset;
  logic [1:0] size;
  logic vector;
  int checks = 0, failures = 0;

  wb_shift_mask #(.LINE_W(W)) dut (.result, .old_line, .offset, .size, .vector, .new_line);

  initial begin
    #200000 failures++; `TB_FINISH
  end

  initial begin
    for (int i = 0; i < W/32; i++) begin
      result[i*32 +: 32] = $urandom;
      old_line[i*32 +: 32] = $urandom;
    end
    for (int it = 0; it < 40; it++) begin
      logic [W-1:0] exp;
      int nb;
      size = 2'(it % 4);
      nb = 1 << size;
      offset = 8'(($urandom % (256 / nb)) * nb);
      vector = 1'b0; #1;
      exp = old_line;
      for (int j = 0; j < nb; j++) exp[(offset + j)*8 +: 8] = result[j*8 +: 8];
      `TB_CHECK(new_line == exp, $sformatf("scalar size %0d offset %0d", nb, offset))
    end
    vector = 1'b1; #1;
    `TB_CHECK(new_line == result, "vector")
    `TB_FINISH
  end
endmodule
