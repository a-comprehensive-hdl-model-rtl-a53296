// tb_shift_unit: scalar alignment for random offsets, and vector passthrough.
`include "tb/tb_check.svh"
module tb_shift_unit;
  localparam int W = 2048;
  logic [W-1:0] line_in, line_out;
  logic [7:0] offset;
  logic vector;
  int checks = 0, failures = 0;

  shift_unit #(.LINE_W(W)) dut (.line_in, .offset, .vector, .line_out);

  initial begin
    #200000 failures++; `TB_FINISH
  end

  initial begin
    for (int i = 0; i < W/32; i++) line_in[i*32 +: 32] = $urandom;
    for (int it = 0; it < 30; it++) begin
      offset = (it == 0) ? 8'd255 : 8'($urandom);
      vector = 1'b0; #1;
      begin
        logic ok;
        ok = 1;
        for (int j = 0; j < W/8 - offset; j++)
          if (line_out[j*8 +: 8] != line_in[(j + offset)*8 +: 8]) ok = 0;
        `TB_CHECK(ok, $sformatf("scalar offset %0d", offset))
      end
      vector = 1'b1; #1;
      `TB_CHECK(line_out == line_in, "vector passthrough")
    end
    `TB_FINISH
  end
endmodule
