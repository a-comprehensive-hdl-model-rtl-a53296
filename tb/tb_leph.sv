// tb_leph: every one of the 16 (source size, destination size) pairs, signed
// and unsigned, on a random line. Expected output is built element by
// element: truncate or zero/sign-extend element k of the input, and zero the
// bytes past the last converted element. A few byte targets of the 64-bit
// slice conversion table are checked literally as well.
`include "tb/tb_check.svh"
module tb_leph;
  localparam int W = 2048;
  logic [W-1:0] in_line, out_line;
  logic [1:0] src_size, dst_size;
  logic src_signed;
  int checks = 0, failures = 0;

  leph #(.LINE_W(W)) dut (.in_line, .src_size, .dst_size, .src_signed, .out_line);

  initial begin
    #200000 failures++; `TB_FINISH
  end

  initial begin
    for (int i = 0; i < W/8; i++) in_line[i*8 +: 8] = 8'(i * 7 + 3) ^ ((i % 3 == 0) ? 8'h80 : 8'h00);
    for (int s = 0; s < 4; s++) for (int d = 0; d < 4; d++) for (int sg = 0; sg < 2; sg++) begin
      logic [W-1:0] exp;
      int si, so, n;
      src_size = 2'(s); dst_size = 2'(d); src_signed = sg[0];
      #1;
      si = 8 << s; so = 8 << d;
      n  = (W / si < W / so) ? W / si : W / so;
      exp = '0;
      for (int k = 0; k < n; k++) begin
        logic sign;
        sign = in_line[k*si + si - 1];
        for (int bit_ = 0; bit_ < so; bit_++)
          exp[k*so + bit_] = (bit_ < si) ? in_line[k*si + bit_] : (src_signed && sign);
      end
      `TB_CHECK(out_line == exp, $sformatf("conversion %0d->%0d signed=%0d", si, so, sg))
    end
    // literal table rows: 64:32 -> bytes 0 1 2 3 8 9 10 11 ; 8:16S -> 0 SE0 1 SE1
    src_size = 2'd3; dst_size = 2'd2; src_signed = 1'b0; #1;
    `TB_CHECK(out_line[63:32] == in_line[95:64], "64:32 bytes 4..7 come from bytes 8..11")
    src_size = 2'd0; dst_size = 2'd1; src_signed = 1'b1; #1;
    `TB_CHECK(out_line[15:8] == {8{in_line[7]}} && out_line[23:16] == in_line[15:8], "8:16S bytes 1,2")
    `TB_FINISH
  end
endmodule
