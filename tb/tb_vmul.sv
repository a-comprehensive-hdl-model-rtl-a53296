// tb_vmul: random full-line multiplies for each word size; the low half of
// each word's product is compared with a 64-bit multiply, and the time from
// start to done must be 2k-1 cycles for k-byte words (1, 3, 7, 15).
`include "tb/tb_check.svh"
module tb_vmul;
  localparam int W = 2048;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] a, b, result;
  logic [1:0] size;
  logic busy, done;
  int checks = 0, failures = 0;

  vmul #(.LINE_W(W)) dut (.clk, .rst_n, .start, .a, .b, .size, .busy, .done, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    a = '0; b = '0; size = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 16; it++) begin
      int cyc, nb, bad;
      for (int i = 0; i < W/32; i++) begin
        a[i*32 +: 32] = $urandom;
        b[i*32 +: 32] = $urandom;
      end
      if (it == 0) begin a = '1; b = '1; end   // all-ones: largest carries
      size = 2'(it % 4);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      nb = 8 << size;
      `TB_CHECK(cyc == 2 * (1 << size) - 1, $sformatf("size %0d took %0d cycles", nb, cyc))
      bad = 0;
      for (int w = 0; w < W / nb; w++) begin
        longint unsigned x, y, e, m;
        x = 0; y = 0;
        m = (nb == 64) ? '1 : ((64'd1 << nb) - 1);
        for (int k = 0; k < nb; k++) begin x[k] = a[w*nb + k]; y[k] = b[w*nb + k]; end
        e = (x * y) & m;
        for (int k = 0; k < nb; k++) if (result[w*nb + k] != e[k]) begin bad++; break; end
      end
      `TB_CHECK(bad == 0, $sformatf("size %0d: %0d bad words", nb, bad))
    end
    `TB_FINISH
  end
endmodule
