// tb_vdiv: random full-line signed and unsigned divisions for each word
// size, including zero divisors, the worked example 108 / 3 and the most
// negative values. Quotient and remainder are checked against magnitudes
// divided with 64-bit operators and the sign rule (opposite signs give a
// negative quotient and remainder); start-to-done time must be at most
// n + 4 cycles for n-bit words.
`include "tb/tb_check.svh"
module tb_vdiv;
  import loon_pkg::*;
  localparam int W = 2048;
  logic clk = 0, rst_n = 0, start = 0, is_signed = 0;
  logic [W-1:0] a, b, quotient, remainder;
  logic [1:0] size;
  logic busy, done;
  int checks = 0, failures = 0;

  vdiv #(.LINE_W(W)) dut (.clk, .rst_n, .start, .a, .b, .size, .is_signed, .busy, .done, .quotient, .remainder);

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    a = '0; b = '0; size = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 24; it++) begin
      int cyc, nb, bad;
      nb = 0;
      size = 2'(it % 4);
      is_signed = (it / 4) % 2;
      nb = 8 << size;
      for (int i = 0; i < W/32; i++) begin
        a[i*32 +: 32] = $urandom;
        b[i*32 +: 32] = $urandom >> ($urandom % 32);
      end
      // word 0: 108 / 3 ; word 1: divide by zero ; word 2: most negative / -1
      for (int k = 0; k < nb; k++) begin
        a[k] = (k < 8) ? ((8'd108 >> k) & 1) : 1'b0;
        b[k] = (k < 8) ? ((8'd3 >> k) & 1) : 1'b0;
        b[nb + k] = 1'b0;
        a[2*nb + k] = (k == nb - 1);
        b[2*nb + k] = 1'b1;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      `TB_CHECK(cyc <= nb + 4, $sformatf("size %0d took %0d cycles", nb, cyc))
      bad = 0;
      for (int w = 0; w < W / nb; w++) begin
        longint unsigned x, y, m, q, r, ax, ay;
        logic sx, sy;
        x = 0; y = 0;
        m = (nb == 64) ? '1 : ((64'd1 << nb) - 1);
        for (int k = 0; k < nb; k++) begin x[k] = a[w*nb + k]; y[k] = b[w*nb + k]; end
        sx = is_signed && x[nb-1];
        sy = is_signed && y[nb-1];
        ax = sx ? ((-x) & m) : x;
        ay = sy ? ((-y) & m) : y;
        if (ay == 0) begin q = 0; r = ax; end
        else begin q = ax / ay; r = ax % ay; end
        if (sx ^ sy) begin q = (-q) & m; r = (-r) & m; end
        for (int k = 0; k < nb; k++)
          if (quotient[w*nb + k] != q[k] || remainder[w*nb + k] != r[k]) begin bad++; break; end
        if (w == 0 && (q != 36 || r != 0)) bad++;
      end
      `TB_CHECK(bad == 0, $sformatf("size %0d signed %0d: %0d bad words", nb, is_signed, bad))
    end
    `TB_FINISH
  end
endmodule
