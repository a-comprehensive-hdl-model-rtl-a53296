// tb_asu: random SLL/SRA/SRL on every word size with random per-word shift
// amounts (including amounts at or above the word size, which wrap), against
// shifts computed with SystemVerilog operators on 64-bit values.
`include "tb/tb_check.svh"
module tb_asu;
  localparam int W = 2048;
  logic [W-1:0] a, b, r;
  logic [3:0] opcode;
  int checks = 0, failures = 0;

  asu #(.LINE_W(W)) dut (.a, .b, .opcode, .r);

  initial begin
    #200000 failures++; `TB_FINISH
  end

  initial begin
    for (int it = 0; it < 48; it++) begin
      int kind, size, nb, bad;
      for (int i = 0; i < W/32; i++) begin
        a[i*32 +: 32] = $urandom;
        b[i*32 +: 32] = $urandom;
      end
      kind = 1 + (it % 3);
      size = (it / 3) % 4;
      opcode = 4'((kind << 2) | size);
      #1;
      nb = 8 << size;
      bad = 0;
      for (int w = 0; w < W / nb; w++) begin
        longint unsigned x, amt, e, m;
        longint sx;
        m   = (nb == 64) ? '1 : ((64'd1 << nb) - 1);
        x   = 0; amt = 0;
        for (int k = 0; k < nb; k++) begin
          x[k] = a[w*nb + k];
          if (k < 6) amt[k] = b[w*nb + k];
        end
        amt = amt % nb;
        case (kind)
          1: e = (x << amt) & m;
          2: begin
               sx = longint'(x << (64 - nb)) >>> (64 - nb);   // sign-extend
               e  = longint'(sx >>> amt) & m;
             end
          default: e = (x >> amt) & m;
        endcase
        for (int k = 0; k < nb; k++) if (r[w*nb + k] != e[k]) begin bad++; break; end
      end
      `TB_CHECK(bad == 0, $sformatf("kind %0d size %0d: %0d bad words", kind, size, bad))
    end
    // opcode 00xx passes the data through
    opcode = 4'b0011; #1;
    `TB_CHECK(r == a, "passthrough")
    `TB_FINISH
  end
endmodule
