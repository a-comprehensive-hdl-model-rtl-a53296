// tb_cb_alu: random add/sub/and/or/xor on full 2048-bit lines for every word
// size, compared word by word with 64-bit arithmetic truncated to the word
// size; also checks the carry out of each word's top byte.
`include "tb/tb_check.svh"
module tb_cb_alu;
  import loon_pkg::*;
  localparam int W = 2048;
  logic [W-1:0] a, b, r;
  logic [W/8-1:0] cout;
  logic [2:0] op;
  logic [1:0] size;
  int checks = 0, failures = 0;

  cb_alu #(.LINE_W(W)) dut (.a, .b, .op, .size, .r, .cout);

  function automatic logic [63:0] el(input logic [W-1:0] l, input logic [1:0] s, input int w);
    logic [63:0] v = '0;
    case (s)
      0: v[7:0] = l[w*8 +: 8];
      1: v[15:0] = l[w*16 +: 16];
      2: v[31:0] = l[w*32 +: 32];
      default: v = l[w*64 +: 64];
    endcase
    return v;
  endfunction

  initial begin
    #200000 failures++; `TB_FINISH
  end

  initial begin
    for (int it = 0; it < 40; it++) begin
      for (int i = 0; i < W/32; i++) begin
        a[i*32 +: 32] = $urandom;
        b[i*32 +: 32] = $urandom;
      end
      if (it % 5 == 0) b = ~a;   // long carry chains
      op = 3'(it % 5);
      size = 2'((it / 5) % 4);
      #1;
      begin
        int nb, bad;
        nb = 8 << size;
        bad = 0;
        for (int w = 0; w < W / nb; w++) begin
          logic [63:0] x, y, e, m;
          logic [64:0] full;
          logic c;
          m = size_mask(size);
          x = el(a, size, w); y = el(b, size, w);
          case (op)
            ALU_ADD: e = (x + y) & m;
            ALU_SUB: e = (x - y) & m;
            ALU_AND: e = x & y;
            ALU_OR:  e = x | y;
            default: e = x ^ y;
          endcase
          if (el(r, size, w) != e) bad++;
          if (op == ALU_ADD || op == ALU_SUB) begin
            full = (op == ALU_ADD) ? ({1'b0, x} + {1'b0, y}) : ({1'b0, x} + {1'b0, ~y & m} + 65'd1);
            case (size)
              0: c = full[8]; 1: c = full[16]; 2: c = full[32]; default: c = full[64];
            endcase
            if (cout[(w + 1) * (nb / 8) - 1] != c) bad++;
          end
        end
        `TB_CHECK(bad == 0, $sformatf("op %0d size %0d: %0d word mismatches", op, size, bad))
      end
    end
    `TB_FINISH
  end
endmodule
