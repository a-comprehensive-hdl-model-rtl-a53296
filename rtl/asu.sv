// asu: arithmetic shift unit for LAR lines.
//
// Every 64-bit set of the line is shifted independently, as one 64-bit word
// or as 2, 4 or 8 smaller words. Each word passes through six shift levels of
// 32, 16, 8, 4, 2 and 1 bit positions. A level is enabled when its bit of
// the shift amount is set, and a level whose distance matches or exceeds the
// word size is never enabled, so the amount is taken modulo the word size.
// Inside a level each bit position picks one of five inputs: zero, the bits
// from the previous (lower) positions, the bits from the next (higher)
// positions, the word's top bit repeated (arithmetic right shift), or its own
// bit passed through.
//
// Interface: a (data), b (per-word shift amounts: the low bits of the
// matching word of b), opcode (4 bits: 01ss SLL, 10ss SRA, 11ss SRL, with ss
// the size tag; 00ss passes a through) in; r out. Combinational.
//
// The opcode numbering and the six-level structure follow the architecture;
// taking the shift amount from the matching word of the second operand is
// this design's choice.
module asu
  import loon_pkg::*;
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W
) (
  input  logic [LINE_W-1:0] a,
  input  logic [LINE_W-1:0] b,
  input  logic [3:0]        opcode,
  output logic [LINE_W-1:0] r
);
  localparam int unsigned NS = LINE_W / 64;

  // One enabled level: shift a word of the given size by k positions
  function automatic logic [63:0] level(input logic [63:0] v, input logic [1:0] kind,
                                        input logic [1:0] size, input int unsigned k);
    logic [63:0] m, o;
    logic        s;
    m = size_mask(size);
    s = elem_sign(v, size);
    unique case (kind)
      2'b01:   o = (v << k) & m;                                   // previous bits / zero
      2'b10:   o = ((v & m) >> k) | (s ? (m & ~(m >> k)) : 64'd0); // next bits / top bit repeating
      2'b11:   o = (v & m) >> k;                                   // next bits / zero
      default: o = v & m;                                          // passthrough
    endcase
    return o;
  endfunction

  always_comb begin
    logic [1:0]  size, kind;
    int unsigned sbits, nel;
    logic [63:0] sa, sb, res, v, amt;
    size  = opcode[1:0];
    kind  = opcode[3:2];
    sbits = 8 << size;
    nel   = 64 >> (3 + size);
    r     = '0;
    for (int unsigned s = 0; s < NS; s++) begin
      sa  = a[s*64 +: 64];
      sb  = b[s*64 +: 64];
      res = '0;
      for (int unsigned e = 0; e < 8; e++) begin
        v   = '0;
        amt = '0;
        if (e < nel) begin
          v   = (sa >> (e*sbits)) & size_mask(size);
          amt = (sb >> (e*sbits)) & 64'd63;
          for (int lvl = 5; lvl >= 0; lvl--) begin
            if (amt[lvl] && ((32'd1 << lvl) < sbits))
              v = level(v, kind, size, 32'd1 << lvl);
          end
          res = res | ((v & size_mask(size)) << (e*sbits));
        end
      end
      r[s*64 +: 64] = (kind == 2'b00) ? sa : res;
    end
  end
endmodule
