// cb_alu: carry-break vector ALU.
//
// The line is cut into 8-bit ALU slices. Inside every 64-bit group the carry
// into slice i (i = 1..7) comes from a small multiplexer that either passes
// the carry out of slice i-1 or breaks the chain and injects the word's
// initial carry (1 for subtract, 0 for add). Three control lines decide where
// the chain breaks:
//   CB0 (between slices 0|1, 2|3, 4|5, 6|7) breaks for 8-bit words,
//   CB1 (between 1|2, 5|6) breaks for 8- and 16-bit words,
//   CB2 (between 3|4) breaks for 8-, 16- and 32-bit words.
// Slice 0 of every group always starts a new word. Subtraction inverts B and
// injects a carry of 1 at each word start. Logic operations ignore the carry.
//
// Interface: a, b, op (alu_op_e), size (size tag) in; r and the carry out of
// every byte slice (cout; for a subtract, cout of a word's top byte = 1 means
// no borrow) out. Purely combinational.
//
// The slice count, the three break controls and their positions follow the
// architecture's ALU figure; the slices here are plain 8-bit adders and the
// set of logic operations (and, or, xor) is this design's choice.
module cb_alu
  import loon_pkg::*;
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W
) (
  input  logic [LINE_W-1:0]   a,
  input  logic [LINE_W-1:0]   b,
  input  logic [2:0]          op,
  input  logic [1:0]          size,
  output logic [LINE_W-1:0]   r,
  output logic [LINE_W/8-1:0] cout
);
  localparam int unsigned NB = LINE_W / 8;

  logic sub;
  logic cb0, cb1, cb2;
  logic [NB-1:0] cin;
  logic [LINE_W-1:0] bx;

  assign sub = (op == ALU_SUB);
  assign cb0 = (size == SZ_8);
  assign cb1 = (size == SZ_8) || (size == SZ_16);
  assign cb2 = (size != SZ_64);
  assign bx  = sub ? ~b : b;

  always_comb begin
    logic [8:0] s;
    r    = '0;
    cout = '0;
    cin  = '0;
    for (int unsigned i = 0; i < NB; i++) begin
      logic brk;
      unique case (i % 8)
        0:       brk = 1'b1;
        1, 3, 5, 7: brk = cb0;
        2, 6:    brk = cb1;
        default: brk = cb2;   // 4
      endcase
      if (brk) cin[i] = sub;
      else     cin[i] = cout[i-1];
      s = {1'b0, a[i*8 +: 8]} + {1'b0, bx[i*8 +: 8]} + {8'd0, cin[i]};
      cout[i] = s[8];
      unique case (op)
        ALU_ADD, ALU_SUB: r[i*8 +: 8] = s[7:0];
        ALU_AND:          r[i*8 +: 8] = a[i*8 +: 8] & b[i*8 +: 8];
        ALU_OR:           r[i*8 +: 8] = a[i*8 +: 8] | b[i*8 +: 8];
        default:          r[i*8 +: 8] = a[i*8 +: 8] ^ b[i*8 +: 8];
      endcase
    end
  end
endmodule
