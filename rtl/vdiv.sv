// vdiv: multi-cycle vector divider (shift and subtract).
//
// All words of the line (8, 16, 32 or 64 bits) are divided in parallel:
//   NORM   signed words are replaced by their magnitudes and the sign of the
//          result is noted (dividend and divisor of opposite signs give a
//          negative quotient and a negative remainder, like signs positive);
//   ALIGN  priority encoders find the highest set bit of each dividend and
//          divisor; their difference d is the word's shift count, the
//          divisor is shifted left by d and d+1 subtract steps are loaded
//          into the word's down counter (0 steps when the divisor is larger
//          or zero);
//   SUB    each word with steps left subtracts the aligned divisor from the
//          current dividend; when the result is not negative the dividend is
//          replaced and the quotient bit at the current shift is set. The
//          divisor then shifts right by one and the counter counts down.
//          SUB repeats until every counter is zero;
//   FIN    quotient and remainder are negated where the sign rule says so.
// The start cycle performs NORM, so an n-bit division takes at most n + 3
// cycles from start to done (within the n + 4 bound of the architecture).
// Division by zero gives quotient 0 and the dividend as remainder.
//
// Interface: start (one cycle, samples a = dividend, b = divisor, size,
// is_signed), done (one-cycle pulse), quotient and remainder (held until the
// next start), busy. Each word is processed in a 64-bit lane here rather
// than in line-wide vector ALUs.
module vdiv
  import loon_pkg::*;
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LINE_W-1:0] a,
  input  logic [LINE_W-1:0] b,
  input  logic [1:0]        size,
  input  logic              is_signed,
  output logic              busy,
  output logic              done,
  output logic [LINE_W-1:0] quotient,
  output logic [LINE_W-1:0] remainder
);
  localparam int unsigned NW = LINE_W / 8;   // most words in a line (8-bit)

  typedef enum logic [1:0] {S_IDLE, S_ALIGN, S_SUB, S_FIN} state_e;

  state_e       state;
  logic [1:0]   size_q;
  logic [63:0]  rem_q [NW];
  logic [63:0]  dv_q  [NW];
  logic [63:0]  q_q   [NW];
  logic [6:0]   cnt_q [NW];
  logic         neg_q [NW];
  logic         any_left;

  function automatic int unsigned nwords(input logic [1:0] sz);
    return LINE_W / (8 << sz);
  endfunction

  function automatic logic [63:0] word_of(input logic [LINE_W-1:0] line,
                                          input logic [1:0] sz, input int unsigned w);
    logic [63:0] v;
    v = '0;
    unique case (sz)
      2'd0: v[7:0]  = line[w*8  +: 8];
      2'd1: v[15:0] = line[w*16 +: 16];
      2'd2: v[31:0] = line[w*32 +: 32];
      default: v    = line[w*64 +: 64];
    endcase
    return v;
  endfunction

  // index of the highest set bit (0 when v == 0)
  function automatic int unsigned msb(input logic [63:0] v);
    int unsigned m;
    m = 0;
    for (int unsigned i = 0; i < 64; i++) if (v[i]) m = i;
    return m;
  endfunction

  always_comb begin
    any_left = 1'b0;
    for (int unsigned w = 0; w < NW; w++) if (cnt_q[w] > 7'd1) any_left = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      busy   <= 1'b0;
      done   <= 1'b0;
      size_q <= '0;
      for (int w = 0; w < NW; w++) begin
        rem_q[w] <= '0; dv_q[w] <= '0; q_q[w] <= '0; cnt_q[w] <= '0; neg_q[w] <= 1'b0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          // NORM
          size_q <= size;
          for (int unsigned w = 0; w < NW; w++) begin
            logic [63:0] x, y, m;
            logic sx, sy;
            m  = size_mask(size);
            x  = word_of(a, size, w);
            y  = word_of(b, size, w);
            sx = is_signed && elem_sign(x, size);
            sy = is_signed && elem_sign(y, size);
            rem_q[w] <= sx ? ((-x) & m) : x;
            dv_q[w]  <= sy ? ((-y) & m) : y;
            neg_q[w] <= sx ^ sy;
            q_q[w]   <= '0;
            cnt_q[w] <= '0;
          end
          busy  <= 1'b1;
          state <= S_ALIGN;
        end
        S_ALIGN: begin
          for (int unsigned w = 0; w < NW; w++) begin
            int unsigned ma, mb;
            ma = msb(rem_q[w]);
            mb = msb(dv_q[w]);
            if (w < nwords(size_q) && dv_q[w] != 0 && rem_q[w] != 0 && ma >= mb) begin
              dv_q[w]  <= dv_q[w] << (ma - mb);
              cnt_q[w] <= 7'(ma - mb + 1);
            end else begin
              cnt_q[w] <= '0;
            end
          end
          state <= S_SUB;
        end
        S_SUB: begin
          for (int unsigned w = 0; w < NW; w++) begin
            if (cnt_q[w] != 0) begin
              if (rem_q[w] >= dv_q[w]) begin
                rem_q[w] <= rem_q[w] - dv_q[w];
                q_q[w]   <= q_q[w] | (64'd1 << (cnt_q[w] - 7'd1));
              end
              dv_q[w]  <= dv_q[w] >> 1;
              cnt_q[w] <= cnt_q[w] - 7'd1;
            end
          end
          if (!any_left) state <= S_FIN;
        end
        default: begin  // S_FIN
          for (int unsigned w = 0; w < NW; w++) begin
            if (neg_q[w]) begin
              q_q[w]   <= (-q_q[w]) & size_mask(size_q);
              rem_q[w] <= (-rem_q[w]) & size_mask(size_q);
            end
          end
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  always_comb begin
    quotient  = '0;
    remainder = '0;
    for (int unsigned w = 0; w < NW; w++) begin
      if (w < nwords(size_q)) begin
        unique case (size_q)
          2'd0: begin quotient[w*8  +: 8]  = q_q[w][7:0];  remainder[w*8  +: 8]  = rem_q[w][7:0];  end
          2'd1: begin quotient[w*16 +: 16] = q_q[w][15:0]; remainder[w*16 +: 16] = rem_q[w][15:0]; end
          2'd2: begin quotient[w*32 +: 32] = q_q[w][31:0]; remainder[w*32 +: 32] = rem_q[w][31:0]; end
          default: begin quotient[w*64 +: 64] = q_q[w]; remainder[w*64 +: 64] = rem_q[w]; end
        endcase
      end
    end
  end
endmodule
