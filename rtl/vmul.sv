// vmul: multi-cycle vector multiplier by decomposition of partial products.
//
// A product of two k-byte words is the sum of k*k byte partial products
// a_i * b_j, each placed at byte position i + j. Splitting a 64-bit slice
// into smaller words only removes partial products, so one datapath serves
// every word size. Each 64-bit slice has eight 8x8 byte multipliers and a
// 128-bit accumulator. In add cycle t the multipliers form every partial
// product with i + j = t inside each word (byte position p of the slice
// supplies a_i, so at most eight products per cycle) and the accumulator
// adds them. A k-byte word is complete after 2k-1 add cycles: 1, 3, 7 and 15
// cycles for 8-, 16-, 32- and 64-bit words. A word of k bytes starting at
// byte w*k of the slice accumulates into bytes 2k*w .. 2k*w+2k-1, and the
// output multiplexers return the low k bytes of each word's product (the low
// half is the same for signed and unsigned operands).
//
// Interface: start (one cycle, samples a, b, size), done (one-cycle pulse),
// result (held until the next start), busy. The first add cycle is the start
// cycle itself, so done rises 2k-1 cycles after start.
module vmul
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LINE_W-1:0] a,
  input  logic [LINE_W-1:0] b,
  input  logic [1:0]        size,
  output logic              busy,
  output logic              done,
  output logic [LINE_W-1:0] result
);
  localparam int unsigned NS = LINE_W / 64;

  logic [LINE_W-1:0]  a_q, b_q;
  logic [1:0]         size_q;
  logic [3:0]         t_q;
  logic [127:0]       acc_q [NS];
  logic [127:0]       acc_d [NS];
  logic [LINE_W-1:0]  a_u, b_u;
  logic [1:0]         size_u;
  logic [3:0]         t_u;
  logic               last;

  // operands used this cycle: straight from the inputs on the start cycle
  assign a_u    = start ? a : a_q;
  assign b_u    = start ? b : b_q;
  assign size_u = start ? size : size_q;
  assign t_u    = start ? 4'd0 : t_q;
  assign last   = (t_u == 4'((2 << size_u) - 2));

  always_comb begin
    int unsigned k, w, i, j;
    logic [15:0] pp;
    k = 1 << size_u;
    for (int unsigned s = 0; s < NS; s++) begin
      acc_d[s] = start ? 128'd0 : acc_q[s];
      for (int unsigned p = 0; p < 8; p++) begin
        w = p / k;
        i = p % k;
        j = int'(t_u) - i;
        pp = '0;
        if (int'(t_u) >= int'(i) && j < k)
          pp = a_u[s*64 + (w*k + i)*8 +: 8] * b_u[s*64 + (w*k + j)*8 +: 8];
        acc_d[s] = acc_d[s] + (128'(pp) << ((2*k*w + i + j) * 8));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      t_q    <= '0;
      size_q <= '0;
      a_q    <= '0;
      b_q    <= '0;
      for (int s = 0; s < NS; s++) acc_q[s] <= '0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        for (int s = 0; s < NS; s++) acc_q[s] <= acc_d[s];
        if (start) begin
          a_q    <= a;
          b_q    <= b;
          size_q <= size;
        end
        t_q  <= t_u + 4'd1;
        busy <= !last;
        done <= last;
      end
    end
  end

  // output byte selection: low k bytes of each word's 2k-byte product
  always_comb begin
    int unsigned k;
    k = 1 << size_q;
    result = '0;
    for (int unsigned s = 0; s < NS; s++)
      for (int unsigned p = 0; p < 8; p++)
        result[s*64 + p*8 +: 8] = acc_q[s][(2*k*(p/k) + p%k)*8 +: 8];
  end
endmodule
