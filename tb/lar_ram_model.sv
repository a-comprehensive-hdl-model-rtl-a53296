// lar_ram_model: behavioural main memory for simulation (not synthesizable).
//
// Holds 256-byte lines in a sparse array indexed by address bits [63:8].
// A read or write request (mem_read / mem_write held high with mem_addr and
// mem_data_w) is answered LATENCY cycles later with a one-cycle mem_rrdy
// (mem_data_r valid) or mem_wrdy; the model then idles one cycle so the
// requester can drop its strobe. Lines never written read as zero.
// put_line/get_line give testbenches direct access; reads and writes are
// counted.
module lar_ram_model #(
  parameter int unsigned LINE_W  = 2048,
  parameter int unsigned LATENCY = 4
) (
  input  logic              clk,
  input  logic [63:0]       mem_addr,
  input  logic              mem_read,
  input  logic              mem_write,
  input  logic [LINE_W-1:0] mem_data_w,
  output logic [LINE_W-1:0] mem_data_r,
  output logic              mem_rrdy,
  output logic              mem_wrdy
);
  logic [LINE_W-1:0] mem [logic [55:0]];
  int unsigned       cnt;
  int                state;   // 0 idle, 1 busy, 2 responded
  int unsigned       n_reads, n_writes;

  function automatic void put_line(input logic [63:0] a, input logic [LINE_W-1:0] d);
    mem[a[63:8]] = d;
  endfunction

  function automatic logic [LINE_W-1:0] get_line(input logic [63:0] a);
    if (mem.exists(a[63:8])) return mem[a[63:8]];
    return '0;
  endfunction

  initial begin
    state = 0; cnt = 0; n_reads = 0; n_writes = 0;
    mem_rrdy = 1'b0; mem_wrdy = 1'b0; mem_data_r = '0;
  end

  always @(posedge clk) begin
    mem_rrdy <= 1'b0;
    mem_wrdy <= 1'b0;
    case (state)
      0: if (mem_read || mem_write) begin
        cnt   <= LATENCY;
        state <= 1;
      end
      1: if (cnt <= 1) begin
        if (mem_read) begin
          mem_data_r <= get_line(mem_addr);
          mem_rrdy   <= 1'b1;
          n_reads    <= n_reads + 1;
        end else if (mem_write) begin
          put_line(mem_addr, mem_data_w);
          mem_wrdy   <= 1'b1;
          n_writes   <= n_writes + 1;
        end
        state <= 2;
      end else cnt <= cnt - 1;
      default: state <= 0;
    endcase
  end
endmodule
