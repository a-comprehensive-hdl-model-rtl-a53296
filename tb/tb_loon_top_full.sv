// tb_loon_top_full: the processor at its default size (2048-bit lines,
// 256 ILARs, 256 DLARs, 512 lines) running the shared program. With 512
// lines the STORE burst does not run out of free lines, so that one stall
// is not required here.
`include "tb/tb_check.svh"
module tb_loon_top_full;
  import loon_pkg::*;
  localparam int W = 2048;
  localparam int NDLAR = 256;
  localparam bit NEED_NOFREE = 0;
  logic clk = 0, rst_n = 0;
  logic [63:0] mem_addr;
  logic mem_read, mem_write, mem_rrdy, mem_wrdy, halted;
  logic [W-1:0] mem_data_w, mem_data_r;
  logic [PC_W-1:0] pc;
  events_t events;

  loon_top dut (
    .clk, .rst_n, .boot_addr(64'h0), .mem_addr, .mem_read, .mem_write, .mem_data_w, .mem_data_r,
    .mem_rrdy, .mem_wrdy, .halted, .pc, .events);

  lar_ram_model #(.LINE_W(W), .LATENCY(4)) ram (.clk, .mem_addr, .mem_read, .mem_write,
                                                .mem_data_w, .mem_data_r, .mem_rrdy, .mem_wrdy);

  always #5 clk = ~clk;

  `include "tb/loon_top_prog.svh"
endmodule
