// tb_loon_top: the processor with a reduced register file (16 DLARs,
// 24 lines, 16 ILARs; full 2048-bit lines) against a slow RAM, so that the
// STORE burst runs out of free lines. Runs the shared program and checks
// the results in RAM and that every mechanism was exercised.
`include "tb/tb_check.svh"
module tb_loon_top;
  import loon_pkg::*;
  localparam int W = 2048;
  localparam int NDLAR = 16;
  localparam bit NEED_NOFREE = 1;
  logic clk = 0, rst_n = 0;
  logic [63:0] mem_addr;
  logic mem_read, mem_write, mem_rrdy, mem_wrdy, halted;
  logic [W-1:0] mem_data_w, mem_data_r;
  logic [PC_W-1:0] pc;
  events_t events;

  loon_top #(.LINE_W(W), .NUM_ILAR(16), .NUM_DLAR(NDLAR), .NUM_LINES(24)) dut (
    .clk, .rst_n, .boot_addr(64'h0), .mem_addr, .mem_read, .mem_write, .mem_data_w, .mem_data_r,
    .mem_rrdy, .mem_wrdy, .halted, .pc, .events);

  lar_ram_model #(.LINE_W(W), .LATENCY(12)) ram (.clk, .mem_addr, .mem_read, .mem_write,
                                                 .mem_data_w, .mem_data_r, .mem_rrdy, .mem_wrdy);

  always #5 clk = ~clk;

  `include "tb/loon_top_prog.svh"
endmodule
