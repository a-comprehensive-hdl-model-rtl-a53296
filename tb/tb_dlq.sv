// tb_dlq: one LOAD through a simple bus-guard stand-in. Checks the read
// request and address, the pending mark, the write offered to the line bank,
// pre-emption by the WB stage (the write request stays up while WB holds the
// port and is committed in the first free cycle) and the busy flag.
`include "tb/tb_check.svh"
module tb_dlq;
  localparam int W = 2048;
  logic clk = 0, rst_n = 0, load = 0, wb_assert = 0, read_d_done = 0;
  logic [63:0] load_addr, read_d_addr;
  logic [8:0] load_ptr, pending_ptr, line_ptr;
  logic [W-1:0] read_d_data, line_data;
  logic busy, read_d_rdy, pending, write;
  int checks = 0, failures = 0;
  int pend_pulses = 0, wr_cycles = 0;

  dlq #(.LINE_W(W), .PTR_W(9)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && pending) pend_pulses++;
    if (rst_n && write) wr_cycles++;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    for (int i = 0; i < W/32; i++) read_d_data[i*32 +: 32] = $urandom;
    load_addr = 64'h0000_0000_0001_2345; load_ptr = 9'd77;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    `TB_CHECK(busy && read_d_rdy && read_d_addr == 64'h12300, "read requested with block address")
    `TB_CHECK(pending && pending_ptr == 77, "line marked pending")
    repeat (3) @(negedge clk);
    wb_assert = 1;              // WB will hold the port
    read_d_done = 1;
    @(negedge clk);
    `TB_CHECK(!read_d_rdy && write && line_ptr == 77 && line_data == read_d_data, "write offered")
    read_d_done = 0;
    repeat (3) @(negedge clk);
    `TB_CHECK(write && busy, "write held while WB pre-empts")
    wb_assert = 0;
    @(negedge clk);
    `TB_CHECK(!write && !busy, "write committed in the first free cycle")
    `TB_CHECK(wr_cycles == 4, $sformatf("write request cycles %0d", wr_cycles))
    `TB_CHECK(pend_pulses == 1, $sformatf("one pending mark, saw %0d", pend_pulses))
    `TB_FINISH
  end
endmodule
