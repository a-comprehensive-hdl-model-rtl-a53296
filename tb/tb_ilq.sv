// tb_ilq: one block load through a bus-guard stand-in: read request and
// address, a one-cycle write to the ILAR bank with pointer, data and
// address, then done until the fetch queue drops load.
`include "tb/tb_check.svh"
module tb_ilq;
  localparam int W = 2048;
  logic clk = 0, rst_n = 0, load = 0, read_i_done = 0;
  logic [7:0] load_ptr, line_ptr;
  logic [63:0] load_addr, read_i_addr, line_addr;
  logic [W-1:0] read_i_data, line_data;
  logic done, read_i_rdy, write;
  int checks = 0, failures = 0, writes = 0;

  ilq #(.LINE_W(W), .IPTR_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && write) writes++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    for (int i = 0; i < W/32; i++) read_i_data[i*32 +: 32] = $urandom;
    load_ptr = 8'd42; load_addr = 64'hABC00;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk);
    `TB_CHECK(read_i_rdy && read_i_addr == 64'hABC00, "read requested")
    repeat (2) @(negedge clk);
    read_i_done = 1;
    @(negedge clk); read_i_done = 0;
    `TB_CHECK(write && line_ptr == 42 && line_addr == 64'hABC00 && line_data == read_i_data, "ILAR write")
    `TB_CHECK(!read_i_rdy, "request dropped")
    @(negedge clk);
    `TB_CHECK(!write && done, "done raised")
    repeat (3) @(negedge clk);
    `TB_CHECK(done, "done held while load is high")
    load = 0;
    @(negedge clk);
    `TB_CHECK(!done, "done dropped")
    `TB_CHECK(writes == 1, $sformatf("exactly one write, saw %0d", writes))
    `TB_FINISH
  end
endmodule
