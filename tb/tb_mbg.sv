// tb_mbg: all three requesters ask at once. The guard must serve the data
// read first, then the instruction read, then the write, one RAM operation
// at a time, return the right lines, and write the right line to RAM.
`include "tb/tb_check.svh"
module tb_mbg;
  localparam int W = 2048;
  logic clk = 0, rst_n = 0;
  logic read_d_rdy = 0, read_i_rdy = 0, write_rdy = 0;
  logic [63:0] read_d_addr, read_i_addr, write_addr, mem_addr;
  logic [W-1:0] read_d_data, read_i_data, write_data, mem_data_w, mem_data_r;
  logic read_d_done, read_i_done, write_done, mem_read, mem_write, mem_rrdy, mem_wrdy;
  int checks = 0, failures = 0;
  int order [$];

  mbg #(.LINE_W(W)) dut (.*);
  lar_ram_model #(.LINE_W(W), .LATENCY(3)) ram (.clk, .mem_addr, .mem_read, .mem_write, .mem_data_w,
                                                .mem_data_r, .mem_rrdy, .mem_wrdy);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (read_d_done && read_d_rdy) begin order.push_back(1); read_d_rdy <= 0; end
    if (read_i_done && read_i_rdy) begin order.push_back(2); read_i_rdy <= 0; end
    if (write_done && write_rdy)   begin order.push_back(3); write_rdy  <= 0; end
    if (rst_n && mem_read && mem_write) failures++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    logic [W-1:0] ld, li, lw;
    for (int i = 0; i < W/32; i++) begin
      ld[i*32 +: 32] = $urandom; li[i*32 +: 32] = $urandom; lw[i*32 +: 32] = $urandom;
    end
    ram.put_line(64'h1000, ld);
    ram.put_line(64'h2000, li);
    read_d_addr = 64'h1000; read_i_addr = 64'h2000; write_addr = 64'h3000; write_data = lw;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    read_d_rdy = 1; read_i_rdy = 1; write_rdy = 1;
    wait (order.size() == 3);
    @(negedge clk);
    `TB_CHECK(order[0] == 1 && order[1] == 2 && order[2] == 3, "priority order data read, instruction read, write")
    `TB_CHECK(read_d_data == ld, "data line")
    `TB_CHECK(read_i_data == li, "instruction line")
    `TB_CHECK(ram.get_line(64'h3000) == lw, "written line")
    `TB_CHECK(ram.n_reads == 2 && ram.n_writes == 1, "one RAM operation per request")
    // a later lone write is served when nothing else waits
    wait (!write_done);
    @(negedge clk);
    write_addr = 64'h4000; write_rdy = 1;
    wait (order.size() == 4);
    @(negedge clk);
    `TB_CHECK(ram.get_line(64'h4000) == lw, "second write")
    `TB_FINISH
  end
endmodule
