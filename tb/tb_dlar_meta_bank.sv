// tb_dlar_meta_bank: reset state, meta data writes, the four read ports,
// the write-back unit port and the associative comparator (block match only,
// first valid match, invalid entries never match).
`include "tb/tb_check.svh"
module tb_dlar_meta_bank;
  import loon_pkg::*;
  logic clk = 0, rst_n = 0, w_commit = 0;
  logic [7:0] rd_idx [4];
  meta_t rd_meta [4];
  logic [8:0] rd_ptr [4];
  logic rd_valid [4];
  logic [7:0] meta_addr, write_line;
  logic meta_valid, comp_result;
  logic [8:0] line_ptr_in, write_ptr, comp_line;
  logic [63:0] line_addr, write_addr, comp_addr;
  logic [1:0] write_type, write_size;
  int checks = 0, failures = 0;

  dlar_meta_bank #(.NUM_DLAR(256), .NUM_LINES(512)) dut (.*);

  always #5 clk = ~clk;

  task automatic wr(input int d, input logic [63:0] a, input int t, input int s, input int p);
    @(negedge clk);
    w_commit = 1; write_line = 8'(d); write_addr = a; write_type = 2'(t); write_size = 2'(s);
    write_ptr = 9'(p);
    @(negedge clk); w_commit = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    for (int p = 0; p < 4; p++) rd_idx[p] = 8'(p);
    meta_addr = 0; comp_addr = 64'h0; write_line = 0; write_addr = 0; write_type = 0;
    write_size = 0; write_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    `TB_CHECK(!rd_valid[0] && rd_ptr[0] == 0 && rd_meta[0].typ == T_UINT && rd_meta[0].size == SZ_64,
              "reset state")
    `TB_CHECK(!comp_result, "no match after reset")
    wr(5, 64'h1234_5678_9A00_0010, 2, 1, 300);
    wr(200, 64'h0000_0000_0000_2000, 3, 2, 17);
    wr(100, 64'h1234_5678_9A00_00FF, 1, 0, 44);
    rd_idx[0] = 5; rd_idx[1] = 200; rd_idx[2] = 100; rd_idx[3] = 7;
    #1;
    `TB_CHECK(rd_valid[0] && rd_meta[0].addr == 64'h1234_5678_9A00_0010 && rd_meta[0].typ == 2 &&
              rd_meta[0].size == 1 && rd_ptr[0] == 300, "DLAR 5 read")
    `TB_CHECK(rd_valid[1] && rd_ptr[1] == 17 && rd_meta[1].typ == 3 && rd_meta[1].size == 2, "DLAR 200 read")
    `TB_CHECK(rd_valid[2] && rd_ptr[2] == 44, "DLAR 100 read")
    `TB_CHECK(!rd_valid[3], "DLAR 7 still invalid")
    comp_addr = 64'h1234_5678_9A00_0080; #1;
    `TB_CHECK(comp_result && comp_line == 300, "block match ignores offset, lowest DLAR wins")
    comp_addr = 64'h2010; #1;
    `TB_CHECK(comp_result && comp_line == 17, "second block")
    comp_addr = 64'h0; #1;
    `TB_CHECK(!comp_result, "invalid DLARs at address 0 do not match")
    comp_addr = 64'h2100; #1;
    `TB_CHECK(!comp_result, "neighbouring block misses")
    meta_addr = 200; #1;
    `TB_CHECK(meta_valid && line_ptr_in == 17 && line_addr == 64'h2000, "write-back port")
    // overwrite DLAR 5 with another block: its old block no longer matches through it
    wr(5, 64'h3000, 1, 3, 9);
    comp_addr = 64'h1234_5678_9A00_0000; #1;
    `TB_CHECK(comp_result && comp_line == 44, "old block now only held by DLAR 100")
    `TB_FINISH
  end
endmodule
