// tb_dlar_line_bank: reset state (every DLAR on line 0), free-line search,
// reference counting, pending marks, the WB write port beating the load
// queue write port, line copy, lazy write-back dirty tracking and the
// priority write request for an unreferenced dirty line.
`include "tb/tb_check.svh"
module tb_dlar_line_bank;
  localparam int W = 256, NL = 16, ND = 8;
  logic clk = 0, rst_n = 0;
  logic [3:0] rd_ptr [3];
  logic [W-1:0] rd_data [3];
  logic rd_pend [3];
  logic [3:0] wbr_ptr, wb_ptr, dlq_ptr, pend_ptr, cp_src, cp_dst, inc_ptr, dec_ptr, tag_ptr;
  logic [3:0] free_ptr, mwu_ptr, prio_ptr;
  logic [W-1:0] wbr_data, wb_data, dlq_data, mwu_data;
  logic wb_we = 0, dlq_we = 0, dlq_accept, pend_set = 0, cp_en = 0, inc_en = 0, dec_en = 0;
  logic tag_en = 0, free_ok, mwu_dirty, mark_clean = 0, prio_req;
  logic [63:0] tag_addr, prio_addr;
  int checks = 0, failures = 0;
  logic [W-1:0] d1, d2;

  dlar_line_bank #(.LINE_W(W), .NUM_LINES(NL), .NUM_DLAR(ND)) dut (.*);

  always #5 clk = ~clk;

  task automatic step();
    @(negedge clk);
    wb_we = 0; dlq_we = 0; pend_set = 0; cp_en = 0; inc_en = 0; dec_en = 0; tag_en = 0; mark_clean = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    for (int k = 0; k < W/32; k++) begin d1[k*32 +: 32] = $urandom; d2[k*32 +: 32] = $urandom; end
    for (int p = 0; p < 3; p++) rd_ptr[p] = 0;
    wbr_ptr = 0; wb_ptr = 0; dlq_ptr = 0; pend_ptr = 0; cp_src = 0; cp_dst = 0; inc_ptr = 0;
    dec_ptr = 0; tag_ptr = 0; mwu_ptr = 0; tag_addr = 0; wb_data = 0; dlq_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    `TB_CHECK(rd_data[0] == '0 && free_ok && free_ptr == 1, "line 0 held by all DLARs, line 1 free")
    `TB_CHECK(!prio_req, "no priority write after reset")
    // a LOAD miss: DLAR moves from line 0 to line 1, line 1 tagged and pending
    @(negedge clk);
    inc_en = 1; inc_ptr = 1; dec_en = 1; dec_ptr = 0; tag_en = 1; tag_ptr = 1; tag_addr = 64'h7700;
    pend_set = 1; pend_ptr = 1;
    step();
    rd_ptr[1] = 1; #1;
    `TB_CHECK(rd_pend[1] && free_ptr == 2, "line 1 pending and in use")
    // the load queue and WB write in the same cycle: WB wins, DLQ waits
    wb_we = 1; wb_ptr = 3; wb_data = d2; dlq_we = 1; dlq_ptr = 1; dlq_data = d1; #1;
    `TB_CHECK(!dlq_accept, "load queue write pre-empted by WB")
    @(negedge clk); wb_we = 0; #1;
    `TB_CHECK(dlq_accept, "load queue write accepted when WB is idle")
    step();
    rd_ptr[1] = 1; rd_ptr[2] = 3; #1;
    `TB_CHECK(!rd_pend[1] && rd_data[1] == d1, "loaded line present, pending cleared")
    `TB_CHECK(rd_data[2] == d2, "WB line written")
    mwu_ptr = 1; #1;
    `TB_CHECK(!mwu_dirty, "loaded line is clean")
    mwu_ptr = 3; #1;
    `TB_CHECK(mwu_dirty && mwu_data == d2, "WB line dirty")
    // copy line 1 to line 2 (a STORE)
    @(negedge clk);
    cp_en = 1; cp_src = 1; cp_dst = 2; inc_en = 1; inc_ptr = 2; dec_en = 1; dec_ptr = 1;
    tag_en = 1; tag_ptr = 2; tag_addr = 64'h9900;
    step();
    rd_ptr[0] = 2; mwu_ptr = 2; #1;
    `TB_CHECK(rd_data[0] == d1 && mwu_dirty, "copied line dirty")
    // line 1 now unreferenced, tagged and clean: free again
    `TB_CHECK(free_ok && free_ptr == 1, "line 1 free again")
    // drop the last reference to line 2: it becomes a priority write
    @(negedge clk); dec_en = 1; dec_ptr = 2;
    step(); #1;
    `TB_CHECK(prio_req && prio_ptr == 2 && prio_addr == 64'h9900, "priority write for dirty line 2")
    @(negedge clk); mwu_ptr = 2; mark_clean = 1;
    step(); #1;
    `TB_CHECK(!prio_req, "priority write cleared once written back")
    `TB_FINISH
  end
endmodule
