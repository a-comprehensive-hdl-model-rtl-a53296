// tb_fq: a FETCH of four blocks into ILARs 10..13 from 0x8000, with an
// instruction-load-queue stand-in. Checks the pending marks (one per cycle,
// ILARs 10..13), then four loads with ILAR pointer +1 and address +256, and
// busy dropping at the end; then a one-block FETCH and a sixteen-block one.
`include "tb/tb_check.svh"
module tb_fq;
  logic clk = 0, rst_n = 0, fetch = 0, ilq_done = 0;
  logic [7:0] fetch_dest, p_ptr, ilq_ptr;
  logic [3:0] fetch_count_m1;
  logic [63:0] fetch_addr, ilq_addr;
  logic busy, mark_pending, ilq_load;
  int checks = 0, failures = 0;
  int cyc = 0, t0;
  bit ok;
  int marks [$];
  int ptrs [$];
  longint addrs [$];

  fq #(.IPTR_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && mark_pending) marks.push_back(p_ptr);
  always @(posedge clk) cyc++;

  // ILQ stand-in: take a load, answer done two cycles later, wait for load low
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && ilq_load && !ilq_done) begin
        ptrs.push_back(ilq_ptr); addrs.push_back(ilq_addr);
        repeat (2) @(posedge clk);
        ilq_done <= 1;
        while (ilq_load) @(posedge clk);
        ilq_done <= 0;
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    fetch_dest = 8'd10; fetch_count_m1 = 4'd3; fetch_addr = 64'h8000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); fetch = 1;
    @(negedge clk); fetch = 0;
    wait (busy == 0);
    `TB_CHECK(marks.size() == 4 && marks[0] == 10 && marks[3] == 13, $sformatf("%0d ILARs marked", marks.size()))
    `TB_CHECK(ptrs.size() == 4 && ptrs[0] == 10 && ptrs[1] == 11 && ptrs[3] == 13, $sformatf("ILAR pointers %p", ptrs))
    `TB_CHECK(addrs.size() == 4 && addrs[0] == 64'h8000 && addrs[1] == 64'h8100 && addrs[3] == 64'h8300, "block addresses")
    marks.delete(); ptrs.delete(); addrs.delete();
    fetch_dest = 8'd255; fetch_count_m1 = 4'd0; fetch_addr = 64'h100;
    @(negedge clk); fetch = 1;
    @(negedge clk); fetch = 0;
    wait (busy == 0);
    `TB_CHECK(marks.size() == 1 && ptrs.size() == 1 && ptrs[0] == 255 && addrs[0] == 64'h100, "single block")
    // the longest FETCH: sixteen blocks, marked on sixteen consecutive cycles
    marks.delete(); ptrs.delete(); addrs.delete();
    fetch_dest = 8'd240; fetch_count_m1 = 4'd15; fetch_addr = 64'h1_0000_0042;
    @(negedge clk); fetch = 1;
    @(negedge clk); fetch = 0;
    t0 = cyc;
    wait (!mark_pending);
    `TB_CHECK(cyc - t0 == 16, $sformatf("sixteen marks took %0d cycles", cyc - t0))
    wait (busy == 0);
    `TB_CHECK(marks.size() == 16 && marks[15] == 255, "sixteen ILARs marked")
    ok = (ptrs.size() == 16);
    for (int k = 0; k < ptrs.size(); k++)
      if (ptrs[k] != 240 + k || addrs[k] != 64'h1_0000_0000 + 64'(k) * 256) ok = 0;
    `TB_CHECK(ok, "sixteen loads, ILAR +1 and address +256 each, offset dropped")
    `TB_FINISH
  end
endmodule
