// tb_mwu: a small model of the DLAR meta data and line banks (8 DLARs,
// 16 lines). Dirty lines held by valid DLARs, and one unreferenced dirty line
// that raises a priority request, must each be written back once, to the
// block address of their DLAR, with the priority line first; clean lines and
// lines held only by invalid DLARs are never written.
`include "tb/tb_check.svh"
module tb_mwu;
  localparam int W = 2048;
  logic clk = 0, rst_n = 0;
  logic [2:0] meta_addr;
  logic meta_valid, line_dirty, mark_clean, prio_req, write_rdy, write_done = 0;
  logic [3:0] line_ptr_in, line_ptr_out, prio_ptr;
  logic [63:0] line_addr, prio_addr, write_addr;
  logic [W-1:0] line_data, write_data;
  int checks = 0, failures = 0;

  // bank models
  logic [63:0] m_addr [8];
  logic [3:0]  m_ptr [8];
  logic [7:0]  m_valid;
  logic [W-1:0] l_data [16];
  logic [15:0] l_dirty;
  longint wr_addr [$];
  int wr_line [$];

  mwu #(.LINE_W(W), .DPTR_W(3), .PTR_W(4)) dut (.*);

  assign meta_valid  = m_valid[meta_addr];
  assign line_ptr_in = m_ptr[meta_addr];
  assign line_addr   = m_addr[meta_addr];
  assign line_data   = l_data[line_ptr_out];
  assign line_dirty  = l_dirty[line_ptr_out];
  assign prio_req    = l_dirty[9];
  assign prio_ptr    = 4'd9;
  assign prio_addr   = 64'h90000;

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && mark_clean) l_dirty[line_ptr_out] <= 1'b0;

  // memory side: accept a write after two cycles, then wait for the request to drop
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && write_rdy && !write_done) begin
        wr_addr.push_back(write_addr);
        for (int l = 0; l < 16; l++) if (l_data[l] == write_data) wr_line.push_back(l);
        repeat (2) @(posedge clk);
        write_done <= 1;
        while (write_rdy) @(posedge clk);
        write_done <= 0;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    for (int l = 0; l < 16; l++) for (int k = 0; k < W/32; k++) l_data[l][k*32 +: 32] = $urandom;
    for (int i = 0; i < 8; i++) begin
      m_addr[i] = 64'h10000 + 64'(i) * 256 + 64'h13;
      m_ptr[i] = 4'(i + 1);
    end
    m_ptr[6] = 4'd4;                       // DLAR 6 shares line 4 with DLAR 3
    m_valid = 8'b0111_1111;                // DLAR 7 invalid
    l_dirty = '0;
    l_dirty[2] = 1; l_dirty[4] = 1; l_dirty[5] = 1; l_dirty[9] = 1;
    l_dirty[8] = 1;                        // only DLAR 7 (invalid) points at line 8
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);
    `TB_CHECK(wr_addr.size() == 4, $sformatf("%0d write backs", wr_addr.size()))
    `TB_CHECK(wr_line.size() == 4 && wr_line[0] == 9 && wr_addr[0] == 64'h90000, "priority line written first")
    for (int n = 0; n < wr_line.size(); n++) begin
      case (wr_line[n])
        9: `TB_CHECK(wr_addr[n] == 64'h90000, "priority address")
        2: `TB_CHECK(wr_addr[n] == 64'h10100, "line 2 address (DLAR 1, offset stripped)")
        4: `TB_CHECK(wr_addr[n] == 64'h10300 || wr_addr[n] == 64'h10600, "line 4 address")
        5: `TB_CHECK(wr_addr[n] == 64'h10400, "line 5 address")
        default: `TB_CHECK(0, $sformatf("line %0d must not be written", wr_line[n]))
      endcase
    end
    `TB_CHECK(l_dirty == 16'h0100, "written lines are clean, line 8 untouched")
    `TB_FINISH
  end
endmodule
