// dlar_line_bank: line data half of the two-part DLAR bank.
//
// Holds the physical data lines that DLARs point to. Per line it keeps a
// reference count (how many DLARs point at it), a dirty bit (written since
// it was last written back), a pending bit (a LOAD into it is in flight), a
// block address tag and a written bit (lines never written read as zero).
//
// Write port: one port shared by the writeback stage and the data load
// queue. A WB write (wb_we) always wins and sets the line dirty; a DLQ write
// (dlq_we) is accepted only in a cycle without a WB write (dlq_accept), and
// leaves the line clean and no longer pending. A STORE copies one line into
// another (cp_en: data and dirty). LOAD and STORE move references: inc_en
// adds one to inc_ptr and dec_en removes one from dec_ptr in the same cycle.
// tag_en sets a line's address tag when it is allocated to a block. The
// memory writeback unit clears dirty with mark_clean; a WB write in the same
// cycle keeps the line dirty.
//
// Allocation: free_ok/free_ptr give the lowest line with no references,
// not pending and nothing left to write back. Orphans: prio_req/prio_ptr/
// prio_addr name the lowest dirty, has_tag line with no references, which
// the writeback unit must write out before it can be reused. A dirty line
// without a tag (only ever reached through DLARs that were never loaded) is
// dropped when its last reference goes.
//
// Reads are combinational: ports a, b and c for the pipeline (data and
// pending), d for the writeback stage's merge, and the writeback unit's port
// (data and dirty). Reset: line 0 holds all references (every DLAR starts
// pointing at it) and all lines are clean, not pending and unwritten.
module dlar_line_bank
#(
  parameter int unsigned LINE_W    = loon_pkg::LAR_LINE_W,
  parameter int unsigned NUM_LINES = 512,
  parameter int unsigned NUM_DLAR  = 256,
  localparam int unsigned PW = $clog2(NUM_LINES),
  localparam int unsigned CW = $clog2(NUM_DLAR + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // pipeline read ports a, b, c
  input  logic [PW-1:0]     rd_ptr  [3],
  output logic [LINE_W-1:0] rd_data [3],
  output logic              rd_pend [3],
  // WB merge read port
  input  logic [PW-1:0]     wbr_ptr,
  output logic [LINE_W-1:0] wbr_data,
  // shared write port
  input  logic              wb_we,
  input  logic [PW-1:0]     wb_ptr,
  input  logic [LINE_W-1:0] wb_data,
  input  logic              dlq_we,
  input  logic [PW-1:0]     dlq_ptr,
  input  logic [LINE_W-1:0] dlq_data,
  output logic              dlq_accept,
  input  logic              pend_set,
  input  logic [PW-1:0]     pend_ptr,
  // STORE copy
  input  logic              cp_en,
  input  logic [PW-1:0]     cp_src,
  input  logic [PW-1:0]     cp_dst,
  // reference counting and tags
  input  logic              inc_en,
  input  logic [PW-1:0]     inc_ptr,
  input  logic              dec_en,
  input  logic [PW-1:0]     dec_ptr,
  input  logic              tag_en,
  input  logic [PW-1:0]     tag_ptr,
  input  logic [63:0]       tag_addr,
  output logic              free_ok,
  output logic [PW-1:0]     free_ptr,
  // memory writeback unit
  input  logic [PW-1:0]     mwu_ptr,
  output logic [LINE_W-1:0] mwu_data,
  output logic              mwu_dirty,
  input  logic              mark_clean,
  output logic              prio_req,
  output logic [PW-1:0]     prio_ptr,
  output logic [63:0]       prio_addr
);
  logic [LINE_W-1:0]    data  [NUM_LINES];
  logic [63:8]          tag   [NUM_LINES];
  logic [CW-1:0]        refc  [NUM_LINES];
  logic [NUM_LINES-1:0] dirty, pend, written, has_tag;

  function automatic logic [LINE_W-1:0] rd(input logic [PW-1:0] p);
    return written[p] ? data[p] : '0;
  endfunction

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      rd_data[p] = rd(rd_ptr[p]);
      rd_pend[p] = pend[rd_ptr[p]];
    end
  end
  assign wbr_data   = rd(wbr_ptr);
  assign mwu_data   = rd(mwu_ptr);
  assign mwu_dirty  = dirty[mwu_ptr];
  assign dlq_accept = dlq_we && !wb_we;

  always_comb begin
    free_ok   = 1'b0;
    free_ptr  = '0;
    prio_req  = 1'b0;
    prio_ptr  = '0;
    prio_addr = '0;
    for (int unsigned i = 0; i < NUM_LINES; i++) begin
      if (!free_ok && refc[i] == '0 && !pend[i] && !(dirty[i] && has_tag[i])) begin
        free_ok  = 1'b1;
        free_ptr = PW'(i);
      end
      if (!prio_req && refc[i] == '0 && dirty[i] && has_tag[i]) begin
        prio_req  = 1'b1;
        prio_ptr  = PW'(i);
        prio_addr = {tag[i], 8'd0};
      end
    end
  end

  // line data and tags (no reset: unwritten lines read as zero)
  always_ff @(posedge clk) begin
    if (cp_en)      data[cp_dst]  <= rd(cp_src);
    if (dlq_accept) data[dlq_ptr] <= dlq_data;
    if (wb_we)      data[wb_ptr]  <= wb_data;
    if (tag_en)     tag[tag_ptr]  <= tag_addr[63:8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dirty   <= '0;
      pend    <= '0;
      written <= '0;
      has_tag  <= '0;
      for (int i = 0; i < NUM_LINES; i++) refc[i] <= '0;
      refc[0] <= CW'(NUM_DLAR);
    end else begin
      if (mark_clean) dirty[mwu_ptr] <= 1'b0;
      if (tag_en) begin
        has_tag[tag_ptr] <= 1'b1;
        dirty[tag_ptr]  <= 1'b0;
      end
      if (pend_set) pend[pend_ptr] <= 1'b1;
      if (cp_en) begin
        written[cp_dst] <= 1'b1;
        dirty[cp_dst]   <= 1'b1;
      end
      if (dlq_accept) begin
        written[dlq_ptr] <= 1'b1;
        pend[dlq_ptr]    <= 1'b0;
      end
      if (wb_we) begin
        written[wb_ptr] <= 1'b1;
        dirty[wb_ptr]   <= 1'b1;
      end
      if (inc_en && !(dec_en && dec_ptr == inc_ptr)) refc[inc_ptr] <= refc[inc_ptr] + 1'b1;
      if (dec_en && !(inc_en && dec_ptr == inc_ptr)) begin
        refc[dec_ptr] <= refc[dec_ptr] - 1'b1;
        // an untagged line's contents are not wanted once unreferenced
        if (refc[dec_ptr] == CW'(1) && !has_tag[dec_ptr]) dirty[dec_ptr] <= 1'b0;
      end
    end
  end

  a_no_refc_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                        dec_en |-> (refc[dec_ptr] != '0 || (inc_en && inc_ptr == dec_ptr)));
endmodule
