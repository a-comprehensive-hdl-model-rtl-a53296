// dlar_meta_bank: meta data half of the two-part DLAR bank.
//
// One entry per DLAR: block address plus byte offset (64 bits), type tag,
// size tag, a valid bit and a pointer to the physical line in the line data
// bank that holds the DLAR's data. Aliased DLARs (same address bits [63:8])
// point at the same line, so a write through one is seen by all.
//
// Ports: four combinational read ports (rd, rs1, rs2 for the meta data
// fetch stage, and the destination again for LOAD/STORE in the line data
// fetch stage); one
// combinational read port for the memory writeback unit (meta_addr ->
// line_ptr_in, line_addr, meta_valid); one write port (w_commit writes
// write_addr, write_type, write_size and write_ptr to DLAR write_line); and
// an associative compare: comp_result is high when a valid DLAR holds the
// block of comp_addr, and comp_line is that DLAR's line
// pointer. Only address bits [63:8] take part in the compare.
//
// Reset: every DLAR is invalid, unsigned 64-bit, address 0, pointing to
// line 0 (a shared zero line); invalid DLARs never match a compare and are
// never written back.
module dlar_meta_bank
  import loon_pkg::*;
#(
  parameter int unsigned NUM_DLAR  = 256,
  parameter int unsigned NUM_LINES = 512,
  localparam int unsigned DW = $clog2(NUM_DLAR),
  localparam int unsigned PW = $clog2(NUM_LINES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // pipeline read ports
  input  logic [DW-1:0] rd_idx   [4],
  output meta_t         rd_meta  [4],
  output logic [PW-1:0] rd_ptr   [4],
  output logic          rd_valid [4],
  // MWU read port
  input  logic [DW-1:0] meta_addr,
  output logic          meta_valid,
  output logic [PW-1:0] line_ptr_in,
  output logic [63:0]   line_addr,
  // write port
  input  logic          w_commit,
  input  logic [DW-1:0] write_line,
  input  logic [63:0]   write_addr,
  input  logic [1:0]    write_type,
  input  logic [1:0]    write_size,
  input  logic [PW-1:0] write_ptr,
  // associative compare
  input  logic [63:0]   comp_addr,
  output logic          comp_result,
  output logic [PW-1:0] comp_line
);
  meta_t         meta  [NUM_DLAR];
  logic [PW-1:0] ptr   [NUM_DLAR];
  logic [NUM_DLAR-1:0] valid;

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      rd_valid[p] = valid[rd_idx[p]];
      rd_meta[p] = meta[rd_idx[p]];
      rd_ptr[p]  = ptr[rd_idx[p]];
    end
  end

  assign meta_valid  = valid[meta_addr];
  assign line_ptr_in = ptr[meta_addr];
  assign line_addr   = meta[meta_addr].addr;

  always_comb begin
    comp_result = 1'b0;
    comp_line   = '0;
    for (int unsigned i = 0; i < NUM_DLAR; i++) begin
      if (!comp_result && valid[i] &&
          meta[i].addr[63:8] == comp_addr[63:8]) begin
        comp_result = 1'b1;
        comp_line   = ptr[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < NUM_DLAR; i++) begin
        meta[i] <= '{addr: '0, typ: T_UINT, size: SZ_64};
        ptr[i]  <= '0;
      end
    end else if (w_commit) begin
      valid[write_line] <= 1'b1;
      meta[write_line]  <= '{addr: write_addr, typ: write_type, size: write_size};
      ptr[write_line]   <= write_ptr;
    end
  end
endmodule
