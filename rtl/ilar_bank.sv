// ilar_bank: bank of instruction LARs.
//
// Each ILAR holds a memory block address and a line of 32 64-bit
// instructions (no type or size tags). The program counter selects an
// instruction: PC[12:5] names the ILAR and PC[4:0] the instruction inside it.
// instr_ok is low while the selected ILAR is pending (marked by the fetch
// queue) or has never been filled, and the pipeline stalls on it.
//
// ILARs follow the one-copy-per-alias method: when the instruction load
// queue writes a block, the target ILAR takes the block and its address,
// and every other valid ILAR whose address bits [63:8] match latches the
// same data in the same cycle, so aliased ILARs stay identical. A fill is
// the only way an ILAR changes.
//
// Interface: pc in, instr/instr_ok out (combinational read); mark port
// (pending, p_ptr) from the fetch queue; fill port (write, line_ptr,
// line_data, line_addr) from the instruction load queue.
module ilar_bank
  import loon_pkg::*;
#(
  parameter int unsigned LINE_W   = loon_pkg::LAR_LINE_W,
  parameter int unsigned NUM_ILAR = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [PC_W-1:0]             pc,
  output logic [63:0]                 instr,
  output logic                        instr_ok,
  input  logic                        pending,
  input  logic [$clog2(NUM_ILAR)-1:0] p_ptr,
  input  logic                        write,
  input  logic [$clog2(NUM_ILAR)-1:0] line_ptr,
  input  logic [LINE_W-1:0]           line_data,
  input  logic [63:0]                 line_addr
);
  localparam int unsigned IW = $clog2(NUM_ILAR);
  localparam int unsigned SW = $clog2(LINE_W / 64);   // instruction slot bits

  logic [LINE_W-1:0] data  [NUM_ILAR];
  logic [63:8]       addr  [NUM_ILAR];
  logic [NUM_ILAR-1:0] valid, pend;
  logic [IW-1:0]     sel;
  logic [SW-1:0]     slot;

  assign sel  = pc[5 +: IW];
  assign slot = pc[SW-1:0];
  assign instr    = data[sel][slot*64 +: 64];
  assign instr_ok = valid[sel] && !pend[sel];

  // data array: target and aliases latch the fill
  always_ff @(posedge clk) begin
    if (write) begin
      for (int unsigned i = 0; i < NUM_ILAR; i++)
        if (i == int'(line_ptr) || (valid[i] && addr[i] == line_addr[63:8]))
          data[i] <= line_data;
      addr[line_ptr] <= line_addr[63:8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      pend  <= '0;
    end else begin
      if (pending) pend[p_ptr] <= 1'b1;
      if (write) begin
        valid[line_ptr] <= 1'b1;
        pend[line_ptr]  <= 1'b0;
      end
    end
  end
endmodule
