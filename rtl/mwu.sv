// mwu: memory writeback unit (lazy writeback).
//
// Walks the DLAR meta data bank one entry at a time. For each valid DLAR it
// reads the line pointer and block address, then the line itself; if the
// line is dirty it marks it clean, puts it on the memory bus guard's write
// port and waits until the guard reports it written. A priority write (a
// dirty line no DLAR points to any more) is served before the next walk
// step, using the line's own address tag.
//
// States: 0 read meta data (or take the priority pointer), 1 read line data,
// 2 check if clean, 3 wait until written. The meta and line banks are read
// combinationally through meta_addr and line_ptr_out. Marking the line clean
// happens in the same cycle its data is captured, so a writeback-stage write
// in a later cycle sets it dirty again and is written on a later pass.
module mwu
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W,
  parameter int unsigned DPTR_W = 8,
  parameter int unsigned PTR_W  = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // DLAR meta data bank
  output logic [DPTR_W-1:0] meta_addr,
  input  logic              meta_valid,
  input  logic [PTR_W-1:0]  line_ptr_in,
  input  logic [63:0]       line_addr,
  // DLAR line data bank
  output logic [PTR_W-1:0]  line_ptr_out,
  input  logic [LINE_W-1:0] line_data,
  input  logic              line_dirty,
  output logic              mark_clean,
  input  logic              prio_req,
  input  logic [PTR_W-1:0]  prio_ptr,
  input  logic [63:0]       prio_addr,
  // memory bus guard
  output logic              write_rdy,
  output logic [63:0]       write_addr,
  output logic [LINE_W-1:0] write_data,
  input  logic              write_done
);
  typedef enum logic [1:0] {READ_META = 2'd0, READ_LINE = 2'd1, CHECK = 2'd2, WAIT_WR = 2'd3} state_e;
  state_e            state;
  logic [DPTR_W-1:0] counter;
  logic [PTR_W-1:0]  ptr;
  logic [63:0]       addr;
  logic              have;

  assign meta_addr    = counter;
  assign line_ptr_out = ptr;
  assign mark_clean   = (state == CHECK) && have && line_dirty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= READ_META;
      counter    <= '0;
      ptr        <= '0;
      addr       <= '0;
      have       <= 1'b0;
      write_rdy  <= 1'b0;
      write_addr <= '0;
      write_data <= '0;
    end else begin
      unique case (state)
        READ_META: begin
          if (prio_req) begin
            ptr   <= prio_ptr;
            addr  <= prio_addr;
            have  <= 1'b1;
            state <= CHECK;
          end else begin
            ptr     <= line_ptr_in;
            addr    <= {line_addr[63:8], 8'd0};
            have    <= meta_valid;
            counter <= counter + 1'b1;
            state   <= READ_LINE;
          end
        end
        READ_LINE: state <= CHECK;
        CHECK: begin
          if (have && line_dirty) begin
            write_addr <= addr;
            write_data <= line_data;
            write_rdy  <= 1'b1;
            state      <= WAIT_WR;
          end else begin
            state <= READ_META;
          end
        end
        default: if (write_done) begin  // WAIT_WR
          write_rdy <= 1'b0;
          state     <= READ_META;
        end
      endcase
    end
  end
endmodule
