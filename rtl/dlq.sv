// dlq: data load queue.
//
// Serves one LOAD at a time. On a request it puts the address on the memory
// bus guard's read port, raises read_d_rdy and marks the target line pending
// in the line data bank (so the pipeline stalls on it). When the guard
// reports the read done it drops read_d_rdy and offers the line to the line
// bank's write port. That port is shared with the writeback stage, which
// wins: while wb_assert is high the DLQ keeps its write request up and tries
// again on the following cycles. The cycle in which wb_assert is low is the
// cycle the line is written; the DLQ then returns to idle.
//
// States: 0 wait for LOAD, 1 wait for read from MBG, 2 commit write / check
// for WB assertion. busy is high from the cycle after load until idle again.
module dlq
  import loon_pkg::*;
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W,
  parameter int unsigned PTR_W  = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the pipeline
  input  logic              load,
  input  logic [63:0]       load_addr,
  input  logic [PTR_W-1:0]  load_ptr,
  output logic              busy,
  // memory bus guard
  output logic              read_d_rdy,
  output logic [63:0]       read_d_addr,
  input  logic [LINE_W-1:0] read_d_data,
  input  logic              read_d_done,
  // line data bank
  output logic              pending,
  output logic [PTR_W-1:0]  pending_ptr,
  output logic              write,
  output logic [PTR_W-1:0]  line_ptr,
  output logic [LINE_W-1:0] line_data,
  input  logic              wb_assert
);
  typedef enum logic [1:0] {WAIT_LOAD = 2'd0, WAIT_READ = 2'd1, CHECK_WB = 2'd2} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= WAIT_LOAD;
      busy        <= 1'b0;
      read_d_rdy  <= 1'b0;
      read_d_addr <= '0;
      pending     <= 1'b0;
      pending_ptr <= '0;
      write       <= 1'b0;
      line_ptr    <= '0;
      line_data   <= '0;
    end else begin
      pending <= 1'b0;
      unique case (state)
        WAIT_LOAD: begin
          busy <= 1'b0;
          if (load) begin
            read_d_addr <= {load_addr[63:8], 8'd0};
            read_d_rdy  <= 1'b1;
            line_ptr    <= load_ptr;
            pending_ptr <= load_ptr;
            pending     <= 1'b1;
            busy        <= 1'b1;
            state       <= WAIT_READ;
          end
        end
        WAIT_READ: if (read_d_done) begin
          read_d_rdy <= 1'b0;
          line_data  <= read_d_data;
          write      <= 1'b1;
          state      <= CHECK_WB;
        end
        default: if (!wb_assert) begin  // CHECK_WB
          write <= 1'b0;
          busy  <= 1'b0;
          state <= WAIT_LOAD;
        end
      endcase
    end
  end

  a_no_load_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !load);
endmodule
