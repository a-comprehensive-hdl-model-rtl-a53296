// fq: fetch queue.
//
// Receives a FETCH of 1..16 consecutive instruction blocks into consecutive
// ILARs. It first marks every target ILAR pending, one per cycle, so that no
// instruction is decoded from an out-of-date ILAR. It then hands the blocks
// to the instruction load queue one at a time, advancing the ILAR pointer by
// one and the memory address by 256 bytes (one block) after each.
//
// States: 0 wait for FETCH; 1 mark ILARs pending (count runs up to
// num_total); 2 wait for the ILQ to finish a block; 3 issue the next block or
// exit. num_total is loaded with the block count minus one (count_m1), so
// num_total + 1 ILARs are marked and loaded. Handshake with the ILQ: load is
// held until done rises, then dropped; the ILQ drops done in return.
module fq
#(
  parameter int unsigned IPTR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fetch,
  input  logic [IPTR_W-1:0] fetch_dest,
  input  logic [3:0]        fetch_count_m1,
  input  logic [63:0]       fetch_addr,
  output logic              busy,
  // ILAR bank
  output logic              mark_pending,
  output logic [IPTR_W-1:0] p_ptr,
  // instruction load queue
  output logic              ilq_load,
  output logic [IPTR_W-1:0] ilq_ptr,
  output logic [63:0]       ilq_addr,
  input  logic              ilq_done
);
  typedef enum logic [1:0] {WAIT_FETCH = 2'd0, MARK = 2'd1, WAIT_ILQ = 2'd2, NEXT = 2'd3} state_e;
  state_e     state;
  logic [3:0] num_total, count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= WAIT_FETCH;
      busy         <= 1'b0;
      mark_pending <= 1'b0;
      p_ptr        <= '0;
      ilq_load     <= 1'b0;
      ilq_ptr      <= '0;
      ilq_addr     <= '0;
      num_total    <= '0;
      count        <= '0;
    end else begin
      unique case (state)
        WAIT_FETCH: if (fetch) begin
          busy         <= 1'b1;
          num_total    <= fetch_count_m1;
          ilq_ptr      <= fetch_dest;
          ilq_addr     <= {fetch_addr[63:8], 8'd0};
          p_ptr        <= fetch_dest;
          mark_pending <= 1'b1;
          count        <= '0;
          state        <= MARK;
        end else begin
          busy <= 1'b0;
        end
        MARK: if (count != num_total) begin
          count <= count + 4'd1;
          p_ptr <= p_ptr + 1'b1;
        end else begin
          mark_pending <= 1'b0;
          ilq_load     <= 1'b1;
          state        <= WAIT_ILQ;
        end
        WAIT_ILQ: if (ilq_done) begin
          ilq_load <= 1'b0;
          ilq_ptr  <= ilq_ptr + 1'b1;
          ilq_addr <= ilq_addr + 64'd256;
          state    <= NEXT;
        end
        default: begin  // NEXT
          if (num_total == 4'd0) begin
            busy  <= 1'b0;
            state <= WAIT_FETCH;
          end else if (!ilq_done) begin
            num_total <= num_total - 4'd1;
            ilq_load  <= 1'b1;
            state     <= WAIT_ILQ;
          end
        end
      endcase
    end
  end
endmodule
