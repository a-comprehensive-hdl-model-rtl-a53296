// ilq: instruction load queue.
//
// Loads one instruction block for the fetch queue: it requests the block
// from the memory bus guard, and when the read is done writes it into the
// ILAR bank (target pointer, data and block address together, so aliased
// ILARs are refreshed in the same cycle). It then raises done to the fetch
// queue and waits for the fetch queue to drop load.
//
// States: 0 wait for load, 1 wait for read from MBG, 2 commit write (write
// is high for exactly one cycle), 3 signal fetch queue.
module ilq
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W,
  parameter int unsigned IPTR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch queue
  input  logic              load,
  input  logic [IPTR_W-1:0] load_ptr,
  input  logic [63:0]       load_addr,
  output logic              done,
  // memory bus guard
  output logic              read_i_rdy,
  output logic [63:0]       read_i_addr,
  input  logic [LINE_W-1:0] read_i_data,
  input  logic              read_i_done,
  // ILAR bank
  output logic              write,
  output logic [IPTR_W-1:0] line_ptr,
  output logic [LINE_W-1:0] line_data,
  output logic [63:0]       line_addr
);
  typedef enum logic [1:0] {WAIT_LOAD = 2'd0, WAIT_READ = 2'd1, COMMIT = 2'd2, SIGNAL = 2'd3} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= WAIT_LOAD;
      done        <= 1'b0;
      read_i_rdy  <= 1'b0;
      read_i_addr <= '0;
      write       <= 1'b0;
      line_ptr    <= '0;
      line_data   <= '0;
      line_addr   <= '0;
    end else begin
      unique case (state)
        WAIT_LOAD: if (load) begin
          read_i_addr <= load_addr;
          read_i_rdy  <= 1'b1;
          line_ptr    <= load_ptr;
          line_addr   <= load_addr;
          state       <= WAIT_READ;
        end
        WAIT_READ: if (read_i_done) begin
          read_i_rdy <= 1'b0;
          line_data  <= read_i_data;
          write      <= 1'b1;
          state      <= COMMIT;
        end
        COMMIT: begin
          write <= 1'b0;
          done  <= 1'b1;
          state <= SIGNAL;
        end
        default: if (!load) begin  // SIGNAL
          done  <= 1'b0;
          state <= WAIT_LOAD;
        end
      endcase
    end
  end
endmodule
