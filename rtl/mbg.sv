// mbg: memory bus guard.
//
// Arbitrates three requesters onto one line-wide RAM port: data-line reads
// from the data load queue (highest priority), instruction-block reads from
// the instruction load queue (medium) and lazy data writebacks from the
// memory writeback unit (lowest). It serves one request at a time and does
// no queuing of its own.
//
// States: 0 idle (all buses and ready signals cleared); 1 DLAR read in
// progress (waiting for mem_rrdy); 2 DLAR read finished, read_d_done held
// until the DLQ drops read_d_rdy; 3 and 4 the same for ILAR reads; 5 write in
// progress (waiting for mem_wrdy); 6 write finished, write_done held until
// the MWU drops write_rdy. A requester confirms by dropping its request
// line, and may raise it again only after seeing done fall.
//
// RAM protocol: mem_read or mem_write stays high with mem_addr (and
// mem_data_w) stable until the RAM answers with mem_rrdy (mem_data_r valid)
// or mem_wrdy for one cycle.
module mbg
#(
  parameter int unsigned LINE_W = loon_pkg::LAR_LINE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // data load queue
  input  logic              read_d_rdy,
  input  logic [63:0]       read_d_addr,
  output logic [LINE_W-1:0] read_d_data,
  output logic              read_d_done,
  // instruction load queue
  input  logic              read_i_rdy,
  input  logic [63:0]       read_i_addr,
  output logic [LINE_W-1:0] read_i_data,
  output logic              read_i_done,
  // memory writeback unit
  input  logic              write_rdy,
  input  logic [63:0]       write_addr,
  input  logic [LINE_W-1:0] write_data,
  output logic              write_done,
  // RAM
  output logic [63:0]       mem_addr,
  output logic [LINE_W-1:0] mem_data_w,
  input  logic [LINE_W-1:0] mem_data_r,
  output logic              mem_read,
  output logic              mem_write,
  input  logic              mem_rrdy,
  input  logic              mem_wrdy
);
  typedef enum logic [2:0] {
    IDLE = 3'd0, RD_D = 3'd1, DONE_D = 3'd2, RD_I = 3'd3, DONE_I = 3'd4,
    WR = 3'd5, DONE_W = 3'd6
  } state_e;

  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      mem_addr    <= '0;
      mem_data_w  <= '0;
      mem_read    <= 1'b0;
      mem_write   <= 1'b0;
      read_d_data <= '0;
      read_i_data <= '0;
      read_d_done <= 1'b0;
      read_i_done <= 1'b0;
      write_done  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          read_d_done <= 1'b0;
          read_i_done <= 1'b0;
          write_done  <= 1'b0;
          if (read_d_rdy) begin
            mem_addr <= read_d_addr;
            mem_read <= 1'b1;
            state    <= RD_D;
          end else if (read_i_rdy) begin
            mem_addr <= read_i_addr;
            mem_read <= 1'b1;
            state    <= RD_I;
          end else if (write_rdy) begin
            mem_addr   <= write_addr;
            mem_data_w <= write_data;
            mem_write  <= 1'b1;
            state      <= WR;
          end
        end
        RD_D: if (mem_rrdy) begin
          read_d_data <= mem_data_r;
          read_d_done <= 1'b1;
          mem_read    <= 1'b0;
          state       <= DONE_D;
        end
        DONE_D: if (!read_d_rdy) begin
          read_d_done <= 1'b0;
          state       <= IDLE;
        end
        RD_I: if (mem_rrdy) begin
          read_i_data <= mem_data_r;
          read_i_done <= 1'b1;
          mem_read    <= 1'b0;
          state       <= DONE_I;
        end
        DONE_I: if (!read_i_rdy) begin
          read_i_done <= 1'b0;
          state       <= IDLE;
        end
        WR: if (mem_wrdy) begin
          write_done <= 1'b1;
          mem_write  <= 1'b0;
          state      <= DONE_W;
        end
        default: if (!write_rdy) begin  // DONE_W
          write_done <= 1'b0;
          state      <= IDLE;
        end
      endcase
    end
  end

  // Only one RAM operation at a time
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(mem_read && mem_write));
endmodule
