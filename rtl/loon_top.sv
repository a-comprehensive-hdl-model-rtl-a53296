// loon_top: the LOON processor, a six-stage pipeline built entirely on line
// associative registers (LARs), with its decoupled LAR memory system.
//
// Pipeline (one instruction per cycle when nothing stalls):
//   IF/ID  the PC selects an instruction in the ILAR bank (PC[12:5] ILAR,
//          PC[4:0] slot); the decoding unit turns it into a control bundle.
//   MDF    DLAR meta data (address, type, size, line pointer) is read for
//          rd, rs1 and rs2.
//   LDF    the DLAR lines of rs1 and rs2 are read. Shift & Mask takes the
//          scalar of rs1 at its byte offset; Zero? and the branch multiplexer
//          resolve SELECT; the memory address adder forms LOAD/STORE/FETCH
//          addresses. LOAD, STORE and FETCH act here (meta update, reference
//          counts, line copy, hand-off to the load/fetch queues).
//   SH/CD  shift units move scalar operands to offset 0; the polymorphic
//          conversion units convert each source from its own size and sign
//          to the destination's size.
//   EX     carry-break ALU, arithmetic shift unit, multi-cycle multiplier
//          and divider; the result multiplexer picks one.
//   WB     the shift-mask unit merges a scalar result into the destination
//          line at its offset (a vector result replaces it) and the line is
//          written to the line data bank, marking it dirty.
// The operation's size and type are the destination DLAR's tags.
//
// The pipeline is not interlocked: there is no forwarding and no check of
// register dependences, so code must leave enough distance between a write
// and a read of the same DLAR (three instructions between a result and its
// use; one between a LOAD/STORE and an instruction naming the same DLAR).
// It does stall on a pending or unfilled ILAR (IF), on a pending DLAR line
// (LDF), on a busy data load queue or fetch queue, when no line is free, and
// while the multiplier or divider works (EX). A SELECT squashes the two
// younger instructions and redirects the PC; HALT stops fetching and raises
// halted when it leaves WB.
//
// DLARs use the single-copy method: aliased DLARs share one physical line.
// A LOAD whose block is already held by a valid DLAR just points the
// destination at that line; otherwise it takes a free line, which the data
// load queue fills from memory. A STORE moves the destination to a new
// address, copying its data into a fresh line (or into the line of a DLAR
// already holding that block). References move with LOAD and STORE only.
// Writeback to memory is lazy: the memory writeback unit walks the DLARs and
// writes dirty lines out through the memory bus guard, which also serves the
// load queues. After reset the core fetches one block from boot_addr into
// ILAR 0 and starts at PC 0.
//
// RAM port: mem_read/mem_write with mem_addr (and mem_data_w) held until the
// RAM answers with a one-cycle mem_rrdy (mem_data_r valid) or mem_wrdy.
// events brings out one-cycle flags of the mechanisms above.
//
// The six stages, the units and the memory system follow the architecture;
// the instruction encoding, boot sequence, branch squash, the hazard
// distances and the numbers of DLARs (256) and lines (512) are this design's
// choices.
module loon_top
  import loon_pkg::*;
#(
  parameter int unsigned LINE_W    = loon_pkg::LAR_LINE_W,
  parameter int unsigned NUM_ILAR  = 256,
  parameter int unsigned NUM_DLAR  = 256,
  parameter int unsigned NUM_LINES = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [63:0]       boot_addr,
  // RAM
  output logic [63:0]       mem_addr,
  output logic              mem_read,
  output logic              mem_write,
  output logic [LINE_W-1:0] mem_data_w,
  input  logic [LINE_W-1:0] mem_data_r,
  input  logic              mem_rrdy,
  input  logic              mem_wrdy,
  // status
  output logic              halted,
  output logic [PC_W-1:0]   pc,
  output events_t           events
);
  localparam int unsigned IW = $clog2(NUM_ILAR);
  localparam int unsigned DW = $clog2(NUM_DLAR);
  localparam int unsigned PW = $clog2(NUM_LINES);

  // ------------------------------------------------------------------
  // Pipeline registers
  // ------------------------------------------------------------------
  ctrl_t             c2, c3, c4, c5, c6;
  meta_t             m3 [3];
  logic [PW-1:0]     p3 [3];
  meta_t             m4 [3];
  logic [PW-1:0]     p4_rd;
  logic [LINE_W-1:0] a4, b4;
  logic [LINE_W-1:0] a5, b5;
  meta_t             m5_rd, m6_rd;
  logic [PW-1:0]     p5_rd, p6_rd;
  logic [LINE_W-1:0] r6;

  logic hold5, hold3, ldf_block, squash, stop_fetch, boot_q;

  // ------------------------------------------------------------------
  // IF/ID
  // ------------------------------------------------------------------
  logic [63:0] instr;
  logic        instr_ok;
  ctrl_t       dec;

  // memory-system wires
  logic              fq_busy, fq_mark, ilq_load, ilq_done, ilar_write;
  logic [IW-1:0]     fq_pptr, ilq_ptr, ilar_ptr;
  logic [63:0]       ilq_addr, ilar_addr;
  logic [LINE_W-1:0] ilar_data;
  logic              fq_fetch;
  logic [IW-1:0]     fq_dest;
  logic [3:0]        fq_cnt;
  logic [63:0]       fq_addr;

  ilar_bank #(.LINE_W(LINE_W), .NUM_ILAR(NUM_ILAR)) u_ilar (
    .clk, .rst_n, .pc, .instr, .instr_ok,
    .pending(fq_mark), .p_ptr(fq_pptr),
    .write(ilar_write), .line_ptr(ilar_ptr), .line_data(ilar_data), .line_addr(ilar_addr));

  ldu u_ldu (.instr, .ctrl(dec));

  // ------------------------------------------------------------------
  // MDF: meta data fetch (ports 0..2), LDF destination re-read (port 3)
  // ------------------------------------------------------------------
  logic [DW-1:0] md_idx [4];
  meta_t         md_meta [4];
  logic [PW-1:0] md_ptr [4];
  logic          md_valid [4];
  logic          md_wc;
  logic [63:0]   md_waddr;
  logic [1:0]    md_wtype, md_wsize;
  logic [PW-1:0] md_wptr;
  logic          comp_result;
  logic [PW-1:0] comp_line;
  logic [63:0]   comp_addr;
  logic [DW-1:0] mwu_meta_addr;
  logic          mwu_meta_valid;
  logic [PW-1:0] mwu_line_ptr_in;
  logic [63:0]   mwu_line_addr;

  assign md_idx[0] = c2.rd[DW-1:0];
  assign md_idx[1] = c2.rs1[DW-1:0];
  assign md_idx[2] = c2.rs2[DW-1:0];
  assign md_idx[3] = c3.rd[DW-1:0];

  dlar_meta_bank #(.NUM_DLAR(NUM_DLAR), .NUM_LINES(NUM_LINES)) u_mdb (
    .clk, .rst_n,
    .rd_idx(md_idx), .rd_meta(md_meta), .rd_ptr(md_ptr), .rd_valid(md_valid),
    .meta_addr(mwu_meta_addr), .meta_valid(mwu_meta_valid),
    .line_ptr_in(mwu_line_ptr_in), .line_addr(mwu_line_addr),
    .w_commit(md_wc), .write_line(c3.rd[DW-1:0]), .write_addr(md_waddr),
    .write_type(md_wtype), .write_size(md_wsize), .write_ptr(md_wptr),
    .comp_addr, .comp_result, .comp_line);

  // ------------------------------------------------------------------
  // LDF: line data fetch, branch, LOAD/STORE/FETCH
  // ------------------------------------------------------------------
  logic [PW-1:0]     ld_rptr [3];
  logic [LINE_W-1:0] ld_rdata [3];
  logic              ld_rpend [3];
  logic [PW-1:0]     wbr_ptr;
  logic [LINE_W-1:0] wbr_data;
  logic              wb_we;
  logic [LINE_W-1:0] wb_line;
  logic              dlq_we, dlq_accept, dlq_pend, dlq_busy, dlq_load;
  logic [PW-1:0]     dlq_wptr, dlq_pptr;
  logic [LINE_W-1:0] dlq_wdata;
  logic              cp_en, inc_en, dec_en, tag_en;
  logic [PW-1:0]     cp_src, cp_dst, inc_ptr, dec_ptr, tag_ptr;
  logic              free_ok;
  logic [PW-1:0]     free_ptr;
  logic [PW-1:0]     mwu_ptr;
  logic [LINE_W-1:0] mwu_data;
  logic              mwu_dirty, mwu_clean, prio_req;
  logic [PW-1:0]     prio_ptr;
  logic [63:0]       prio_addr;

  assign ld_rptr[0] = p3[0];
  assign ld_rptr[1] = p3[1];
  assign ld_rptr[2] = p3[2];

  dlar_line_bank #(.LINE_W(LINE_W), .NUM_LINES(NUM_LINES), .NUM_DLAR(NUM_DLAR)) u_ldb (
    .clk, .rst_n,
    .rd_ptr(ld_rptr), .rd_data(ld_rdata), .rd_pend(ld_rpend),
    .wbr_ptr, .wbr_data,
    .wb_we, .wb_ptr(p6_rd), .wb_data(wb_line),
    .dlq_we, .dlq_ptr(dlq_wptr), .dlq_data(dlq_wdata), .dlq_accept,
    .pend_set(dlq_pend), .pend_ptr(dlq_pptr),
    .cp_en, .cp_src, .cp_dst,
    .inc_en, .inc_ptr, .dec_en, .dec_ptr, .tag_en, .tag_ptr, .tag_addr(comp_addr),
    .free_ok, .free_ptr,
    .mwu_ptr, .mwu_data, .mwu_dirty, .mark_clean(mwu_clean),
    .prio_req, .prio_ptr, .prio_addr);

  logic [63:0]     scalar1, ldf_addr;
  logic            zero1;
  logic [PC_W-1:0] branch_pc;

  branch_unit #(.LINE_W(LINE_W)) u_br (
    .line(ld_rdata[1]), .offset(m3[1].addr[7:0]), .size(m3[1].size),
    .sel1(c3.sel1), .sel2(c3.sel2), .imm(c3.imm),
    .scalar(scalar1), .zero(zero1), .next_pc(branch_pc), .mem_addr(ldf_addr));

  assign comp_addr = ldf_addr;

  logic uses_rs1, uses_rs2, uses_rd, mem_op, pend_hit;
  logic need_free, dlq_wait, fq_wait, st_wait, ldf_go;
  logic [PW-1:0] old_ptr;

  assign uses_rs1 = c3.valid && (c3.unit != U_NONE || c3.is_select || c3.is_load ||
                                 c3.is_store || c3.is_fetch);
  assign uses_rs2 = c3.valid && (c3.unit != U_NONE);
  assign uses_rd  = c3.valid && (c3.writes_rd || c3.is_store);
  assign mem_op   = c3.valid && (c3.is_load || c3.is_store);
  assign pend_hit = (uses_rs1 && ld_rpend[1]) || (uses_rs2 && ld_rpend[2]) ||
                    (uses_rd && ld_rpend[0]);
  assign old_ptr  = md_ptr[3];
  assign need_free = mem_op && !comp_result;
  assign dlq_wait  = c3.valid && c3.is_load && !comp_result && dlq_busy;
  assign fq_wait   = c3.valid && c3.is_fetch && (fq_busy || boot_q);
  // A STORE that copies into a line the load queue is still filling waits
  // for the fill, so the loaded data cannot overwrite the stored copy.
  assign st_wait   = c3.valid && c3.is_store && comp_result && dlq_busy && comp_line == dlq_wptr;
  assign ldf_block = pend_hit || (need_free && !free_ok) || dlq_wait || fq_wait || st_wait;
  assign ldf_go    = c3.valid && !ldf_block && !hold5;

  always_comb begin
    md_wc    = 1'b0;
    md_waddr = ldf_addr;
    md_wtype = c3.new_type;
    md_wsize = c3.new_size;
    md_wptr  = comp_result ? comp_line : free_ptr;
    cp_en    = 1'b0;
    cp_src   = old_ptr;
    cp_dst   = md_wptr;
    inc_en   = 1'b0;
    inc_ptr  = md_wptr;
    dec_en   = 1'b0;
    dec_ptr  = old_ptr;
    tag_en   = 1'b0;
    tag_ptr  = free_ptr;
    dlq_load = 1'b0;
    if (ldf_go && c3.is_load) begin
      md_wc    = 1'b1;
      inc_en   = 1'b1;
      dec_en   = 1'b1;
      tag_en   = !comp_result;
      dlq_load = !comp_result;
    end
    if (ldf_go && c3.is_store) begin
      // STORE keeps the DLAR's own tags and moves its data to the new block
      md_wc    = 1'b1;
      md_wtype = md_meta[3].typ;
      md_wsize = md_meta[3].size;
      inc_en   = 1'b1;
      dec_en   = 1'b1;
      tag_en   = !comp_result;
      cp_en    = !(comp_result && comp_line == old_ptr);
    end
  end

  // FETCH (or the boot fetch) to the fetch queue
  assign fq_fetch = boot_q || (ldf_go && c3.is_fetch);
  assign fq_dest  = boot_q ? '0 : c3.rd[IW-1:0];
  assign fq_cnt   = boot_q ? 4'd0 : c3.count_m1;
  assign fq_addr  = boot_q ? boot_addr : ldf_addr;

  assign squash = ldf_go && (c3.is_select || c3.is_halt);
  assign hold3  = hold5 || (c3.valid && ldf_block);

  // ------------------------------------------------------------------
  // SH/CD: shift to offset 0 and convert to the operation size
  // ------------------------------------------------------------------
  logic [LINE_W-1:0] sh_a, sh_b, cv_a, cv_b;

  shift_unit #(.LINE_W(LINE_W)) u_sh0 (.line_in(a4), .offset(m4[1].addr[7:0]), .vector(c4.vector), .line_out(sh_a));
  shift_unit #(.LINE_W(LINE_W)) u_sh1 (.line_in(b4), .offset(m4[2].addr[7:0]), .vector(c4.vector), .line_out(sh_b));
  leph #(.LINE_W(LINE_W)) u_leph0 (.in_line(sh_a), .src_size(m4[1].size), .dst_size(m4[0].size),
                                   .src_signed(m4[1].typ == T_SINT), .out_line(cv_a));
  leph #(.LINE_W(LINE_W)) u_leph1 (.in_line(sh_b), .src_size(m4[2].size), .dst_size(m4[0].size),
                                   .src_signed(m4[2].typ == T_SINT), .out_line(cv_b));

  // ------------------------------------------------------------------
  // EX
  // ------------------------------------------------------------------
  logic [LINE_W-1:0] alu_r, asu_r, mul_r, div_q, div_r, ex_r;
  logic [LINE_W/8-1:0] alu_cout;
  logic mul_start, mul_busy, mul_done, div_start, div_busy, div_done, ex_wait;
  logic is_mul5, is_div5;

  cb_alu #(.LINE_W(LINE_W)) u_alu (.a(a5), .b(b5), .op(c5.alu_op), .size(m5_rd.size), .r(alu_r), .cout(alu_cout));
  asu    #(.LINE_W(LINE_W)) u_asu (.a(a5), .b(b5), .opcode({c5.asu_op[3:2], m5_rd.size}), .r(asu_r));

  assign is_mul5   = c5.valid && c5.unit == U_MUL;
  assign is_div5   = c5.valid && c5.unit == U_DIV;
  assign mul_start = is_mul5 && !ex_wait;
  assign div_start = is_div5 && !ex_wait;

  vmul #(.LINE_W(LINE_W)) u_mul (.clk, .rst_n, .start(mul_start), .a(a5), .b(b5), .size(m5_rd.size),
                                 .busy(mul_busy), .done(mul_done), .result(mul_r));
  vdiv #(.LINE_W(LINE_W)) u_div (.clk, .rst_n, .start(div_start), .a(a5), .b(b5), .size(m5_rd.size),
                                 .is_signed(m5_rd.typ == T_SINT), .busy(div_busy), .done(div_done),
                                 .quotient(div_q), .remainder(div_r));

  assign hold5 = (is_mul5 && !(ex_wait && mul_done)) || (is_div5 && !(ex_wait && div_done));

  // result select
  always_comb begin
    unique case (c5.unit)
      U_ASU:   ex_r = asu_r;
      U_MUL:   ex_r = mul_r;
      U_DIV:   ex_r = c5.is_rem ? div_r : div_q;
      default: ex_r = alu_r;
    endcase
  end

  // ------------------------------------------------------------------
  // WB
  // ------------------------------------------------------------------
  assign wbr_ptr = p6_rd;
  wb_shift_mask #(.LINE_W(LINE_W)) u_wbsm (.result(r6), .old_line(wbr_data), .offset(m6_rd.addr[7:0]),
                                           .size(m6_rd.size), .vector(c6.vector), .new_line(wb_line));
  assign wb_we = c6.valid && c6.writes_rd;

  // ------------------------------------------------------------------
  // Pipeline register updates
  // ------------------------------------------------------------------
  localparam ctrl_t BUBBLE = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= '0;
      c2         <= BUBBLE;
      c3         <= BUBBLE;
      c4         <= BUBBLE;
      c5         <= BUBBLE;
      c6         <= BUBBLE;
      for (int i = 0; i < 3; i++) begin
        m3[i] <= '0; p3[i] <= '0; m4[i] <= '0;
      end
      p4_rd      <= '0;
      a4         <= '0;
      b4         <= '0;
      a5         <= '0;
      b5         <= '0;
      m5_rd      <= '0;
      m6_rd      <= '0;
      p5_rd      <= '0;
      p6_rd      <= '0;
      r6         <= '0;
      ex_wait    <= 1'b0;
      stop_fetch <= 1'b0;
      halted     <= 1'b0;
      boot_q     <= 1'b1;
    end else begin
      if (boot_q && !fq_busy) boot_q <= 1'b0;

      // WB <- EX
      if (hold5) begin
        c6 <= BUBBLE;
      end else begin
        c6    <= c5;
        r6    <= ex_r;
        m6_rd <= m5_rd;
        p6_rd <= p5_rd;
      end
      if (c6.valid && c6.is_halt) halted <= 1'b1;

      // multi-cycle unit bookkeeping
      if (mul_start || div_start) ex_wait <= 1'b1;
      if (ex_wait && (mul_done || div_done)) ex_wait <= 1'b0;

      // EX <- SH/CD
      if (!hold5) begin
        c5    <= c4;
        a5    <= cv_a;
        b5    <= cv_b;
        m5_rd <= m4[0];
        p5_rd <= p4_rd;
      end

      // SH/CD <- LDF
      if (!hold5) begin
        if (hold3) c4 <= BUBBLE;
        else begin
          c4    <= c3;
          m4    <= m3;
          p4_rd <= p3[0];
          a4    <= ld_rdata[1];
          b4    <= ld_rdata[2];
        end
      end

      // LDF <- MDF
      if (!hold3) begin
        c3 <= squash ? BUBBLE : c2;
        for (int i = 0; i < 3; i++) begin
          m3[i] <= md_meta[i];
          p3[i] <= md_ptr[i];
        end
      end

      // MDF <- IF/ID, PC
      if (!hold3) begin
        if (squash) begin
          c2 <= BUBBLE;
          if (c3.is_select) pc <= branch_pc;
          if (c3.is_halt)   stop_fetch <= 1'b1;
        end else if (stop_fetch || !instr_ok) begin
          c2 <= BUBBLE;
        end else begin
          c2 <= dec;
          pc <= pc + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Memory system
  // ------------------------------------------------------------------
  logic              rd_d_rdy, rd_d_done, rd_i_rdy, rd_i_done, wr_rdy, wr_done;
  logic [63:0]       rd_d_addr, rd_i_addr, wr_addr;
  logic [LINE_W-1:0] rd_d_data, rd_i_data, wr_data;

  fq #(.IPTR_W(IW)) u_fq (
    .clk, .rst_n, .fetch(fq_fetch), .fetch_dest(fq_dest), .fetch_count_m1(fq_cnt),
    .fetch_addr(fq_addr), .busy(fq_busy), .mark_pending(fq_mark), .p_ptr(fq_pptr),
    .ilq_load, .ilq_ptr, .ilq_addr, .ilq_done);

  ilq #(.LINE_W(LINE_W), .IPTR_W(IW)) u_ilq (
    .clk, .rst_n, .load(ilq_load), .load_ptr(ilq_ptr), .load_addr(ilq_addr), .done(ilq_done),
    .read_i_rdy(rd_i_rdy), .read_i_addr(rd_i_addr), .read_i_data(rd_i_data), .read_i_done(rd_i_done),
    .write(ilar_write), .line_ptr(ilar_ptr), .line_data(ilar_data), .line_addr(ilar_addr));

  dlq #(.LINE_W(LINE_W), .PTR_W(PW)) u_dlq (
    .clk, .rst_n, .load(dlq_load), .load_addr(ldf_addr), .load_ptr(free_ptr), .busy(dlq_busy),
    .read_d_rdy(rd_d_rdy), .read_d_addr(rd_d_addr), .read_d_data(rd_d_data), .read_d_done(rd_d_done),
    .pending(dlq_pend), .pending_ptr(dlq_pptr), .write(dlq_we), .line_ptr(dlq_wptr),
    .line_data(dlq_wdata), .wb_assert(wb_we));

  mwu #(.LINE_W(LINE_W), .DPTR_W(DW), .PTR_W(PW)) u_mwu (
    .clk, .rst_n, .meta_addr(mwu_meta_addr), .meta_valid(mwu_meta_valid),
    .line_ptr_in(mwu_line_ptr_in), .line_addr(mwu_line_addr),
    .line_ptr_out(mwu_ptr), .line_data(mwu_data), .line_dirty(mwu_dirty), .mark_clean(mwu_clean),
    .prio_req, .prio_ptr, .prio_addr,
    .write_rdy(wr_rdy), .write_addr(wr_addr), .write_data(wr_data), .write_done(wr_done));

  mbg #(.LINE_W(LINE_W)) u_mbg (
    .clk, .rst_n,
    .read_d_rdy(rd_d_rdy), .read_d_addr(rd_d_addr), .read_d_data(rd_d_data), .read_d_done(rd_d_done),
    .read_i_rdy(rd_i_rdy), .read_i_addr(rd_i_addr), .read_i_data(rd_i_data), .read_i_done(rd_i_done),
    .write_rdy(wr_rdy), .write_addr(wr_addr), .write_data(wr_data), .write_done(wr_done),
    .mem_addr, .mem_data_w, .mem_data_r, .mem_read, .mem_write, .mem_rrdy, .mem_wrdy);

  // ------------------------------------------------------------------
  // Events
  // ------------------------------------------------------------------
  always_comb begin
    events              = '0;
    events.ilar_stall   = !hold3 && !squash && !stop_fetch && !instr_ok;
    events.pend_stall   = !hold5 && pend_hit;
    events.dlq_stall    = !hold5 && !pend_hit && (dlq_wait || st_wait);
    events.nofree_stall = !hold5 && !pend_hit && need_free && !free_ok;
    events.fq_stall     = !hold5 && !pend_hit && fq_wait;
    events.ex_stall     = hold5;
    events.branch_sel1  = ldf_go && c3.is_select && !zero1;
    events.branch_sel2  = ldf_go && c3.is_select && zero1;
    events.load_alias   = ldf_go && c3.is_load && comp_result;
    events.load_miss    = ldf_go && c3.is_load && !comp_result;
    events.store_new    = ldf_go && c3.is_store && !comp_result;
    events.store_alias  = ldf_go && c3.is_store && comp_result && comp_line != old_ptr;
    events.dlq_preempt  = dlq_we && wb_we;
    events.wb_write     = wb_we;
    events.fetch_issue  = ldf_go && c3.is_fetch;
    events.prio_write   = prio_req;
    events.retire       = c6.valid;
  end

  // scalar1 is also observable through the branch and address paths
  logic unused_ok;
  assign unused_ok = ^{scalar1, alu_cout, mul_busy, div_busy, md_valid[0], md_valid[1],
                       md_valid[2], md_valid[3], m3[0].addr[63:8], p4_rd[0]};
endmodule
