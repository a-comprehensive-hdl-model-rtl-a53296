// Shared body of the processor-level testbenches. The including module
// declares the clock, reset, RAM wires and the loon_top instance `dut`, and
// sets the localparams NDLAR (DLARs of the instance) and NEED_NOFREE (whether
// the program is expected to run out of free lines).
//
// The program boots from address 0, fetches three more instruction blocks,
// loads sources (with aliases) and destinations, runs scalar and vector
// ALU, shift, multiply, divide and remainder operations, both SELECT
// outcomes, a load that lands while WB writes, a STORE into a fresh line, a
// STORE into an aliased line, a vector ADD mixing 8-bit and 32-bit rows and
// a burst of STOREs, then HALTs. After the
// write-back unit has flushed every dirty line, RAM is compared with the
// expected results, and every mechanism must have been seen at least once.

  int checks = 0, failures = 0;
  logic [63:0] prog [$];

  function automatic logic [63:0] enc(input int op, input bit vec, input int rd, input int rs1,
                                      input int rs2, input int typ, input int sz, input int cnt,
                                      input int imm);
    return {6'(op), vec, 8'(rd), 8'(rs1), 8'(rs2), 2'(typ), 2'(sz), 4'(cnt), 1'b0, 24'(imm)};
  endfunction
  function automatic logic [63:0] sel(input int rs1, input int t1, input int t2);
    return {6'(OP_SELECT), 1'b0, 8'd0, 8'(rs1), 8'd0, 7'd0, 13'(t1), 13'(t2)};
  endfunction
  function automatic void ld(input int rd, input int a, input int typ, input int sz);
    prog.push_back(enc(OP_LOAD, 0, rd, 0, 0, typ, sz, 0, a));
  endfunction
  int n_ops = 0;
  function automatic void op(input int o, input bit v, input int rd, input int a, input int b);
    n_ops++;
    prog.push_back(enc(o, v, rd, a, b, 0, 0, 0, 0));
  endfunction
  function automatic void nop(input int n);
    repeat (n) prog.push_back(64'd0);
  endfunction

  // event counters
  int n_ilar, n_pend, n_dlq, n_nofree, n_fq, n_ex, n_sel1, n_sel2, n_lalias, n_lmiss;
  int n_snew, n_salias, n_preempt, n_wb, n_fetch, n_prio, n_retire;
  longint cyc;

  always @(posedge clk) begin
    if (!rst_n) begin
      n_ilar <= 0; n_pend <= 0; n_dlq <= 0; n_nofree <= 0; n_fq <= 0; n_ex <= 0; n_sel1 <= 0;
      n_sel2 <= 0; n_lalias <= 0; n_lmiss <= 0; n_snew <= 0; n_salias <= 0; n_preempt <= 0;
      n_wb <= 0; n_fetch <= 0; n_prio <= 0; n_retire <= 0; cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      n_ilar    <= n_ilar    + int'(events.ilar_stall);
      n_pend    <= n_pend    + int'(events.pend_stall);
      n_dlq     <= n_dlq     + int'(events.dlq_stall);
      n_nofree  <= n_nofree  + int'(events.nofree_stall);
      n_fq      <= n_fq      + int'(events.fq_stall);
      n_ex      <= n_ex      + int'(events.ex_stall);
      n_sel1    <= n_sel1    + int'(events.branch_sel1);
      n_sel2    <= n_sel2    + int'(events.branch_sel2);
      n_lalias  <= n_lalias  + int'(events.load_alias);
      n_lmiss   <= n_lmiss   + int'(events.load_miss);
      n_snew    <= n_snew    + int'(events.store_new);
      n_salias  <= n_salias  + int'(events.store_alias);
      n_preempt <= n_preempt + int'(events.dlq_preempt);
      n_wb      <= n_wb      + int'(events.wb_write);
      n_fetch   <= n_fetch   + int'(events.fetch_issue);
      n_prio    <= n_prio    + int'(events.prio_write);
      n_retire  <= n_retire  + int'(events.retire);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++; `TB_FINISH
  end

  localparam int N_BURST = 20;

  initial begin
    logic [2047:0] A, B, L, E;
    logic [63:0] a0, a1, b0;
    int n, t, n_st;
    n_st = 0;
    // data
    for (int k = 0; k < 64; k++) begin A[k*32 +: 32] = $urandom; B[k*32 +: 32] = $urandom; end
    B[63:32] = 32'd0;
    if (B[31:0] == 0) B[0] = 1'b1;
    a0 = A[63:0]; a1 = A[127:64]; b0 = B[63:0];
    ram.put_line(64'h1000, A);
    ram.put_line(64'h1100, B);

    // program
    prog.push_back(enc(OP_FETCH, 0, 1, 0, 0, 0, 0, 2, 'h100));   // ILAR1..3 <- 0x100..0x3FF
    prog.push_back(enc(OP_FETCH, 0, 5, 0, 0, 0, 0, 0, 'h100));   // ILAR5 <- 0x100 (alias of ILAR1)
    ld(1, 'h1000, 1, 3);  ld(2, 'h1008, 1, 3);  ld(3, 'h1100, 1, 3);
    ld(4, 'h2000, 1, 3);  ld(5, 'h2100, 1, 3);  ld(6, 'h1000, 1, 0);
    ld(7, 'h2200, 1, 0);  ld(8, 'h1000, 1, 2);  ld(9, 'h1100, 1, 2);
    ld(10, 'h2300, 1, 2); ld(11, 'h2400, 1, 3); ld(12, 'h2500, 1, 3);
    ld(13, 'h2508, 1, 3); ld(14, 'h2F00, 1, 3);
    nop(1);
    op(OP_ADD, 0, 4, 1, 2);       // scalar a0 + a1
    op(OP_ADD, 1, 7, 6, 6);       // vector bytes x + x
    op(OP_SLL, 1, 10, 8, 9);      // vector words a << (b & 31)
    op(OP_MUL, 0, 11, 1, 3);      // scalar a0 * b0
    op(OP_DIV, 0, 12, 1, 3);      // scalar a0 / b0
    op(OP_REM, 0, 13, 1, 3);      // scalar a0 % b0, same line, offset 8
    nop(3);
    // SELECT on a non-zero scalar: SEL1
    n = prog.size();
    prog.push_back(sel(1, n + 4, n + 3));
    op(OP_ADD, 1, 14, 1, 3); op(OP_ADD, 1, 14, 1, 3); op(OP_ADD, 1, 14, 1, 3);
    // SELECT on zero: SEL2
    n = prog.size();
    prog.push_back(sel(0, n + 3, n + 4));
    op(OP_ADD, 1, 14, 1, 3); op(OP_ADD, 1, 14, 1, 3); op(OP_ADD, 1, 14, 1, 3);
    // a load from memory while WB writes every cycle
    ld(15, 'h2600, 1, 3);
    repeat (30) op(OP_SUB, 1, 5, 1, 3);
    nop(3);
    ld(2, 'h2700, 1, 3);
    nop(1);
    op(OP_OR, 1, 2, 2, 2);        // reads the line the load queue is filling
    // a row of bytes widened to 32-bit integers and added to a row of 32-bit integers
    ld(15, 'h2600, 1, 2);
    nop(1);
    op(OP_ADD, 1, 15, 6, 9);
    nop(3);
    prog.push_back(enc(OP_STORE, 0, 5, 0, 0, 0, 0, 0, 'h2700));   // into r2's line
    nop(1);
    for (int k = 0; k < N_BURST; k++)
      prog.push_back(enc(OP_STORE, 0, 4, 0, 0, 0, 0, 0, 'h3000 + k * 'h100));
    prog.push_back(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0, 0));
    if (prog.size() > 128) $fatal(1, "program too long");
    while (prog.size() % 32 != 0) prog.push_back(64'd0);
    for (int blk = 0; blk < prog.size() / 32; blk++) begin
      for (int s = 0; s < 32; s++) L[s*64 +: 64] = prog[blk*32 + s];
      ram.put_line(64'(blk) * 256, L);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (halted);
    t = int'(cyc);
    // let the write-back unit sweep every DLAR a few times
    repeat (NDLAR * 12 + 2000) @(posedge clk);
    $display("halted after %0d cycles, %0d instructions retired", t, n_retire);

    // results
    E = '0; E[63:0] = a0 + a1;
    `TB_CHECK(ram.get_line(64'h2000) == E, "scalar ADD written back (after its DLAR moved)")
    for (int k = 0; k < N_BURST; k++)
      if (ram.get_line(64'h3000 + 64'(k) * 256) == E) n_st++;
    `TB_CHECK(n_st == N_BURST, $sformatf("%0d of %0d stored blocks", n_st, N_BURST))
    for (int k = 0; k < 32; k++) E[k*64 +: 64] = A[k*64 +: 64] - B[k*64 +: 64];
    `TB_CHECK(ram.get_line(64'h2100) == E, "vector SUB")
    `TB_CHECK(ram.get_line(64'h2700) == E, "STORE into an aliased line")
    for (int k = 0; k < 256; k++) E[k*8 +: 8] = A[k*8 +: 8] + A[k*8 +: 8];
    `TB_CHECK(ram.get_line(64'h2200) == E, "vector 8-bit ADD (carry breaks)")
    for (int k = 0; k < 64; k++) E[k*32 +: 32] = A[k*32 +: 32] << (B[k*32 +: 5]);
    `TB_CHECK(ram.get_line(64'h2300) == E, "vector 32-bit SLL")
    for (int k = 0; k < 64; k++) E[k*32 +: 32] = 32'(A[k*8 +: 8]) + B[k*32 +: 32];
    `TB_CHECK(ram.get_line(64'h2600) == E, "vector ADD of 8-bit and 32-bit rows into 32-bit words")
    E = '0; E[63:0] = a0 * b0;
    `TB_CHECK(ram.get_line(64'h2400) == E, "scalar MUL")
    E = '0; E[63:0] = a0 / b0; E[127:64] = a0 % b0;
    `TB_CHECK(ram.get_line(64'h2500) == E, "scalar DIV and REM into one line")
    `TB_CHECK(ram.get_line(64'h2F00) == '0, "no wrong-path instruction executed")
    `TB_CHECK(ram.get_line(64'h1000) == A && ram.get_line(64'h1100) == B, "sources unchanged")
    `TB_CHECK(halted && pc < 13'd128, "halted")

    // every mechanism must have happened
    `TB_CHECK(n_ilar > 0,    "ILAR stall seen")
    `TB_CHECK(n_pend > 0,    "pending-line stall seen")
    `TB_CHECK(n_dlq > 0,     "load-queue stall seen")
    `TB_CHECK(n_fq > 0,      "fetch-queue stall seen")
    `TB_CHECK(n_ex > 0,      "multiply/divide stall seen")
    `TB_CHECK(n_sel1 == 1,   "SELECT to SEL1 once")
    `TB_CHECK(n_sel2 == 1,   "SELECT to SEL2 once")
    `TB_CHECK(n_lalias == 6, $sformatf("aliased LOADs %0d", n_lalias))
    `TB_CHECK(n_lmiss == 11, $sformatf("LOAD misses %0d", n_lmiss))
    `TB_CHECK(n_snew == N_BURST, "STOREs into fresh lines")
    `TB_CHECK(n_salias == 1, "STORE into an aliased line")
    `TB_CHECK(n_preempt > 0, "load-queue write pre-empted by WB")
    `TB_CHECK(n_wb == n_ops - 6, $sformatf("WB line writes %0d", n_wb))   // 6 on wrong paths
    `TB_CHECK(n_fetch == 2,  "FETCH instructions issued")
    `TB_CHECK(n_prio > 0,    "priority write requested")
    `TB_CHECK(ram.n_writes > 0 && ram.n_reads > 0, "RAM reads and writes")
    if (NEED_NOFREE) `TB_CHECK(n_nofree > 0, "no-free-line stall seen")
    $display("events: ilar %0d pend %0d dlq %0d nofree %0d fq %0d ex %0d sel1 %0d sel2 %0d",
             n_ilar, n_pend, n_dlq, n_nofree, n_fq, n_ex, n_sel1, n_sel2);
    $display("        lalias %0d lmiss %0d snew %0d salias %0d preempt %0d wb %0d fetch %0d prio %0d retire %0d",
             n_lalias, n_lmiss, n_snew, n_salias, n_preempt, n_wb, n_fetch, n_prio, n_retire);
    `TB_FINISH
  end
