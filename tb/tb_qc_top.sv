// tb_qc_top: end-to-end test of the QuadroCore cluster at its default size.
//
// Loads one program per core and two 4x4 matrices into external memory,
// runs the cluster to HALT and checks the results in external memory.
// The program walks through every mechanism of the cluster:
//   SIMD  - core 0 becomes master of all four cores and multiplies the
//           matrices (core c computes column c of C = A*B): A elements are
//           read with single-word loads (SIMD core offset, four-way bus
//           contention), B rows and C rows move with adjacent accesses;
//   ASYNC - a lone external load, shared-register exchange, the same
//           exchange redirected to external memory, full and partial
//           barriers;
//   SYNC  - lock-step execution of unequal instructions, a flag published
//           by core 0 and a collective branch on it, local data memory.
// Each mechanism is counted and must occur. Execute-stage durations are
// measured and checked against the access times: 6 cycles for an external
// load on a free bus, 15 for the last of four simultaneous ones, 7 for an
// adjacent access, 2 for a shared-register access and 3 for local memory.
module tb_qc_top;
  import qc_pkg::*;
  import qc_asm_pkg::*;

  localparam int EXT_WORDS = 16384;
  localparam int COMM_BASE = EXT_WORDS - NSHREGS;
  localparam int A_BASE = 'h40, B_BASE = 'h50, C_BASE = 'h60;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic ld_we = 1'b0;
  logic [CID_W-1:0] ld_core = '0;
  logic [9:0] ld_addr = '0;
  instr_t ld_data = '0;
  logic hst_en = 1'b0, hst_we = 1'b0;
  addr_t hst_addr = '0;
  word_t hst_wdata = '0, hst_rdata;
  logic [NCORES-1:0] halted;
  mode_e [NCORES-1:0] mode;

  always #5 clk = ~clk;

  qc_top dut (.*);

  int checks = 0, failures = 0;
  int cycles = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- programs ----------------
  instr_t prog [NCORES][$];

  function automatic int here(int c);
    return prog[c].size();
  endfunction

  task automatic emit(int c, instr_t i);
    prog[c].push_back(i);
  endtask

  task automatic build(int c);
    int lk, li, p;
    // setup: r1 = core number
    emit(c, i_li(1, c));
    emit(c, i_mode(MODE_SIMD, 4'b1111));
    if (c == 0) begin
      // SIMD body, executed by all four cores. r2 = A, r3 = B, r15 = C row
      emit(c, i_li(9, 4));
      emit(c, i_li(10, A_BASE));
      emit(c, i_li(15, C_BASE));
      emit(c, i_li(5, 0));
      li = here(c);
      emit(c, i_li(6, 0));              // acc
      emit(c, i_li(7, 0));              // k
      emit(c, i_li(11, B_BASE));        // B row pointer
      lk = here(c);
      emit(c, i_sub(12, 10, 1));        // A[i][k] - core offset
      emit(c, i_ldx(13, 12));           // A[i][k] on every core
      emit(c, i_lda(14, 11));           // B[k][c]
      emit(c, i_mul(13, 13, 14));
      emit(c, i_add(6, 6, 13));
      emit(c, i_addi(10, 10, 1));
      emit(c, i_addi(11, 11, 4));
      emit(c, i_addi(7, 7, 1));
      emit(c, i_cmp(CC_LT, 7, 9));
      emit(c, i_br(BR_FLAG, lk - here(c)));
      emit(c, i_sta(6, 15));            // C[i][c]
      emit(c, i_addi(15, 15, 4));
      emit(c, i_addi(5, 5, 1));
      emit(c, i_cmp(CC_LT, 5, 9));
      emit(c, i_br(BR_FLAG, li - here(c)));
      emit(c, i_mode(MODE_ASYNC, 4'b1111));
    end
    // ASYNC: a lone external load by core 0
    if (c == 0) begin
      emit(c, i_li(2, A_BASE));
      emit(c, i_ldx(3, 2));
    end
    emit(c, i_bar(4'b1111));
    // shared register exchange
    emit(c, i_li(2, (c + 1) * 10));
    emit(c, i_cstw(2, c));
    emit(c, i_bar(4'b1111));
    emit(c, i_cldw(3, (c + 1) % 4));
    emit(c, i_li(4, 'h70 + c));
    emit(c, i_stx(3, 4));
    // the same exchange through external memory
    emit(c, i_ccfg(1));
    emit(c, i_li(2, (c + 1) * 3));
    emit(c, i_cstw(2, 8 + c));
    emit(c, i_bar(4'b1111));
    emit(c, i_cldw(3, 8 + (c + 2) % 4));
    emit(c, i_ccfg(0));
    emit(c, i_li(4, 'h74 + c));
    emit(c, i_stx(3, 4));
    // partial barriers: {0,1} and {2,3}
    if (c % 2 == 1) repeat (3) emit(c, i_nop());
    emit(c, i_bar(c < 2 ? 4'b0011 : 4'b1100));
    // SYNC: lock-step
    emit(c, i_mode(MODE_SYNC, 4'b1111));
    emit(c, i_li(5, c + 1));
    emit(c, i_li(6, c));
    if (c % 2 == 0) begin
      emit(c, i_st(5, 6));
      emit(c, i_ld(7, 6));
    end else begin
      emit(c, i_nop());
      emit(c, i_add(7, 5, 0));
    end
    if (c == 0) begin
      emit(c, i_cmp(CC_EQ, 0, 0));
      emit(c, i_fpub());
    end else begin
      emit(c, i_nop());
      emit(c, i_nop());
    end
    emit(c, i_br(BR_SHARED, 3, 0));
    emit(c, i_li(8, 99));
    emit(c, i_br(BR_ALWAYS, 2));
    emit(c, i_li(8, 50 + c));
    emit(c, i_mode(MODE_ASYNC, 4'b1111));
    emit(c, i_li(4, 'h78 + c));
    emit(c, i_stx(8, 4));
    emit(c, i_li(4, 'h7C + c));
    emit(c, i_stx(7, 4));
    emit(c, i_halt());
  endtask

  // ---------------- mechanism counters and timing ----------------
  int n_bar_wait, n_lockstep_hold, n_simd_fwd, n_contention, n_adjacent;
  int n_srf_wr, n_srf_rd, n_comm_ext, n_shflag_br, n_mode_switch, n_local_ld;
  int ldx_min = 1000, ldx_max = 0, lda_bad = 0, lda_n = 0, srf_bad = 0, ld_bad = 0;

  always @(posedge clk) if (rst_n) begin
    int ncyc;
    cycles++;
    ncyc = 0;
    for (int c = 0; c < NCORES; c++) begin
      if (dut.bar_req[c] && !dut.bar_go[c]) n_bar_wait++;
      if (dut.ready[c] && !dut.advance[c]) n_lockstep_hold++;
      if (dut.slave_nxt[c] && dut.advance[c] && dut.ex_ctrl[c].valid) n_simd_fwd++;
      if (dut.m_req[c].cyc) ncyc++;
      if (dut.srf_we[c]) n_srf_wr++;
      if (dut.srf_re[c]) n_srf_rd++;
    end
    if (ncyc > 1) n_contention++;
    if (dut.adj_done != 0) n_adjacent++;
    if (dut.arb_req.cyc && dut.arb_rsp.ack && int'(dut.arb_req.adr) >= COMM_BASE) n_comm_ext++;
  end

  for (genvar c = 0; c < NCORES; c++) begin : g_mon
    always @(posedge clk) if (rst_n && dut.advance[c] && dut.g_core[c].u_core.ex_q.valid) begin
      automatic ctrl_t e = dut.g_core[c].u_core.ex_q;
      automatic int dur = int'(dut.g_core[c].u_core.cnt_q) + 1;
      automatic logic ext = dut.g_core[c].u_core.comm_ext_q;
      automatic logic async = (dut.mode[c] == MODE_ASYNC);
      if (e.op == OP_LDX) begin
        if (dur < ldx_min) ldx_min = dur;
        if (dur > ldx_max) ldx_max = dur;
      end
      if (e.op == OP_LDA || e.op == OP_STA) begin
        lda_n++;
        if (dur != 7) lda_bad++;
      end
      if (async && !ext && (e.op == OP_CLDW || e.op == OP_CSTW) && dur != 2) srf_bad++;
      if (async && (e.op == OP_LD || e.op == OP_ST) && dur != 3) ld_bad++;
      if (e.op == OP_LD) n_local_ld++;
      if (e.op == OP_MODE) n_mode_switch++;
      if (e.op == OP_BR && e.brc == BR_SHARED && dut.shflags[e.fsrc]) n_shflag_br++;
    end
  end

  // ---------------- host access ----------------
  task automatic hwrite(int a, word_t d);
    @(negedge clk);
    hst_en = 1'b1; hst_we = 1'b1; hst_addr = addr_t'(a); hst_wdata = d;
    @(negedge clk);
    hst_en = 1'b0; hst_we = 1'b0;
  endtask

  task automatic hread(int a, output word_t d);
    @(negedge clk);
    hst_en = 1'b1; hst_we = 1'b0; hst_addr = addr_t'(a);
    @(negedge clk);
    d = hst_rdata;
    hst_en = 1'b0;
  endtask

  word_t A [4][4], B [4][4];

  initial begin
    word_t d;
    int start;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCORES; c++) begin
      build(c);
      for (int i = 0; i < prog[c].size(); i++) begin
        @(negedge clk);
        ld_we = 1'b1; ld_core = CID_W'(c); ld_addr = 10'(i); ld_data = prog[c][i];
      end
    end
    @(negedge clk);
    ld_we = 1'b0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        A[i][j] = word_t'($urandom_range(0, 20)) - 5;
        B[i][j] = word_t'($urandom_range(0, 20));
        hwrite(A_BASE + 4 * i + j, A[i][j]);
        hwrite(B_BASE + 4 * i + j, B[i][j]);
      end
    @(negedge clk);
    run = 1'b1;
    start = cycles;
    wait (&halted);
    $display("cluster halted after %0d cycles", cycles - start);
    repeat (2) @(negedge clk);
    run = 1'b0;
    // C = A * B
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        word_t e;
        e = '0;
        for (int k = 0; k < 4; k++) e += A[i][k] * B[k][j];
        hread(C_BASE + 4 * i + j, d);
        check(d == e, $sformatf("C[%0d][%0d] = %0d, expected %0d", i, j, $signed(d), $signed(e)));
      end
    for (int c = 0; c < NCORES; c++) begin
      hread('h70 + c, d);
      check(d == word_t'(((c + 1) % 4 + 1) * 10), $sformatf("shared register exchange core %0d: %0d", c, d));
      hread('h74 + c, d);
      check(d == word_t'(((c + 2) % 4 + 1) * 3), $sformatf("external exchange core %0d: %0d", c, d));
      hread(COMM_BASE + 8 + c, d);
      check(d == word_t'((c + 1) * 3), $sformatf("communication word %0d: %0d", c, d));
      hread('h78 + c, d);
      check(d == word_t'(50 + c), $sformatf("collective branch core %0d: %0d", c, d));
      hread('h7C + c, d);
      check(d == word_t'(c + 1), $sformatf("lock-step data core %0d: %0d", c, d));
      check(dut.mode[c] == MODE_ASYNC, "back in ASYNC mode");
    end
    // access times
    check(ldx_min == 6, $sformatf("single external load takes %0d cycles, expected 6", ldx_min));
    check(ldx_max == 15, $sformatf("four simultaneous loads take %0d cycles, expected 15", ldx_max));
    check(lda_n > 0 && lda_bad == 0, $sformatf("%0d of %0d adjacent accesses not 7 cycles", lda_bad, lda_n));
    check(srf_bad == 0, "shared register access takes 2 cycles");
    check(ld_bad == 0, "local memory access takes 3 cycles");
    // every mechanism happened
    $display("barrier waits %0d, lock-step holds %0d, SIMD forwards %0d, bus contention %0d",
             n_bar_wait, n_lockstep_hold, n_simd_fwd, n_contention);
    $display("adjacent %0d, srf writes %0d reads %0d, external comm %0d, shared-flag branches %0d, mode switches %0d, local loads %0d",
             n_adjacent, n_srf_wr, n_srf_rd, n_comm_ext, n_shflag_br, n_mode_switch, n_local_ld);
    check(n_bar_wait > 0, "barrier wait occurred");
    check(n_lockstep_hold > 0, "lock-step hold occurred");
    check(n_simd_fwd > 0, "SIMD forwarding occurred");
    check(n_contention > 0, "bus contention occurred");
    check(n_adjacent > 0, "adjacent access occurred");
    check(n_srf_wr > 0 && n_srf_rd > 0, "shared register file used");
    check(n_comm_ext > 0, "communication through external memory occurred");
    check(n_shflag_br == NCORES, "collective branch on shared flag");
    check(n_mode_switch > 0, "mode switches occurred");
    check(n_local_ld > 0, "local memory load occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
