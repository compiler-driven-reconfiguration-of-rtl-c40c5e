// tb_qc_core: one core running alone, with the cluster around it modelled
// here: a memory slave on the bus (ack in the third cycle of a request), a
// shared register file with registered reads, its own barrier release, a
// one-cycle distribution of adjacent data and externally set shared flags.
// The program covers arithmetic, immediates, a counted loop, compares and
// branches (taken, not taken, on a shared flag), local memory, shared
// registers, external and adjacent accesses, and checks the results it
// stores to the bus memory. Execute times are checked as well: one cycle
// per ALU instruction in a straight run, 3 for local memory, 2 for shared
// registers.
module tb_qc_core;
  import qc_pkg::*;
  import qc_asm_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic ld_we = 0; logic [9:0] ld_addr = 0; instr_t ld_data = 0;
  ctrl_t dec_ctrl;
  logic ready, advance, bar_req, bar_go, srf_re, srf_we, fpub, flag, wb_ack, adj_done = 0, halted;
  mode_e mode, mode_nxt; cmask_t mask, mask_nxt, bar_mask, shflags = 4'b0100;
  sreg_idx_t srf_raddr, srf_waddr; word_t srf_rdata = 0, srf_wdata, st_data, adj_data = 0, wb_dat;
  wb_req_t wb_req;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qc_core #(.CORE_ID(0), .COMM_BASE(addr_t'(16'h0200))) dut (
    .clk, .rst_n, .run, .ld_we, .ld_addr, .ld_data,
    .dec_ctrl, .ex_ctrl_in(dec_ctrl), .slave_nxt(1'b0), .advance, .ready,
    .mode, .mask, .mode_nxt, .mask_nxt, .bar_req, .bar_mask, .bar_go,
    .srf_re, .srf_raddr, .srf_rdata, .srf_we, .srf_waddr, .srf_wdata,
    .fpub, .flag, .shflags, .wb_req, .wb_ack, .wb_dat,
    .st_data, .adj_done, .adj_data, .halted
  );
  assign advance = ready;
  assign bar_go  = bar_req;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // environment models
  word_t xmem [1024];
  word_t srf [32];
  int bcnt = 0;
  assign wb_ack = wb_req.cyc && bcnt == 2;
  assign wb_dat = xmem[wb_req.adr[9:0]];
  always @(posedge clk) begin
    bcnt <= (!wb_req.cyc || wb_ack) ? 0 : bcnt + 1;
    if (wb_ack && wb_req.we) xmem[wb_req.adr[9:0]] <= wb_req.dat[0];
    if (wb_ack && wb_req.adj && wb_req.we) xmem[wb_req.adr[9:0]] <= st_data;
    adj_done <= wb_ack && wb_req.adj;
    if (wb_ack && wb_req.adj) adj_data <= xmem[wb_req.adr[9:0]];
    if (srf_re) srf_rdata <= srf[srf_raddr];
    if (srf_we) srf[srf_waddr] <= srf_wdata;
  end

  // execute-time monitor
  int alu_run = 0, alu_run_max = 0, bad_ld = 0, bad_srf = 0, fpubs = 0;
  always @(posedge clk) if (rst_n) begin
    if (advance && dut.ex_q.valid) begin
      automatic int d = int'(dut.cnt_q) + 1;
      if (dut.ex_q.op inside {OP_LD, OP_ST} && d != 3) bad_ld++;
      if (dut.ex_q.op inside {OP_CLDW, OP_CSTW} && !dut.comm_ext_q && d != 2) bad_srf++;
      if (dut.ex_q.op == OP_ALU) alu_run++; else alu_run = 0;
      if (alu_run > alu_run_max) alu_run_max = alu_run;
    end else if (run && !halted) alu_run = 0;
    if (fpub) fpubs++;
  end

  instr_t p [$];
  initial begin
    int lp;
    foreach (xmem[i]) xmem[i] = word_t'(i * 3);
    foreach (srf[i]) srf[i] = word_t'(1000 + i);
    // straight run of 8 ALU instructions
    p.push_back(i_li(1, 7));
    p.push_back(i_li(2, -2));
    p.push_back(i_add(3, 1, 2));        // 5
    p.push_back(i_sub(4, 1, 2));        // 9
    p.push_back(i_mul(5, 3, 4));        // 45
    p.push_back(i_shl(6, 1, 1));        // 7 << 7 = 896
    p.push_back(i_xor(7, 6, 5));        // 896 ^ 45
    p.push_back(i_shr(8, 6, 3));        // 896 >> 5 = 28
    // loop: sum 1..10 into r9
    p.push_back(i_li(9, 0));
    p.push_back(i_li(10, 1));
    p.push_back(i_li(11, 11));
    lp = p.size();
    p.push_back(i_add(9, 9, 10));
    p.push_back(i_addi(10, 10, 1));
    p.push_back(i_cmp(CC_LT, 10, 11));
    p.push_back(i_br(BR_FLAG, lp - p.size()));
    // local memory
    p.push_back(i_li(12, 20));
    p.push_back(i_st(9, 12));
    p.push_back(i_ld(13, 12));          // 55
    // shared registers
    p.push_back(i_cstw(13, 5));
    p.push_back(i_cldw(14, 6));         // 1006
    // external memory: r15 = 0x100
    p.push_back(i_li(15, 64));
    p.push_back(i_add(15, 15, 15));
    p.push_back(i_add(15, 15, 15));
    p.push_back(i_stx(3, 15));          // [256] = 5
    p.push_back(i_addi(15, 15, 1));
    p.push_back(i_stx(7, 15));          // [257]
    p.push_back(i_addi(15, 15, 1));
    p.push_back(i_stx(8, 15));          // [258] = 28
    p.push_back(i_addi(15, 15, 1));
    p.push_back(i_stx(13, 15));         // [259] = 55
    p.push_back(i_addi(15, 15, 1));
    p.push_back(i_stx(14, 15));         // [260] = 1006
    p.push_back(i_li(1, 10));
    p.push_back(i_ldx(2, 1));           // 30
    p.push_back(i_lda(3, 1));           // 30 (lane 0 of core 0)
    p.push_back(i_add(2, 2, 3));        // 60
    p.push_back(i_addi(15, 15, 1));
    p.push_back(i_stx(2, 15));          // [261] = 60
    // branch on shared flag of core 2 (set) skips the next store
    p.push_back(i_br(BR_SHARED, 2, 2));
    p.push_back(i_stx(0, 15));          // skipped
    p.push_back(i_br(BR_SHARED, 2, 1)); // flag of core 1 clear: falls through
    p.push_back(i_addi(15, 15, 1));
    p.push_back(i_stx(1, 15));          // [262] = 10
    // communication through external memory
    p.push_back(i_ccfg(1));
    p.push_back(i_cstw(1, 3));          // [0x203] = 10
    p.push_back(i_ccfg(0));
    p.push_back(i_cmp(CC_GE, 1, 0));
    p.push_back(i_fpub());
    p.push_back(i_bar(4'b0001));
    p.push_back(i_halt());
    p.push_back(i_stx(1, 0));           // must not run
    @(negedge clk); rst_n = 1;
    foreach (p[i]) begin
      @(negedge clk); ld_we = 1; ld_addr = 10'(i); ld_data = p[i];
    end
    @(negedge clk); ld_we = 0; run = 1;
    wait (halted);
    repeat (10) @(negedge clk);
    chk(xmem[256] == 5, "add");
    chk(xmem[257] == (896 ^ 45), "mul, shl, xor");
    chk(xmem[258] == 28, "shr");
    chk(xmem[259] == 55, "loop and local memory");
    chk(srf[5] == 55, "shared register write");
    chk(xmem[260] == 1006, "shared register read");
    chk(xmem[261] == 60, "external and adjacent load");
    chk(xmem[262] == 10, "shared-flag branch taken and not taken");
    chk(xmem[0] == 0, "nothing runs after halt, skipped store skipped");
    chk(xmem['h203] == 10, "communication through external memory");
    chk(flag == 1 && fpubs == 1, "flag published");
    chk(alu_run_max >= 8, $sformatf("one ALU instruction per cycle (run %0d)", alu_run_max));
    chk(bad_ld == 0, "local memory takes 3 cycles");
    chk(bad_srf == 0, "shared register access takes 2 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
