// tb_qc_decoder: decodes one instruction of every kind, built with the
// encoders of qc_asm_pkg, and checks the fields of the decoded word.
module tb_qc_decoder;
  import qc_pkg::*;
  import qc_asm_pkg::*;
  logic valid = 1;
  instr_t instr = 0;
  logic [9:0] pc = 0;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  qc_decoder dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic dec(instr_t i);
    instr = i; pc = 10'($urandom); #1;
    chk(ctrl.valid && ctrl.pc == pc, "valid and pc");
  endtask

  initial begin
    aluop_e ops [8] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SHL, ALU_SHR, ALU_MUL};
    for (int k = 0; k < 8; k++) begin
      dec(enc(k + 1, 3, 4, 5));
      chk(ctrl.op == OP_ALU && ctrl.aluop == ops[k] && ctrl.rd == 3 && ctrl.rs == 4 &&
          ctrl.rt == 5 && ctrl.wb && !ctrl.use_imm, $sformatf("alu %0d", k));
    end
    dec(i_addi(2, 7, -3));
    chk(ctrl.op == OP_ALU && ctrl.use_imm && ctrl.imm == word_t'(-3) && ctrl.rs == 7, "addi");
    dec(i_li(9, -100));
    chk(ctrl.op == OP_ALU && ctrl.use_imm && ctrl.imm == word_t'(-100) && ctrl.rs == 0 && ctrl.rd == 9, "li");
    dec(i_cmp(CC_GE, 1, 2));
    chk(ctrl.op == OP_CMP && ctrl.cc == CC_GE && !ctrl.wb, "cmp");
    dec(i_br(BR_SHARED, -7, 2));
    chk(ctrl.op == OP_BR && ctrl.brc == BR_SHARED && ctrl.fsrc == 2 && ctrl.imm == word_t'(-7), "br");
    dec(i_cldw(6, 29));
    chk(ctrl.op == OP_CLDW && ctrl.sreg == 29 && ctrl.rd == 6 && ctrl.wb, "cldw");
    dec(i_cstw(6, 17));
    chk(ctrl.op == OP_CSTW && ctrl.sreg == 17 && !ctrl.wb, "cstw");
    dec(i_bar(4'b1010));
    chk(ctrl.op == OP_BAR && ctrl.mask == 4'b1010, "bar");
    dec(i_mode(MODE_SIMD, 4'b0111));
    chk(ctrl.op == OP_MODE && ctrl.mode == MODE_SIMD && ctrl.mask == 4'b0111, "mode");
    dec(i_fpub());  chk(ctrl.op == OP_FPUB, "fpub");
    dec(i_ccfg(1)); chk(ctrl.op == OP_CCFG && ctrl.ext, "ccfg");
    dec(i_halt());  chk(ctrl.op == OP_HALT, "halt");
    dec(i_nop());   chk(ctrl.op == OP_NOP && !ctrl.wb, "nop");
    dec(i_ld(1, 2));  chk(ctrl.op == OP_LD && ctrl.wb, "ld");
    dec(i_st(1, 2));  chk(ctrl.op == OP_ST && !ctrl.wb, "st");
    dec(i_ldx(1, 2)); chk(ctrl.op == OP_LDX && ctrl.wb, "ldx");
    dec(i_stx(1, 2)); chk(ctrl.op == OP_STX, "stx");
    dec(i_lda(1, 2)); chk(ctrl.op == OP_LDA && ctrl.wb, "lda");
    dec(i_sta(1, 2)); chk(ctrl.op == OP_STA && ctrl.rd == 1 && ctrl.rs == 2, "sta");
    valid = 0; #1; chk(!ctrl.valid, "invalid passes through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
