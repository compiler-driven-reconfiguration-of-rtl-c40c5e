// qc_decoder: instruction decoder of one core.
//
// Combinational. Turns a 16-bit instruction (encoding in qc_pkg) and its
// address into the decoded control word ctrl_t used by the execute stage.
// The decoded word carries the register numbers and the sign-extended
// immediate, so that in SIMD mode the decoder of the group master can
// forward "control and data signals" to the other cores and each of them
// executes the instruction on its own register bank. The reconfiguration
// instructions (MODE, BAR, FPUB, CCFG) and the shared-register transfers
// (CLDW, CSTW) are the extensions the architecture adds to the base core;
// their bit encoding is this design's own.
module qc_decoder
  import qc_pkg::*;
(
  input  logic       valid,
  input  instr_t     instr,
  input  logic [9:0] pc,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl         = CTRL_BUBBLE;
    ctrl.valid   = valid;
    ctrl.pc      = pc;
    ctrl.rd      = instr[11:8];
    ctrl.rs      = instr[7:4];
    ctrl.rt      = instr[3:0];
    ctrl.op      = OP_NOP;
    ctrl.aluop   = ALU_ADD;
    ctrl.cc      = CC_EQ;
    ctrl.brc     = BR_ALWAYS;
    ctrl.mode    = MODE_ASYNC;
    unique case (opcode_e'(instr[15:12]))
      OPC_SYS: begin
        unique case (instr[11:8])
          4'd1: ctrl.op = OP_HALT;
          4'd2: begin ctrl.op = OP_BAR;  ctrl.mask = instr[NCORES-1:0]; end
          4'd3: begin
            ctrl.op   = OP_MODE;
            ctrl.mask = instr[NCORES-1:0];
            ctrl.mode = mode_e'(instr[5:4]);
          end
          4'd4: ctrl.op = OP_FPUB;
          4'd5: begin ctrl.op = OP_CCFG; ctrl.ext = instr[0]; end
          default: ctrl.op = OP_NOP;
        endcase
      end
      OPC_ADD, OPC_SUB, OPC_AND, OPC_OR, OPC_XOR, OPC_SHL, OPC_SHR, OPC_MUL: begin
        ctrl.op    = OP_ALU;
        ctrl.aluop = aluop_e'(instr[14:12] - 3'd1);
        ctrl.wb    = 1'b1;
      end
      OPC_ADDI: begin
        ctrl.op      = OP_ALU;
        ctrl.aluop   = ALU_ADD;
        ctrl.use_imm = 1'b1;
        ctrl.imm     = {{(XLEN-4){instr[3]}}, instr[3:0]};
        ctrl.wb      = 1'b1;
      end
      OPC_LI: begin
        ctrl.op      = OP_ALU;
        ctrl.aluop   = ALU_ADD;
        ctrl.rs      = '0;
        ctrl.use_imm = 1'b1;
        ctrl.imm     = {{(XLEN-8){instr[7]}}, instr[7:0]};
        ctrl.wb      = 1'b1;
      end
      OPC_CMP: begin
        ctrl.op = OP_CMP;
        ctrl.cc = cond_e'(instr[10:8]);
      end
      OPC_BR: begin
        ctrl.op   = OP_BR;
        ctrl.brc  = brcond_e'(instr[11:10]);
        ctrl.fsrc = instr[8 +: CID_W];
        ctrl.imm  = {{(XLEN-8){instr[7]}}, instr[7:0]};
      end
      OPC_CLDW: begin
        ctrl.op   = OP_CLDW;
        ctrl.sreg = instr[4:0];
        ctrl.wb   = 1'b1;
      end
      OPC_CSTW: begin
        ctrl.op   = OP_CSTW;
        ctrl.sreg = instr[4:0];
      end
      OPC_MEM: begin
        unique case (instr[3:0])
          4'd0: begin ctrl.op = OP_LD;  ctrl.wb = 1'b1; end
          4'd1: ctrl.op = OP_ST;
          4'd2: begin ctrl.op = OP_LDX; ctrl.wb = 1'b1; end
          4'd3: ctrl.op = OP_STX;
          4'd4: begin ctrl.op = OP_LDA; ctrl.wb = 1'b1; end
          4'd5: ctrl.op = OP_STA;
          default: ctrl.op = OP_NOP;
        endcase
      end
      default: ctrl.op = OP_NOP;
    endcase
  end

endmodule
