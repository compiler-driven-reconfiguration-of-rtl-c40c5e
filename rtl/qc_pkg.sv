// qc_pkg: types and constants shared by the QuadroCore cluster.
//
// The cluster is four 32-bit RISC cores with 16-bit instructions. The
// number of cores, the word width, the 16-bit instruction length and the
// 32-entry shared register file are the published figures of the
// architecture. The instruction encoding below, the size of the local
// register bank (16) and the external bus address width are this design's
// own choices, because the core's instruction set is not published with
// the reconfiguration extensions.
//
// Instruction encoding (fields [15:12] opcode, [11:8] rd, [7:4] rs, [3:0] rt):
//   0  SYS   [11:8] sub: 0 NOP, 1 HALT, 2 BAR mask[3:0],
//                        3 MODE mode[5:4] mask[3:0], 4 FPUB (publish flag),
//                        5 CCFG ext[0] (communication through external memory)
//   1..8 ADD SUB AND OR XOR SHL SHR MUL   rd = rs op rt
//   9  ADDI  rd = rs + sext(imm[3:0])
//   10 LI    rd = sext(imm[7:0])
//   11 CMP   flag = cond[11:8](rs, rt)   cond: 0 EQ, 1 NE, 2 LT, 3 GE, 4 LTU
//   12 BR    [11:10] 0 always, 1 flag set, 2 flag clear, 3 shared flag of
//            core [9:8]; target = pc + sext(imm[7:0])
//   13 CLDW  rd = shared[imm[4:0]]
//   14 CSTW  shared[imm[4:0]] = rd
//   15 MEM   [3:0] sub: 0 LD rd,(rs) local; 1 ST rd,(rs) local;
//            2 LDX / 3 STX external word; 4 LDA / 5 STA adjacent words
package qc_pkg;

  localparam int NCORES  = 4;   // processors per cluster
  localparam int XLEN    = 32;  // data word
  localparam int ILEN    = 16;  // instruction word
  localparam int NREGS   = 16;  // local registers per core
  localparam int NSHREGS = 32;  // shared register file entries
  localparam int ADDR_W  = 16;  // external memory word address
  localparam int CID_W   = $clog2(NCORES);

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [ILEN-1:0]   instr_t;
  typedef logic [3:0]        reg_idx_t;
  typedef logic [4:0]        sreg_idx_t;
  typedef logic [NCORES-1:0] cmask_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [1:0] {
    MODE_ASYNC = 2'd0,  // independent instruction streams (MIMD)
    MODE_SYNC  = 2'd1,  // lock-step at every instruction
    MODE_SIMD  = 2'd2   // one instruction stream, decoded by the group master
  } mode_e;

  typedef enum logic [3:0] {
    OPC_SYS = 4'd0, OPC_ADD = 4'd1, OPC_SUB = 4'd2, OPC_AND = 4'd3,
    OPC_OR  = 4'd4, OPC_XOR = 4'd5, OPC_SHL = 4'd6, OPC_SHR = 4'd7,
    OPC_MUL = 4'd8, OPC_ADDI = 4'd9, OPC_LI = 4'd10, OPC_CMP = 4'd11,
    OPC_BR  = 4'd12, OPC_CLDW = 4'd13, OPC_CSTW = 4'd14, OPC_MEM = 4'd15
  } opcode_e;

  typedef enum logic [4:0] {
    OP_NOP, OP_HALT, OP_ALU, OP_CMP, OP_BR, OP_LD, OP_ST, OP_LDX, OP_STX,
    OP_LDA, OP_STA, OP_CLDW, OP_CSTW, OP_BAR, OP_MODE, OP_FPUB, OP_CCFG
  } exop_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SHL, ALU_SHR, ALU_MUL
  } aluop_e;

  typedef enum logic [2:0] {
    CC_EQ, CC_NE, CC_LT, CC_GE, CC_LTU
  } cond_e;

  typedef enum logic [1:0] {
    BR_ALWAYS, BR_FLAG, BR_NFLAG, BR_SHARED
  } brcond_e;

  // Decoded instruction: what the decoder hands to the execute stage and
  // what the reconfigurable interconnect forwards in SIMD mode.
  typedef struct packed {
    logic      valid;
    exop_e     op;
    aluop_e    aluop;
    cond_e     cc;
    brcond_e   brc;
    logic [CID_W-1:0] fsrc;   // core whose shared flag a BR_SHARED reads
    reg_idx_t  rd;
    reg_idx_t  rs;
    reg_idx_t  rt;
    logic      use_imm;
    word_t     imm;
    logic      wb;            // writes rd
    sreg_idx_t sreg;
    cmask_t    mask;          // barrier / mode group mask
    mode_e     mode;
    logic      ext;           // CCFG operand
    logic [9:0] pc;           // address of the instruction (branch base)
  } ctrl_t;

  localparam ctrl_t CTRL_BUBBLE = '0;

  // Shared bus, wishbone classic style. A normal access moves one word on
  // lane 0; an adjacent access (adj) moves lane k to or from word adr+k for
  // every lane whose sel bit is set.
  typedef struct packed {
    logic  cyc;
    logic  stb;
    logic  we;
    logic  adj;
    cmask_t sel;
    addr_t adr;
    logic [NCORES-1:0][XLEN-1:0] dat;
  } wb_req_t;

  typedef struct packed {
    logic ack;
    logic [NCORES-1:0][XLEN-1:0] dat;
  } wb_rsp_t;

  localparam wb_req_t WB_IDLE = '0;

  // Lowest set bit of a core mask: the master of a SIMD group.
  function automatic logic [CID_W-1:0] lowest_core(cmask_t m);
    logic [CID_W-1:0] r;
    r = '0;
    for (int i = NCORES - 1; i >= 0; i--)
      if (m[i]) r = CID_W'(i);
    return r;
  endfunction

endpackage
