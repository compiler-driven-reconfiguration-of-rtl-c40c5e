// qc_core: one processor of the cluster, a 32-bit RISC core with 16-bit
// instructions and a three-stage pipeline (fetch, decode, execute).
//
// Fetch reads the local instruction memory; its registered output is the
// decode stage, whose decoded word leaves the core (dec_ctrl) to the
// reconfigurable interconnect. The interconnect hands back the decoded word
// that enters this core's execute stage (ex_ctrl_in: its own, or the SIMD
// master's) and the cycle in which the execute stage completes (advance).
// Operands are read from the local register bank in execute; all results
// are written when the instruction leaves execute, so no forwarding is
// needed. Execute time in cycles: ALU, compare, branch and the
// reconfiguration instructions 1; shared register transfers (CLDW/CSTW)
// SRF_LAT = 2; local data memory LMEM_LAT = 3; external memory 6 when the
// bus is free and up to 15 when all four cores compete; adjacent access 7;
// a barrier or MODE switch 1 once all of its group are there. A taken
// branch or HALT discards the instruction in decode (one bubble plus the
// refetch).
//
// Reconfiguration is done by the core itself: MODE sets its operating mode
// (ASYNC, SYNC, SIMD) and group mask after a barrier over the group; CCFG
// redirects CLDW/CSTW to external memory at COMM_BASE + register number
// instead of the shared register file. As a SIMD slave the core's fetch and
// decode stay idle, branches do not redirect it, and external single-word
// accesses add the core number to the address (c*w offset for word size w).
// The published parts are the pipeline depth, the word and instruction
// widths, the access times and the modes; the instruction set, the local
// register count and the way stalls are handled are this design's own.
module qc_core
  import qc_pkg::*;
#(
  parameter int    CORE_ID    = 0,
  parameter int    IMEM_WORDS = 1024,
  parameter int    DMEM_WORDS = 1024,
  parameter int    LMEM_LAT   = 3,
  parameter int    SRF_LAT    = 2,
  parameter addr_t COMM_BASE  = addr_t'(16'hFF00)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  // program loading
  input  logic       ld_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] ld_addr,
  input  instr_t     ld_data,
  // reconfigurable interconnect
  output ctrl_t      dec_ctrl,
  input  ctrl_t      ex_ctrl_in,
  input  logic       slave_nxt,
  input  logic       advance,
  output logic       ready,
  output mode_e      mode,
  output cmask_t     mask,
  output mode_e      mode_nxt,
  output cmask_t     mask_nxt,
  // barrier
  output logic       bar_req,
  output cmask_t     bar_mask,
  input  logic       bar_go,
  // shared register file port
  output logic       srf_re,
  output sreg_idx_t  srf_raddr,
  input  word_t      srf_rdata,
  output logic       srf_we,
  output sreg_idx_t  srf_waddr,
  output word_t      srf_wdata,
  // shared condition flags
  output logic       fpub,
  output logic       flag,
  input  cmask_t     shflags,
  // shared bus
  output wb_req_t    wb_req,
  input  logic       wb_ack,
  input  word_t      wb_dat,
  // adjacent access
  output word_t      st_data,
  input  logic       adj_done,
  input  word_t      adj_data,
  // status
  output logic       halted
);

  localparam int IA_W = $clog2(IMEM_WORDS);
  localparam int DA_W = $clog2(DMEM_WORDS);
  localparam logic [CID_W-1:0] ME = CID_W'(CORE_ID);

  typedef enum logic [1:0] {X_IDLE, X_REQ, X_WADJ, X_DONE} xstate_e;

  // ---------------- state ----------------
  logic [IA_W-1:0] pc_q;
  logic            id_valid_q;
  logic [9:0]      id_pc_q;
  instr_t          id_instr;
  ctrl_t           ex_q;
  logic [3:0]      cnt_q;
  xstate_e         xst_q;
  word_t           xdata_q;
  wb_req_t         wb_req_q;
  mode_e           mode_q;
  cmask_t          mask_q;
  logic            comm_ext_q;
  logic            flag_q;
  logic            halted_q;

  // ---------------- execute: operands and units ----------------
  word_t rs_val, rt_val, rd_val, alu_y, dmem_rdata;
  logic  wb_en;
  word_t wb_val;
  logic  alu_flag;

  qc_regfile u_rf (
    .clk, .rst_n,
    .ra1(ex_q.rs), .ra2(ex_q.rt), .ra3(ex_q.rd),
    .rd1(rs_val), .rd2(rt_val), .rd3(rd_val),
    .we(wb_en), .wa(ex_q.rd), .wd(wb_val)
  );

  qc_alu u_alu (
    .op(ex_q.aluop), .cc(ex_q.cc), .a(rs_val),
    .b(ex_q.use_imm ? ex_q.imm : rt_val), .y(alu_y), .flag(alu_flag)
  );

  qc_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(rs_val[DA_W-1:0]),
    .we(advance && ex_q.valid && ex_q.op == OP_ST),
    .wdata(rd_val), .rdata(dmem_rdata)
  );

  logic is_slave, is_simd, uses_bus, is_adj, adj_master, use_srf;
  addr_t bus_addr;
  cmask_t adj_sel;

  assign is_simd    = (mode_q == MODE_SIMD);
  assign is_slave   = is_simd && (lowest_core(mask_q) != ME);
  assign is_adj     = ex_q.op inside {OP_LDA, OP_STA};
  assign use_srf    = ex_q.op inside {OP_CLDW, OP_CSTW};
  assign uses_bus   = ex_q.valid && (is_adj || ex_q.op inside {OP_LDX, OP_STX} ||
                                     (use_srf && comm_ext_q));
  assign adj_master = !is_simd || (lowest_core(mask_q) == ME);
  assign adj_sel    = is_simd ? mask_q : cmask_t'(1 << CORE_ID);

  always_comb begin
    if (use_srf)                 bus_addr = COMM_BASE + addr_t'(ex_q.sreg);
    else if (is_adj || !is_simd) bus_addr = addr_t'(rs_val);
    else                         bus_addr = addr_t'(rs_val) + addr_t'(CORE_ID);
  end

  always_comb begin
    ready = 1'b1;
    if (ex_q.valid) begin
      unique case (ex_q.op)
        OP_LD, OP_ST:        ready = (int'(cnt_q) >= LMEM_LAT - 1);
        OP_CLDW, OP_CSTW:    ready = comm_ext_q ? (xst_q == X_DONE)
                                                : (int'(cnt_q) >= SRF_LAT - 1);
        OP_LDX, OP_STX,
        OP_LDA, OP_STA:      ready = (xst_q == X_DONE);
        OP_BAR, OP_MODE:     ready = bar_go;
        default:             ready = 1'b1;
      endcase
    end
  end

  // ---------------- write back ----------------
  logic  br_cond, taken, halt_now, kill;

  always_comb begin
    unique case (ex_q.op)
      OP_LD:            wb_val = dmem_rdata;
      OP_LDX, OP_LDA:   wb_val = xdata_q;
      OP_CLDW:          wb_val = comm_ext_q ? xdata_q : srf_rdata;
      default:          wb_val = alu_y;
    endcase
  end
  assign wb_en = advance && ex_q.valid && ex_q.wb;

  always_comb begin
    unique case (ex_q.brc)
      BR_ALWAYS: br_cond = 1'b1;
      BR_FLAG:   br_cond = flag_q;
      BR_NFLAG:  br_cond = !flag_q;
      default:   br_cond = shflags[ex_q.fsrc];
    endcase
  end
  assign taken    = advance && ex_q.valid && ex_q.op == OP_BR && !is_slave && br_cond;
  assign halt_now = advance && ex_q.valid && ex_q.op == OP_HALT;
  assign kill     = taken || halt_now;

  // ---------------- fetch and decode ----------------
  logic id_consume, fetch;

  assign id_consume = advance && !slave_nxt;
  assign fetch      = run && !halted_q && !kill && !is_slave &&
                      (!id_valid_q || id_consume);

  qc_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .re(fetch), .raddr(pc_q), .rdata(id_instr),
    .we(ld_we), .waddr(ld_addr), .wdata(ld_data)
  );

  qc_decoder u_dec (
    .valid(id_valid_q && !kill), .instr(id_instr), .pc(id_pc_q), .ctrl(dec_ctrl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q       <= '0;
      id_valid_q <= 1'b0;
      id_pc_q    <= '0;
    end else if (kill) begin
      pc_q       <= IA_W'(ex_q.pc + ex_q.imm[9:0]);
      id_valid_q <= 1'b0;
    end else if (fetch) begin
      id_valid_q <= 1'b1;
      id_pc_q    <= 10'(pc_q);
      pc_q       <= pc_q + 1'b1;
    end else if (id_consume) begin
      id_valid_q <= 1'b0;
    end
  end

  // ---------------- execute stage register and core state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q       <= CTRL_BUBBLE;
      cnt_q      <= '0;
      mode_q     <= MODE_ASYNC;
      mask_q     <= cmask_t'(1 << CORE_ID);
      comm_ext_q <= 1'b0;
      flag_q     <= 1'b0;
      halted_q   <= 1'b0;
    end else begin
      if (advance) begin
        ex_q  <= halted_q || halt_now ? CTRL_BUBBLE : ex_ctrl_in;
        cnt_q <= '0;
        if (ex_q.valid) begin
          unique case (ex_q.op)
            OP_CMP:  flag_q     <= alu_flag;
            OP_MODE: begin
              mode_q <= ex_q.mode;
              mask_q <= ex_q.mask;
            end
            OP_CCFG: comm_ext_q <= ex_q.ext;
            OP_HALT: halted_q   <= 1'b1;
            default: ;
          endcase
        end
      end else if (ex_q.valid && cnt_q != '1) begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  // ---------------- external bus / adjacent access ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xst_q    <= X_IDLE;
      xdata_q  <= '0;
      wb_req_q <= WB_IDLE;
    end else begin
      unique case (xst_q)
        X_IDLE: if (uses_bus) begin
          if (is_adj && !adj_master) begin
            xst_q <= X_WADJ;
          end else begin
            wb_req_q.cyc    <= 1'b1;
            wb_req_q.stb    <= 1'b1;
            wb_req_q.we     <= ex_q.op inside {OP_STX, OP_STA, OP_CSTW};
            wb_req_q.adj    <= is_adj;
            wb_req_q.sel    <= is_adj ? adj_sel : cmask_t'(1);
            wb_req_q.adr    <= bus_addr;
            wb_req_q.dat    <= '0;
            wb_req_q.dat[0] <= rd_val;
            xst_q           <= X_REQ;
          end
        end
        X_REQ: if (wb_ack) begin
          wb_req_q <= WB_IDLE;
          xdata_q  <= wb_dat;
          xst_q    <= wb_req_q.adj ? X_WADJ : X_DONE;
        end
        X_WADJ: if (adj_done) begin
          xdata_q <= adj_data;
          xst_q   <= X_DONE;
        end
        X_DONE: if (advance) xst_q <= X_IDLE;
        default: xst_q <= X_IDLE;
      endcase
    end
  end

  // ---------------- outputs ----------------
  assign wb_req    = wb_req_q;
  assign st_data   = rd_val;
  assign mode      = mode_q;
  assign mask      = mask_q;
  assign mode_nxt  = (ex_q.valid && ex_q.op == OP_MODE) ? ex_q.mode : mode_q;
  assign mask_nxt  = (ex_q.valid && ex_q.op == OP_MODE) ? ex_q.mask : mask_q;
  assign bar_req   = ex_q.valid && ex_q.op inside {OP_BAR, OP_MODE};
  assign bar_mask  = ex_q.mask;
  assign srf_re    = ex_q.valid && ex_q.op == OP_CLDW && !comm_ext_q && cnt_q == '0;
  assign srf_raddr = ex_q.sreg;
  assign srf_we    = advance && ex_q.valid && ex_q.op == OP_CSTW && !comm_ext_q;
  assign srf_waddr = ex_q.sreg;
  assign srf_wdata = rd_val;
  assign fpub      = advance && ex_q.valid && ex_q.op == OP_FPUB;
  assign flag      = flag_q;
  assign halted    = halted_q;

  // the execute stage must not leave before its instruction is complete
  a_adv_ready: assert property (@(posedge clk) disable iff (!rst_n) advance |-> ready);

endmodule
