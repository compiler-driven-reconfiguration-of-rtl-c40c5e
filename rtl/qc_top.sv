// qc_top: the QuadroCore cluster, four cores that the program itself
// reconfigures between asynchronous (MIMD), lock-step and SIMD operation.
//
// Four qc_core processors each own an instruction memory, decoder,
// register bank, ALU and data memory. Between their decode and execute
// stages sits the reconfigurable interconnect (qc_interconnect), which in
// SIMD mode forwards the master's decoded instructions to the other cores
// and in SYNC/SIMD mode makes a group advance in lock-step. Beside them:
// the barrier status (qc_barrier), the 32-entry shared register file
// (qc_shared_regfile), the broadcast condition flags (qc_shared_flags),
// and the path to the shared external memory: a round-robin arbiter on the
// shared wishbone bus (qc_wb_arbiter), the adjacent-access unit that moves
// four consecutive words in one transaction (qc_adjacent) and the banked
// memory itself (qc_ext_mem).
//
// Use: hold run low, load each core's program through ld_* (ld_core picks
// the core) and the external memory through hst_*, then raise run. Every
// core starts at address 0 in ASYNC mode and stops at HALT (halted). The
// host port of the external memory may be used only while the cores are
// not accessing it. Memory sizes are this design's own choice.
module qc_top
  import qc_pkg::*;
#(
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 1024,
  parameter int EXT_WORDS  = 16384,
  parameter int LMEM_LAT   = 3,
  parameter int SRF_LAT    = 2,
  parameter int EXT_WAIT   = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  input  logic                          ld_we,
  input  logic [CID_W-1:0]              ld_core,
  input  logic [$clog2(IMEM_WORDS)-1:0] ld_addr,
  input  instr_t                        ld_data,
  input  logic                          hst_en,
  input  logic                          hst_we,
  input  addr_t                         hst_addr,
  input  word_t                         hst_wdata,
  output word_t                         hst_rdata,
  output logic   [NCORES-1:0]           halted,
  output mode_e  [NCORES-1:0]           mode
);

  ctrl_t     [NCORES-1:0] dec_ctrl, ex_ctrl;
  logic      [NCORES-1:0] slave_nxt, advance, ready;
  mode_e     [NCORES-1:0] mode_nxt;
  cmask_t    [NCORES-1:0] mask, mask_nxt, bar_mask;
  logic      [NCORES-1:0] bar_req, bar_go;
  logic      [NCORES-1:0] srf_re, srf_we;
  sreg_idx_t [NCORES-1:0] srf_raddr, srf_waddr;
  word_t     [NCORES-1:0] srf_rdata, srf_wdata;
  logic      [NCORES-1:0] fpub, flag, m_ack, grant;
  cmask_t                 shflags, bar_status;
  wb_req_t   [NCORES-1:0] m_req;
  wb_req_t                arb_req, mem_req;
  wb_rsp_t                arb_rsp, mem_rsp;
  word_t     [NCORES-1:0] st_data, adj_data;
  cmask_t                 adj_done;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    qc_core #(
      .CORE_ID(c), .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS),
      .LMEM_LAT(LMEM_LAT), .SRF_LAT(SRF_LAT),
      .COMM_BASE(addr_t'(EXT_WORDS - NSHREGS))
    ) u_core (
      .clk, .rst_n, .run,
      .ld_we(ld_we && ld_core == CID_W'(c)), .ld_addr, .ld_data,
      .dec_ctrl(dec_ctrl[c]), .ex_ctrl_in(ex_ctrl[c]), .slave_nxt(slave_nxt[c]),
      .advance(advance[c]), .ready(ready[c]),
      .mode(mode[c]), .mask(mask[c]), .mode_nxt(mode_nxt[c]), .mask_nxt(mask_nxt[c]),
      .bar_req(bar_req[c]), .bar_mask(bar_mask[c]), .bar_go(bar_go[c]),
      .srf_re(srf_re[c]), .srf_raddr(srf_raddr[c]), .srf_rdata(srf_rdata[c]),
      .srf_we(srf_we[c]), .srf_waddr(srf_waddr[c]), .srf_wdata(srf_wdata[c]),
      .fpub(fpub[c]), .flag(flag[c]), .shflags,
      .wb_req(m_req[c]), .wb_ack(m_ack[c]), .wb_dat(arb_rsp.dat[0]),
      .st_data(st_data[c]), .adj_done(adj_done[c]), .adj_data(adj_data[c]),
      .halted(halted[c])
    );
  end

  qc_interconnect u_ic (
    .dec_ctrl, .mode, .mask, .mode_nxt, .mask_nxt, .ready,
    .ex_ctrl, .slave_nxt, .advance
  );

  qc_barrier u_bar (
    .clk, .rst_n, .req(bar_req), .mask(bar_mask), .go(bar_go), .status(bar_status)
  );

  qc_shared_regfile u_srf (
    .clk, .rst_n, .re(srf_re), .raddr(srf_raddr), .rdata(srf_rdata),
    .we(srf_we), .waddr(srf_waddr), .wdata(srf_wdata)
  );

  qc_shared_flags u_flags (
    .clk, .rst_n, .pub(fpub), .flag, .shared(shflags)
  );

  qc_wb_arbiter u_arb (
    .clk, .rst_n, .m_req, .m_ack, .s_req(arb_req), .s_ack(arb_rsp.ack), .grant
  );

  qc_adjacent u_adj (
    .clk, .rst_n, .m_req(arb_req), .m_rsp(arb_rsp), .s_req(mem_req), .s_rsp(mem_rsp),
    .st_data, .done(adj_done), .data(adj_data)
  );

  qc_ext_mem #(.WORDS(EXT_WORDS), .WAIT(EXT_WAIT)) u_mem (
    .clk, .rst_n, .req(mem_req), .rsp(mem_rsp),
    .hst_en, .hst_we, .hst_addr, .hst_wdata, .hst_rdata
  );

endmodule
