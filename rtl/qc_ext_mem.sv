// qc_ext_mem: external memory shared by the cluster, a wishbone slave.
//
// WORDS x 32-bit words split into NCORES banks by the low address bits, so
// that any NCORES consecutive words lie in different banks and can be moved
// in one transaction. A normal access moves word adr on lane 0. An adjacent
// access (adj) moves lane k to or from word adr+k for every lane whose sel
// bit is set. The memory acknowledges WAIT cycles after the request first
// appears (the bus is busy WAIT+1 cycles per transaction); read data come
// from a registered read of the banks, writes happen in the ack cycle.
// A host port reads and writes single words while the bus is idle (program
// and data loading); it takes priority over the bus. Banking, the wait
// count (2, giving the published 6-cycle access together with the core and
// the arbiter) and the host port are this design's own choices; the
// document gives only the access times. The size is assumed.
module qc_ext_mem
  import qc_pkg::*;
#(
  parameter int WORDS = 16384,
  parameter int WAIT  = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  wb_req_t req,
  output wb_rsp_t rsp,
  input  logic    hst_en,
  input  logic    hst_we,
  input  addr_t   hst_addr,
  input  word_t   hst_wdata,
  output word_t   hst_rdata
);

  localparam int ROWS  = WORDS / NCORES;
  localparam int ROW_W = $clog2(ROWS);

  word_t mem [NCORES][ROWS];

  logic [$clog2(WAIT+1)-1:0] cnt;
  logic                      active;
  logic [NCORES-1:0][ROW_W-1:0] row;
  logic [NCORES-1:0][CID_W-1:0] lane;     // lane served by each bank
  logic [NCORES-1:0][ROW_W-1:0] hrow;
  word_t [NCORES-1:0]           bank_q;
  logic [CID_W-1:0]             hst_bank_q;

  assign active = req.cyc && req.stb;
  assign rsp.ack = active && !hst_en && (int'(cnt) == WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (!active || rsp.ack) cnt <= '0;
    else if (!hst_en)            cnt <= cnt + 1'b1;
  end

  // bank b holds the word of lane (b - adr) mod NCORES
  always_comb begin
    for (int b = 0; b < NCORES; b++) begin
      logic [ADDR_W:0] a;
      lane[b] = CID_W'(b - int'(req.adr[CID_W-1:0]));
      a       = {1'b0, req.adr} + (ADDR_W+1)'(lane[b]);
      row[b]  = ROW_W'(a >> CID_W);
      hrow[b] = ROW_W'(hst_addr >> CID_W);
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < NCORES; b++) begin
      if (hst_en) begin
        if (hst_we && hst_addr[CID_W-1:0] == CID_W'(b)) mem[b][hrow[b]] <= hst_wdata;
        bank_q[b] <= mem[b][hrow[b]];
      end else begin
        if (rsp.ack && req.we && req.sel[lane[b]] && (req.adj || lane[b] == '0))
          mem[b][row[b]] <= req.dat[lane[b]];
        bank_q[b] <= mem[b][row[b]];
      end
    end
    hst_bank_q <= hst_addr[CID_W-1:0];
  end

  always_comb begin
    for (int k = 0; k < NCORES; k++)
      rsp.dat[k] = bank_q[CID_W'(int'(req.adr[CID_W-1:0]) + k)];
  end

  assign hst_rdata = bank_q[hst_bank_q];

endmodule
