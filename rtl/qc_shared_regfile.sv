// qc_shared_regfile: register file shared by all cores of the cluster.
//
// NSHREGS x 32-bit registers with a dedicated read port and a dedicated
// write port for every core, so no arbitration is needed. A read presents
// its address with re high and receives the word on rdata after the next
// rising edge (the core writes it back one cycle later, giving the
// two-cycle cldw). A write with we high updates the register on the rising
// edge that ends the two-cycle cstw. The register count, one port pair per
// core and the two-cycle access follow the published design. Two writes to
// the same register in the same cycle are a scheduling error the compiler
// avoids; this design lets the lowest-numbered core win. A read in the
// same cycle as a write to that register returns the old value.
module qc_shared_regfile
  import qc_pkg::*;
#(
  parameter int N = NSHREGS
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic      [NCORES-1:0]                re,
  input  logic      [NCORES-1:0][$clog2(N)-1:0] raddr,
  output word_t     [NCORES-1:0]                rdata,
  input  logic      [NCORES-1:0]                we,
  input  logic      [NCORES-1:0][$clog2(N)-1:0] waddr,
  input  word_t     [NCORES-1:0]                wdata
);

  word_t regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else begin
      // highest index first so that the lowest-numbered core wins
      for (int c = NCORES - 1; c >= 0; c--)
        if (we[c]) regs[waddr[c]] <= wdata[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else begin
      for (int c = 0; c < NCORES; c++)
        if (re[c]) rdata[c] <= regs[raddr[c]];
    end
  end

endmodule
