// qc_imem: local instruction memory of one core.
//
// WORDS x 16-bit instructions with a synchronous read port: when re is high
// the word at raddr appears on rdata after the next rising edge, and rdata
// holds otherwise, so it doubles as the fetch/decode pipeline register. A
// write port loads the program while the cluster is held idle. Local
// instruction memory per core follows the published architecture; its size
// and the load port are this design's own choice.
module qc_imem
  import qc_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output instr_t                   rdata,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  instr_t                   wdata
);

  instr_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
