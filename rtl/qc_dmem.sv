// qc_dmem: local data memory of one core.
//
// WORDS x 32-bit, one port, synchronous read: the word at addr appears on
// rdata one cycle after the address, and a write with we high takes effect
// on the rising edge. The core keeps the address stable for the whole
// three-cycle local memory access, so rdata is settled long before the
// load leaves the execute stage. Local data memory per core follows the
// published architecture; its size is this design's own choice.
module qc_dmem
  import qc_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic                     we,
  input  word_t                    wdata,
  output word_t                    rdata
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
