// qc_shared_flags: condition flags broadcast between the cores.
//
// Every core owns one bit. When a core executes FPUB its current condition
// flag is copied into its bit on the rising edge; all bits are visible to
// every core at all times, so a branch on another core's flag (collective
// branching) needs no memory access. Sharing the branch condition of one
// processor with the others follows the published design; one publishing
// instruction and one bit per core are this design's own choice.
module qc_shared_flags
  import qc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCORES-1:0] pub,
  input  logic [NCORES-1:0] flag,
  output logic [NCORES-1:0] shared
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shared <= '0;
    else        shared <= (shared & ~pub) | (flag & pub);
  end

endmodule
