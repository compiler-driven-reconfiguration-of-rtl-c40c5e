// qc_regfile: local register bank of one core.
//
// NREGS x 32-bit registers with three combinational read ports (two source
// operands and the store-data register) and one write port that writes on
// the rising clock edge. Register 0 always reads zero. Reads see the value
// before a write in the same cycle; the execute stage writes back only when
// the instruction leaves it, so the next instruction reads the new value.
// Single-cycle register access follows the published memory hierarchy; the
// register count and the zero register are this design's own choice.
module qc_regfile
  import qc_pkg::*;
#(
  parameter int N = NREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ra1,
  input  logic [$clog2(N)-1:0] ra2,
  input  logic [$clog2(N)-1:0] ra3,
  output word_t                rd1,
  output word_t                rd2,
  output word_t                rd3,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  word_t                wd
);

  word_t regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
  assign rd3 = regs[ra3];

endmodule
