// qc_alu: single-cycle arithmetic and logic unit of one core.
//
// Purely combinational. It computes y = a op b for the eight operations of
// the core (add, subtract, and, or, xor, shift left, logical shift right,
// multiply keeping the low 32 bits) and, in parallel, the condition flag of
// a compare (equal, not equal, signed less, signed greater-or-equal,
// unsigned less). Single-cycle execution of arithmetic and logic follows
// the published core; the operation set and the compare conditions are this
// design's own choice.
module qc_alu
  import qc_pkg::*;
(
  input  aluop_e op,
  input  cond_e  cc,
  input  word_t  a,
  input  word_t  b,
  output word_t  y,
  output logic   flag
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SHL: y = a << b[4:0];
      ALU_SHR: y = a >> b[4:0];
      ALU_MUL: y = a * b;
      default: y = '0;
    endcase
  end

  always_comb begin
    unique case (cc)
      CC_EQ:   flag = (a == b);
      CC_NE:   flag = (a != b);
      CC_LT:   flag = ($signed(a) <  $signed(b));
      CC_GE:   flag = ($signed(a) >= $signed(b));
      CC_LTU:  flag = (a < b);
      default: flag = 1'b0;
    endcase
  end

endmodule
