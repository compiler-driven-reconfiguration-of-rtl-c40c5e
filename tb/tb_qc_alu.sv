// tb_qc_alu: checks every ALU operation and compare condition against a
// reference model on random and corner-case operands.
module tb_qc_alu;
  import qc_pkg::*;
  aluop_e op; cond_e cc; word_t a, b, y; logic flag;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  qc_alu dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_y(aluop_e o, word_t x, word_t z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_SHL: return x << (z % 32);
      ALU_SHR: return x >> (z % 32);
      default: return word_t'(longint'(x) * longint'(z));
    endcase
  endfunction

  function automatic logic ref_f(cond_e c, word_t x, word_t z);
    case (c)
      CC_EQ:  return x == z;
      CC_NE:  return x != z;
      CC_LT:  return int'(x) < int'(z);
      CC_GE:  return int'(x) >= int'(z);
      default: return x < z;
    endcase
  endfunction

  initial begin
    word_t corner [5] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000, 32'hffffffff};
    for (int n = 0; n < 2000; n++) begin
      a = (n < 25) ? corner[n % 5] : $urandom;
      b = (n < 25) ? corner[n / 5] : ($urandom_range(0, 1) ? $urandom : word_t'($urandom_range(0, 40)));
      op = aluop_e'(n % 8);
      cc = cond_e'(n % 5);
      #1;
      checks++;
      if (y !== ref_y(op, a, b) || flag !== ref_f(cc, a, b)) begin
        failures++;
        $display("FAIL op=%0d cc=%0d a=%h b=%h y=%h flag=%b", op, cc, a, b, y, flag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
