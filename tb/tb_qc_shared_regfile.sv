// tb_qc_shared_regfile: all four cores write and read the shared registers
// at random at the same time; reads return the value before the edge one
// cycle later, and a write conflict is won by the lowest core.
module tb_qc_shared_regfile;
  import qc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NCORES-1:0] re = 0, we = 0;
  logic [NCORES-1:0][4:0] raddr = 0, waddr = 0;
  word_t [NCORES-1:0] rdata, wdata = 0;
  word_t shadow [NSHREGS];
  word_t expect_q [NCORES];
  logic [NCORES-1:0] re_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  qc_shared_regfile dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      for (int c = 0; c < NCORES; c++) begin
        re[c] = $urandom_range(0, 1); we[c] = $urandom_range(0, 1);
        raddr[c] = 5'($urandom); waddr[c] = 5'($urandom_range(0, 7)); wdata[c] = $urandom;
        if (re[c]) expect_q[c] = shadow[raddr[c]];
      end
      re_q = re;
      @(posedge clk);
      for (int c = NCORES - 1; c >= 0; c--) if (we[c]) shadow[waddr[c]] = wdata[c];
      @(negedge clk);
      for (int c = 0; c < NCORES; c++) if (re_q[c]) begin
        checks++;
        if (rdata[c] !== expect_q[c]) begin failures++; $display("FAIL core %0d", c); end
      end
      re = 0; we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
