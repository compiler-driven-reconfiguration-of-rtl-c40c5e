// tb_qc_regfile: writes random values to the register bank, reads them back
// on all three ports against a shadow copy, and checks that register 0
// stays zero and that a read sees the old value in the cycle of a write.
module tb_qc_regfile;
  import qc_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] ra1 = 0, ra2 = 0, ra3 = 0, wa = 0;
  word_t rd1, rd2, rd3, wd = 0;
  word_t shadow [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  qc_regfile dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      wa = 4'($urandom); wd = $urandom;
      ra1 = 4'($urandom); ra2 = 4'($urandom); ra3 = wa;
      #1;
      chk(rd1 == shadow[ra1] && rd2 == shadow[ra2], $sformatf("read %0d/%0d", ra1, ra2));
      chk(rd3 == shadow[ra3], "read during write returns old value");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    @(negedge clk); we = 0;
    ra1 = 0; #1; chk(rd1 == 0, "register 0 reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
