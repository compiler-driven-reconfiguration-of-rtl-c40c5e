// tb_qc_shared_flags: cores publish random flags; every published bit must
// appear one cycle later and unpublished bits must hold.
module tb_qc_shared_flags;
  import qc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NCORES-1:0] pub = 0, flag = 0, shared, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  qc_shared_flags dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      checks++;
      if (shared !== model) begin failures++; $display("FAIL %b vs %b", shared, model); end
      pub = 4'($urandom); flag = 4'($urandom);
      @(posedge clk);
      for (int c = 0; c < NCORES; c++) if (pub[c]) model[c] = flag[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
