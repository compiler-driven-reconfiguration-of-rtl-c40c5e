// tb_qc_dmem: random writes and reads against a shadow copy, checking the
// one-cycle synchronous read.
module tb_qc_dmem;
  import qc_pkg::*;
  localparam int W = 64;
  logic clk = 0, we = 0;
  logic [5:0] addr = 0;
  word_t wdata = 0, rdata;
  word_t shadow [W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  qc_dmem #(.WORDS(W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); wdata = $urandom; shadow[i] = wdata;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); addr = 6'($urandom); wdata = $urandom;
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      @(negedge clk); we = 0;
      @(negedge clk);
      checks++;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL addr %0d", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
