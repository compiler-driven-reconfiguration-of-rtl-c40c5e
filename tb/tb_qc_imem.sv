// tb_qc_imem: loads random instructions, reads them back with the one-cycle
// read latency, and checks that the output holds while re is low.
module tb_qc_imem;
  import qc_pkg::*;
  localparam int W = 64;
  logic clk = 0, re = 0, we = 0;
  logic [5:0] raddr = 0, waddr = 0;
  instr_t rdata, wdata = 0;
  instr_t shadow [W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  qc_imem #(.WORDS(W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = 16'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) begin
      instr_t held;
      @(negedge clk); re = 1; raddr = 6'($urandom);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      held = rdata; raddr = 6'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
