// tb_qc_barrier: barrier scenarios. Cores arrive one by one and must all be
// released in the cycle the last one arrives; two disjoint barriers run
// independently; a core waiting with a different mask does not count.
module tb_qc_barrier;
  import qc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NCORES-1:0] req = 0, go;
  cmask_t [NCORES-1:0] mask = 0;
  cmask_t status;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  qc_barrier dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (go=%b)", s, go); end
  endtask

  // a core holds its request until released, as the core does
  always @(posedge clk) req <= req & ~go;

  task automatic arrive(int c, cmask_t m);
    @(negedge clk); req[c] = 1; mask[c] = m; #1;
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    // all four, arriving in turn
    arrive(2, 4'b1111); chk(go == 0, "1 of 4");
    arrive(0, 4'b1111); chk(go == 0, "2 of 4");
    arrive(3, 4'b1111); chk(go == 0, "3 of 4");
    @(negedge clk); chk(status == 4'b1101, "status shows waiting cores");
    req[1] = 1; mask[1] = 4'b1111; #1;
    chk(go == 4'b1111, "all released together");
    @(negedge clk); chk(req == 0 && go == 0, "released");
    // all arrive together: single cycle
    req = 4'b1111; mask = '{4'b1111, 4'b1111, 4'b1111, 4'b1111}; #1;
    chk(go == 4'b1111, "simultaneous arrival passes at once");
    @(negedge clk);
    // disjoint barriers {0,1} and {2,3}
    arrive(0, 4'b0011);
    arrive(2, 4'b1100); chk(go == 0, "halves waiting");
    arrive(3, 4'b1100); chk(go == 4'b1100, "upper pair released alone");
    @(negedge clk);
    arrive(1, 4'b0011); chk(go == 4'b0011, "lower pair released");
    @(negedge clk);
    // mismatching masks
    arrive(0, 4'b0011);
    arrive(1, 4'b0110); chk(go == 0, "different masks do not match");
    arrive(2, 4'b0110); chk(go == 4'b0110, "core 1 and 2 match");
    @(negedge clk);
    chk(go == 0 && req == 4'b0001, "core 0 still waiting");
    arrive(1, 4'b0011); chk(go == 4'b0011, "core 0 released");
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
