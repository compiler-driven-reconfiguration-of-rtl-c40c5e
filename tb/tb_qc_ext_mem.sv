// tb_qc_ext_mem: fills the memory through the host port, then runs random
// single-word and adjacent (unaligned, partial lane select) reads and
// writes over the bus against a shadow copy. Checks the ack timing (third
// cycle of the request with the default two wait cycles) and reads
// everything back through the host port at the end.
module tb_qc_ext_mem;
  import qc_pkg::*;
  localparam int W = 64;
  logic clk = 0, rst_n = 0;
  wb_req_t req = WB_IDLE;
  wb_rsp_t rsp;
  logic hst_en = 0, hst_we = 0;
  addr_t hst_addr = 0;
  word_t hst_wdata = 0, hst_rdata;
  word_t shadow [W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  qc_ext_mem #(.WORDS(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // one bus transaction; returns the read lanes and the cycles to ack
  task automatic bus(logic we, logic adj, cmask_t sel, int adr,
                     word_t [NCORES-1:0] wd, output word_t [NCORES-1:0] rd, output int n);
    @(negedge clk);
    req = WB_IDLE; req.cyc = 1; req.stb = 1; req.we = we; req.adj = adj; req.sel = sel;
    req.adr = addr_t'(adr); req.dat = wd;
    n = 1;
    #1;
    while (!rsp.ack) begin @(negedge clk); #1; n++; end
    rd = rsp.dat;
    @(posedge clk);
    for (int k = 0; k < NCORES; k++)
      if (we && (adj ? sel[k] : k == 0)) shadow[(adr + k) % W] = wd[k];
    @(negedge clk);
    req = WB_IDLE;
  endtask

  initial begin
    word_t [NCORES-1:0] wd, rd;
    int n;
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < W; a++) begin
      @(negedge clk); hst_en = 1; hst_we = 1; hst_addr = addr_t'(a); hst_wdata = $urandom;
      shadow[a] = hst_wdata;
    end
    @(negedge clk); hst_en = 0; hst_we = 0;
    for (int t = 0; t < 300; t++) begin
      int adr; logic we, adj; cmask_t sel;
      adr = $urandom_range(0, W - NCORES);
      we = $urandom_range(0, 1); adj = $urandom_range(0, 1);
      sel = adj ? cmask_t'($urandom) : cmask_t'(1);
      for (int k = 0; k < NCORES; k++) wd[k] = $urandom;
      bus(we, adj, sel, adr, wd, rd, n);
      chk(n == 3, $sformatf("ack in cycle %0d", n));
      if (!we) begin
        if (adj) begin
          for (int k = 0; k < NCORES; k++)
            chk(rd[k] == shadow[adr + k], $sformatf("adjacent read lane %0d addr %0d", k, adr));
        end else begin
          chk(rd[0] == shadow[adr], $sformatf("read addr %0d", adr));
        end
      end
    end
    for (int a = 0; a < W; a++) begin
      @(negedge clk); hst_en = 1; hst_addr = addr_t'(a);
      @(negedge clk);
      chk(hst_rdata == shadow[a], $sformatf("host read %0d", a));
    end
    hst_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
