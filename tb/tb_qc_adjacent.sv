// tb_qc_adjacent: checks that normal transactions pass through, that an
// adjacent store carries the store data of all cores on their lanes, and
// that an adjacent load is distributed one cycle after the memory's ack.
module tb_qc_adjacent;
  import qc_pkg::*;
  logic clk = 0, rst_n = 0;
  wb_req_t m_req = WB_IDLE, s_req;
  wb_rsp_t m_rsp, s_rsp = '0;
  word_t [NCORES-1:0] st_data = 0, data;
  cmask_t done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  qc_adjacent dut (.*);

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
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      word_t [NCORES-1:0] lanes;
      for (int k = 0; k < NCORES; k++) begin st_data[k] = $urandom; lanes[k] = $urandom; end
      // normal write passes unchanged
      m_req = WB_IDLE; m_req.cyc = 1; m_req.stb = 1; m_req.we = 1; m_req.adr = addr_t'($urandom);
      m_req.dat = lanes; s_rsp.ack = 1; s_rsp.dat = lanes; #1;
      chk(s_req == m_req && m_rsp == s_rsp, "normal passes");
      @(negedge clk); chk(done == 0, "no done for a normal access");
      // adjacent store
      m_req.adj = 1; m_req.sel = cmask_t'($urandom_range(1, 15)); s_rsp.ack = 0; #1;
      chk(s_req.dat == st_data && s_req.adr == m_req.adr, "store lanes from the cores");
      s_rsp.ack = 1;
      @(negedge clk); chk(done == m_req.sel, "done to the lanes of the store");
      // adjacent load
      m_req.we = 0; s_rsp.ack = 0; @(negedge clk);
      chk(done == 0, "no done before ack");
      s_rsp.ack = 1; s_rsp.dat = lanes; @(negedge clk);
      s_rsp.ack = 0; #1;
      chk(done == m_req.sel && data == lanes, "lanes distributed one cycle after ack");
      m_req = WB_IDLE;
      @(negedge clk); chk(done == 0, "done is one pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
