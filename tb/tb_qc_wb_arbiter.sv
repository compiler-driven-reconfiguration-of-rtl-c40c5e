// tb_qc_wb_arbiter: four bus masters (modelled here) and a slave that
// acknowledges two cycles after a request appears. Checks that only the
// owner's request reaches the slave and only the owner sees ack, that four
// simultaneous requests are served in round-robin order back to back
// (acks 3, 6, 9, 12 cycles after the request), and that random traffic is
// served without starving anyone.
module tb_qc_wb_arbiter;
  import qc_pkg::*;
  logic clk = 0, rst_n = 0;
  wb_req_t [NCORES-1:0] m_req;
  logic [NCORES-1:0] m_ack, grant;
  wb_req_t s_req;
  logic s_ack;
  int checks = 0, failures = 0, cyc = 0;
  int scnt = 0;
  always #5 clk = ~clk;
  qc_wb_arbiter dut (.*);

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

  // slave: ack in the third cycle of a request
  assign s_ack = s_req.cyc && scnt == 2;
  always @(posedge clk) scnt <= (!s_req.cyc || s_ack) ? 0 : scnt + 1;

  // masters: hold request until ack, then drop it
  logic [NCORES-1:0] want = 0, hold = 0;
  int ack_cycle [NCORES];
  int order [$];
  always @(posedge clk) begin
    cyc++;
    for (int c = 0; c < NCORES; c++) begin
      if (m_ack[c]) begin
        m_req[c] <= WB_IDLE;
        ack_cycle[c] = cyc;
        order.push_back(c);
      end else if ((want[c] || hold[c]) && !m_req[c].cyc) begin
        m_req[c] <= WB_IDLE;
        m_req[c].cyc <= 1'b1; m_req[c].stb <= 1'b1;
        m_req[c].adr <= addr_t'(c * 100 + cyc);
      end
    end
    want <= '0;
  end

  // checks every cycle
  always @(negedge clk) if (rst_n) begin
    chk($countones(m_ack) <= 1 && (m_ack & ~grant) == 0, "ack only to owner");
    for (int c = 0; c < NCORES; c++)
      if (grant[c]) chk(s_req == m_req[c], "owner drives the bus");
  end

  initial begin
    int t0;
    for (int c = 0; c < NCORES; c++) m_req[c] = WB_IDLE;
    @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    want = 4'b1111; t0 = cyc + 1;
    repeat (16) @(negedge clk);
    chk(order.size() == 4 && order[0] == 0 && order[1] == 1 && order[2] == 2 && order[3] == 3,
        "round-robin order 0,1,2,3");
    for (int c = 0; c < NCORES; c++)
      chk(ack_cycle[c] - t0 == 3 * (c + 1) + 1, $sformatf("core %0d ack after %0d cycles", c, ack_cycle[c] - t0));
    // second round starting after core 3: core 1 and core 2 request, 2 first? no: 0 is next
    order.delete();
    want = 4'b0110;
    repeat (10) @(negedge clk);
    chk(order.size() == 2 && order[0] == 1 && order[1] == 2, "next round starts after last owner");
    // three masters that re-request at once: none may be starved
    repeat (5) @(negedge clk);
    order.delete();
    hold = 4'b0111;
    repeat (40) @(negedge clk);
    hold = 0;
    repeat (20) @(negedge clk);
    for (int c = 0; c < 3; c++) begin
      automatic int k = 0;
      for (int i = 0; i < 9; i++) if (order[i] == c) k++;
      chk(k == 3, $sformatf("core %0d got %0d of the first 9 grants", c, k));
    end
    // random traffic: everyone is served
    order.delete();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      want = 4'($urandom);
    end
    want = 0;
    repeat (20) @(negedge clk);
    for (int c = 0; c < NCORES; c++) begin
      automatic int k = 0;
      foreach (order[i]) if (order[i] == c) k++;
      chk(k > 20, $sformatf("core %0d served %0d times", c, k));
    end
    chk(m_req[0].cyc == 0 && m_req[1].cyc == 0 && m_req[2].cyc == 0 && m_req[3].cyc == 0, "all served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
