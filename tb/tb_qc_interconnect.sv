// tb_qc_interconnect: checks instruction routing (own decoder, or the SIMD
// master's for the other cores of the group, chosen by the next mode) and
// the execution control (alone in ASYNC, jointly in SYNC and SIMD groups).
module tb_qc_interconnect;
  import qc_pkg::*;
  ctrl_t  [NCORES-1:0] dec_ctrl, ex_ctrl;
  mode_e  [NCORES-1:0] mode, mode_nxt;
  cmask_t [NCORES-1:0] mask, mask_nxt;
  logic   [NCORES-1:0] ready, slave_nxt, advance;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  qc_interconnect dut (.*);

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
    for (int n = 0; n < 400; n++) begin
      for (int c = 0; c < NCORES; c++) begin
        dec_ctrl[c] = CTRL_BUBBLE;
        dec_ctrl[c].valid = 1'b1;
        dec_ctrl[c].imm = word_t'(100 + c);
      end
      // random groups: choose one mode for a random mask, others ASYNC
      begin
        cmask_t g; mode_e m, mn;
        g = cmask_t'($urandom_range(1, 15));
        m  = mode_e'($urandom_range(0, 2));
        mn = mode_e'($urandom_range(0, 2));
        for (int c = 0; c < NCORES; c++) begin
          mode[c] = g[c] ? m : MODE_ASYNC;  mask[c] = g[c] ? g : cmask_t'(1 << c);
          mode_nxt[c] = g[c] ? mn : MODE_ASYNC; mask_nxt[c] = mask[c];
        end
        ready = 4'($urandom);
        #1;
        for (int c = 0; c < NCORES; c++) begin
          int master, exp_src;
          logic exp_adv;
          master = 0;
          for (int j = NCORES - 1; j >= 0; j--) if (g[j]) master = j;
          exp_src = (g[c] && mn == MODE_SIMD) ? master : c;
          chk(ex_ctrl[c].imm == word_t'(100 + exp_src), $sformatf("routing core %0d", c));
          chk(slave_nxt[c] == (exp_src != c), "slave flag");
          exp_adv = (g[c] && m != MODE_ASYNC) ? ((ready & g) == g) : ready[c];
          chk(advance[c] == exp_adv, $sformatf("advance core %0d mode %0d g %b ready %b", c, m, g, ready));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
