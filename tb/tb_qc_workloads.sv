// tb_qc_workloads: runs two of the benchmark kernels on the cluster at its
// default size, each on one core and in a parallel mode, and checks the
// results against a reference computed here.
//   convolution   full discrete convolution of a 50-element and a 16-element
//                 array (65 outputs); single core versus four cores in ASYNC
//                 mode, core c computing outputs n = c, c+4, ...
//   vectormuladd  multiply-accumulate of two 10-element vectors; single core
//                 with single-word loads versus SIMD over four cores with
//                 adjacent loads, partial sums combined through the shared
//                 register file.
//   two groups    cores {0,1} and {2,3} as two SIMD groups at the same time,
//                 each with its own master, both using adjacent accesses.
// The cycle counts are printed; the parallel run must be the faster one.
module tb_qc_workloads;
  import qc_pkg::*;
  import qc_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic ld_we = 1'b0;
  logic [CID_W-1:0] ld_core = '0;
  logic [9:0] ld_addr = '0;
  instr_t ld_data = '0;
  logic hst_en = 1'b0, hst_we = 1'b0;
  addr_t hst_addr = '0;
  word_t hst_wdata = '0, hst_rdata;
  logic [NCORES-1:0] halted;
  mode_e [NCORES-1:0] mode;

  always #5 clk = ~clk;
  qc_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int X = 256, H = 384, Y = 512;   // convolution buffers
  localparam int VA = 'h40, VB = 'h50;        // vectors (padded to 12)
  localparam int VR = 'h60;                   // vector result

  instr_t prog [NCORES][$];

  // r <- base (a multiple of 128) built with LI and SHL
  task automatic li_big(int c, int r, int base);
    prog[c].push_back(i_li(r, base / 128));
    prog[c].push_back(i_li(15, 7));
    prog[c].push_back(i_shl(r, r, 15));
  endtask

  task automatic conv_prog(int c, int stride);
    int ln, lj;
    prog[c].push_back(i_li(1, c));
    prog[c].push_back(i_li(2, 65));
    prog[c].push_back(i_li(3, stride));
    li_big(c, 4, X);
    li_big(c, 5, H);
    li_big(c, 6, Y);
    prog[c].push_back(i_li(9, 16));
    prog[c].push_back(i_li(11, 15));
    ln = prog[c].size();
    prog[c].push_back(i_li(7, 0));
    prog[c].push_back(i_li(8, 0));
    prog[c].push_back(i_add(10, 4, 1));
    prog[c].push_back(i_add(10, 10, 11));     // &xpad[n + 15]
    prog[c].push_back(i_add(12, 5, 0));       // &h[0]
    lj = prog[c].size();
    prog[c].push_back(i_ldx(13, 10));
    prog[c].push_back(i_ldx(14, 12));
    prog[c].push_back(i_mul(13, 13, 14));
    prog[c].push_back(i_add(7, 7, 13));
    prog[c].push_back(i_addi(10, 10, -1));
    prog[c].push_back(i_addi(12, 12, 1));
    prog[c].push_back(i_addi(8, 8, 1));
    prog[c].push_back(i_cmp(CC_LT, 8, 9));
    prog[c].push_back(i_br(BR_FLAG, lj - prog[c].size()));
    prog[c].push_back(i_add(13, 6, 1));
    prog[c].push_back(i_stx(7, 13));
    prog[c].push_back(i_add(1, 1, 3));
    prog[c].push_back(i_cmp(CC_LT, 1, 2));
    prog[c].push_back(i_br(BR_FLAG, ln - prog[c].size()));
    if (stride > 1) prog[c].push_back(i_bar(4'b1111));
    prog[c].push_back(i_halt());
  endtask

  task automatic vma_single();
    int l;
    prog[0].push_back(i_li(1, VA));
    prog[0].push_back(i_li(2, VB));
    prog[0].push_back(i_li(3, 0));
    prog[0].push_back(i_li(4, 0));
    prog[0].push_back(i_li(9, 10));
    l = prog[0].size();
    prog[0].push_back(i_ldx(5, 1));
    prog[0].push_back(i_ldx(6, 2));
    prog[0].push_back(i_mul(5, 5, 6));
    prog[0].push_back(i_add(3, 3, 5));
    prog[0].push_back(i_addi(1, 1, 1));
    prog[0].push_back(i_addi(2, 2, 1));
    prog[0].push_back(i_addi(4, 4, 1));
    prog[0].push_back(i_cmp(CC_LT, 4, 9));
    prog[0].push_back(i_br(BR_FLAG, l - prog[0].size()));
    prog[0].push_back(i_li(7, VR));
    prog[0].push_back(i_stx(3, 7));
    prog[0].push_back(i_halt());
  endtask

  task automatic vma_simd();
    int l;
    for (int c = 0; c < NCORES; c++) begin
      prog[c].push_back(i_mode(MODE_SIMD, 4'b1111));
      if (c == 0) begin
        prog[c].push_back(i_li(1, VA));
        prog[c].push_back(i_li(2, VB));
        prog[c].push_back(i_li(3, 0));
        prog[c].push_back(i_li(4, 0));
        prog[c].push_back(i_li(9, 3));
        l = prog[c].size();
        prog[c].push_back(i_lda(5, 1));
        prog[c].push_back(i_lda(6, 2));
        prog[c].push_back(i_mul(5, 5, 6));
        prog[c].push_back(i_add(3, 3, 5));
        prog[c].push_back(i_addi(1, 1, 4));
        prog[c].push_back(i_addi(2, 2, 4));
        prog[c].push_back(i_addi(4, 4, 1));
        prog[c].push_back(i_cmp(CC_LT, 4, 9));
        prog[c].push_back(i_br(BR_FLAG, l - prog[c].size()));
        prog[c].push_back(i_mode(MODE_ASYNC, 4'b1111));
      end
      prog[c].push_back(i_cstw(3, c));
      prog[c].push_back(i_bar(4'b1111));
      if (c == 0) begin
        for (int k = 1; k < NCORES; k++) begin
          prog[c].push_back(i_cldw(5, k));
          prog[c].push_back(i_add(3, 3, 5));
        end
        prog[c].push_back(i_li(7, VR));
        prog[c].push_back(i_stx(3, 7));
      end
      prog[c].push_back(i_halt());
    end
  endtask

  task automatic two_groups();
    for (int c = 0; c < NCORES; c++) begin
      automatic int g = c / 2;
      prog[c].push_back(i_mode(MODE_SIMD, g == 0 ? 4'b0011 : 4'b1100));
      if (c % 2 == 0) begin
        prog[c].push_back(i_li(1, g == 0 ? 'h70 : 'h60));
        prog[c].push_back(i_li(3, g == 0 ? 'h74 : 'h64));
        prog[c].push_back(i_lda(2, 1));
        prog[c].push_back(i_lda(4, 3));
        prog[c].push_back(i_add(2, 2, 4));
        prog[c].push_back(i_addi(2, 2, g + 1));
        prog[c].push_back(i_li(5, 'h78));
        prog[c].push_back(i_sta(2, 5));
        prog[c].push_back(i_mode(MODE_ASYNC, g == 0 ? 4'b0011 : 4'b1100));
      end
      prog[c].push_back(i_halt());
    end
  endtask

  task automatic hwrite(int a, word_t d);
    @(negedge clk);
    hst_en = 1'b1; hst_we = 1'b1; hst_addr = addr_t'(a); hst_wdata = d;
    @(negedge clk);
    hst_en = 1'b0; hst_we = 1'b0;
  endtask

  task automatic hread(int a, output word_t d);
    @(negedge clk);
    hst_en = 1'b1; hst_we = 1'b0; hst_addr = addr_t'(a);
    @(negedge clk);
    d = hst_rdata;
    hst_en = 1'b0;
  endtask

  // reset, load the programs in prog[] (HALT for an empty one), run to HALT
  task automatic execute(output int cycles);
    @(negedge clk);
    run = 1'b0; rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCORES; c++) begin
      if (prog[c].size() == 0) prog[c].push_back(i_halt());
      for (int i = 0; i < prog[c].size(); i++) begin
        @(negedge clk);
        ld_we = 1'b1; ld_core = CID_W'(c); ld_addr = 10'(i); ld_data = prog[c][i];
      end
    end
    @(negedge clk);
    ld_we = 1'b0; run = 1'b1;
    cycles = 0;
    while (!(&halted)) begin @(negedge clk); cycles++; end
    run = 1'b0;
    for (int c = 0; c < NCORES; c++) prog[c].delete();
  endtask

  word_t x [50], h [16], yref [65], va [10], vb [10];

  initial begin
    int cyc_single, cyc_par;
    word_t d, vref;
    // ---------------- convolution ----------------
    for (int i = 0; i < 80; i++) hwrite(X + i, '0);
    for (int i = 0; i < 50; i++) begin x[i] = word_t'($urandom_range(0, 200)) - 100; hwrite(X + 15 + i, x[i]); end
    for (int j = 0; j < 16; j++) begin h[j] = word_t'($urandom_range(0, 20)) - 10; hwrite(H + j, h[j]); end
    for (int n = 0; n < 65; n++) begin
      yref[n] = '0;
      for (int k = 0; k < 50; k++)
        if (n - k >= 0 && n - k < 16) yref[n] += x[k] * h[n - k];
    end
    for (int pass = 0; pass < 2; pass++) begin
      int cyc;
      for (int n = 0; n < 65; n++) hwrite(Y + n, 32'hdead);
      if (pass == 0) conv_prog(0, 1);
      else for (int c = 0; c < NCORES; c++) conv_prog(c, NCORES);
      execute(cyc);
      if (pass == 0) cyc_single = cyc; else cyc_par = cyc;
      for (int n = 0; n < 65; n++) begin
        hread(Y + n, d);
        check(d == yref[n], $sformatf("convolution pass %0d y[%0d] = %0d, expected %0d", pass, n, $signed(d), $signed(yref[n])));
      end
    end
    $display("convolution: single core %0d cycles, ASYNC x4 %0d cycles", cyc_single, cyc_par);
    check(cyc_par < cyc_single, "convolution faster on four cores");
    // ---------------- vectormuladd ----------------
    vref = '0;
    for (int i = 0; i < 12; i++) begin
      word_t a, b;
      a = (i < 10) ? word_t'($urandom_range(0, 100)) : '0;
      b = (i < 10) ? word_t'($urandom_range(0, 100)) - 50 : '0;
      hwrite(VA + i, a); hwrite(VB + i, b);
      vref += a * b;
    end
    vma_single();
    execute(cyc_single);
    hread(VR, d);
    check(d == vref, $sformatf("vectormuladd single %0d, expected %0d", $signed(d), $signed(vref)));
    hwrite(VR, '0);
    vma_simd();
    execute(cyc_par);
    hread(VR, d);
    check(d == vref, $sformatf("vectormuladd SIMD %0d, expected %0d", $signed(d), $signed(vref)));
    $display("vectormuladd: single core %0d cycles, SIMD x4 %0d cycles", cyc_single, cyc_par);
    check(cyc_par < cyc_single, "vectormuladd faster in SIMD");
    // ---------------- two SIMD groups at once ----------------
    begin
      word_t m [32];
      int cyc;
      for (int i = 0; i < 32; i++) begin m[i] = $urandom_range(0, 1000); hwrite('h60 + i, m[i]); end
      two_groups();
      execute(cyc);
      for (int c = 0; c < NCORES; c++) begin
        word_t e;
        e = (c < 2) ? m['h10 + c] + m['h14 + c] + 1 : m[c] + m[4 + c] + 2;
        hread('h78 + c, d);
        check(d == e, $sformatf("two groups: core %0d stored %0d, expected %0d", c, d, e));
      end
      $display("two SIMD groups: %0d cycles", cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
