// tb_ce_slice: end-to-end test of one Convolution Engine slice running small
// kernels from memory to memory, each checked against image arithmetic done
// in the testbench:
//   1. 15-tap horizontal filter (16-tap stencil, last tap masked), signed
//      coefficients, unaligned line-crossing load, rounding shift, 0..255 clamp;
//   2. 4x4 SAD at 15 search positions (2D flow, absolute difference + sum);
//   3. 16x16 SAD as four 4-row bands plus SIMD additions;
//   4. separable filter: horizontal 4-tap results written into the 2D input
//      register row by row, then a vertical 4-tap filter over them;
//   5. difference of two images (matrix operation, no reduction);
//   6. 3x3 extrema test (compare map, logical AND reduce, stencil mask);
//   7. interleaved load split into two rows.
// It also checks that back-to-back convolutions are accepted one per cycle.
module tb_ce_slice;
  import ce_pkg::*;
  `include "ce_tb_util.svh"

  logic clk = 0, rst_n = 1;
  logic cmd_valid = 0;
  ce_instr_t cmd = '0;
  logic cmd_ready;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [26:0] mem_line;
  logic [255:0] mem_wdata, mem_rdata;
  logic [31:0] mem_be;
  int checks = 0, failures = 0;

  ce_slice dut (.*);
  tb_mem_model #(.NLINES(256), .RAND_WAIT(1'b1)) u_mem (
    .clk, .req (mem_req), .we (mem_we), .line (mem_line), .wdata (mem_wdata),
    .be (mem_be), .gnt (mem_gnt), .rvalid (mem_rvalid), .rdata (mem_rdata)
  );

  always #5 clk = ~clk;

  function automatic int getb(int a);
    return int'(u_mem.mem[a / 32][8 * (a % 32) +: 8]);
  endfunction
  task automatic setb(int a, int v);
    u_mem.mem[a / 32][8 * (a % 32) +: 8] = 8'(v);
  endtask
  function automatic int sgetb(int a);
    return int'($signed(u_mem.mem[a / 32][8 * (a % 32) +: 8]));
  endfunction

  // issue one instruction; returns the cycles until it was accepted
  task automatic issue(ce_instr_t i, output int waited);
    cmd = i;
    cmd_valid = 1;
    waited = 0;
    #1;
    while (!cmd_ready) begin @(negedge clk); waited++; #1; end
    @(negedge clk);
    cmd_valid = 0;
    cmd = '0;
  endtask
  task automatic go(ce_instr_t i);
    int w;
    issue(i, w);
  endtask
  task automatic drain();
    int w;
    issue('0, w);   // NOP: accepted once the slice is idle again
  endtask

  task automatic check(int got, int exp, string what, int idx);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s[%0d]: got %0d expected %0d", what, idx, got, exp);
    end
  endtask

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, s, e, t0, ncyc;
    int hrow [4][20];
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 8192; a++) setb(a, $urandom);
    @(negedge clk);

    // ---- 1. 15-tap horizontal filter ----
    for (int k = 0; k < 16; k++) setb(32'h200 + k, $urandom_range(0, 60) - 20);
    go(i_ops(MAP_MUL, RED_ADD));
    go(i_size(KS_16, 16'h7FFF, 6, 1));
    go(i_mem(OP_LD_COEFF, 32'h200, W128, 0, 1, 0, 0));
    go(i_mem(OP_LD_1D, 32'h103, W256, 0, 0, 0, 0));
    drain();
    t0 = 0;
    for (int q = 0; q < 16; q += 4) begin
      issue(i_conv(OP_CONV_HOR, q, 0, 0, q, 0), w);
      t0 += w;
    end
    check(t0, 0, "conv accept wait", 0);
    go(i_mem(OP_ST_OUT, 32'h400, W128, 0, 0, 0, 0));
    drain();
    for (int q = 0; q < 16; q++) begin
      s = 0;
      for (int k = 0; k < 15; k++) s += sgetb(32'h200 + k) * getb(32'h103 + q + k);
      check(getb(32'h400 + q), clampi((s + 32) >>> 6, 0, 255), "hfilter", q);
    end

    // ---- 2. 4x4 SAD at 15 positions ----
    for (int r = 0; r < 4; r++) for (int c = 0; c < 18; c++) setb(32'h500 + 32 * r + c, $urandom_range(0, 15));
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) setb(32'h600 + 32 * r + c, $urandom_range(0, 15));
    go(i_ops(MAP_ABSDIFF, RED_ADD));
    go(i_size(KS_4, 16'hFFFF, 0, 0));
    for (int r = 0; r < 4; r++) go(i_mem(OP_LD_COEFF, 32'h600 + 32 * r, W32, 0, 0, r, 0));
    for (int r = 3; r >= 0; r--) go(i_mem(OP_LD_2D, 32'h500 + 32 * r, W256, 1, 0, 0, 0));
    for (int q = 0; q < 16; q += 4) go(i_conv(OP_CONV_2D, q, 0, 0, q, 0));
    go(i_mem(OP_ST_OUT, 32'h700, W128, 0, 0, 0, 0));
    drain();
    for (int q = 0; q < 15; q++) begin
      s = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        s += (getb(32'h500 + 32 * r + q + c) > getb(32'h600 + 32 * r + c)) ?
             getb(32'h500 + 32 * r + q + c) - getb(32'h600 + 32 * r + c) :
             getb(32'h600 + 32 * r + c) - getb(32'h500 + 32 * r + q + c);
      check(getb(32'h700 + q), s, "sad4x4", q);
    end

    // ---- 3. 16x16 SAD in four bands + SIMD ----
    for (int r = 0; r < 16; r++) for (int c = 0; c < 18; c++) setb(32'h800 + 32 * r + c, $urandom_range(0, 1));
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) setb(32'hA00 + 32 * r + c, $urandom_range(0, 1));
    go(i_size(KS_16, 16'hFFFF, 0, 0));
    for (int r = 0; r < 16; r++) go(i_mem(OP_LD_COEFF, 32'hA00 + 32 * r, W128, 0, 0, r, 0));
    for (int r = 15; r >= 0; r--) go(i_mem(OP_LD_2D, 32'h800 + 32 * r, W256, 1, 0, 0, 0));
    for (int b = 0; b < 4; b++) go(i_conv(OP_CONV_2D, 1, 0, 0, 0, 1, 0, b));
    for (int r = 1; r < 4; r++) go(i_simd(SIMD_ADD, 0, r, 0));
    go(i_mem(OP_ST_OUT, 32'hC00, W32, 0, 0, 0, 0));
    drain();
    s = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
      s += (getb(32'h800 + 32 * r + 1 + c) != getb(32'hA00 + 32 * r + c)) ? 1 : 0;
    check(getb(32'hC00), s % 256, "sad16x16", 0);

    // ---- 4. separable 4x4 filter through the 2D input register ----
    for (int r = 0; r < 4; r++) for (int c = 0; c < 32; c++) setb(32'h1000 + 32 * r + c, $urandom_range(0, 15));
    setb(32'h1100, 1); setb(32'h1101, 3); setb(32'h1102, 3); setb(32'h1103, 1);
    setb(32'h1104, 1); setb(32'h1105, 2); setb(32'h1106, 1); setb(32'h1107, 1);
    go(i_ops(MAP_MUL, RED_ADD));
    go(i_size(KS_4, 16'hFFFF, 0, 0));
    go(i_mem(OP_LD_COEFF, 32'h1100, W32, 0, 1, 0, 0));
    go(i_mem(OP_LD_COEFF, 32'h1104, W32, 0, 1, 1, 0));
    for (int r = 0; r < 4; r++) begin
      go(i_mem(OP_LD_1D, 32'h1000 + 32 * r, W256, 0, 0, 0, 0));
      go(i_conv(OP_CONV_HOR, 0, 0, 0, 0, 1, 1));
    end
    go(i_size(KS_4, 16'hFFFF, 1, 1));
    go(i_conv(OP_CONV_VER, 0, 0, 1, 0, 0));
    go(i_mem(OP_ST_OUT, 32'h1200, W128, 0, 0, 0, 0));
    drain();
    for (int r = 0; r < 4; r++) for (int c = 0; c < 16; c++) begin
      hrow[r][c] = getb(32'h1000 + 32 * r + c) + 3 * getb(32'h1000 + 32 * r + c + 1) +
                   3 * getb(32'h1000 + 32 * r + c + 2) + getb(32'h1000 + 32 * r + c + 3);
    end
    for (int c = 0; c < 16; c++) begin
      // newest row sits in row 0 of the 2D register: tap k reads image row 3-k
      s = hrow[3][c] + 2 * hrow[2][c] + hrow[1][c] + hrow[0][c];
      check(getb(32'h1200 + c), clampi((s + 1) >>> 1, 0, 255), "separable", c);
    end

    // ---- 5. difference of two images (matrix op) ----
    for (int c = 0; c < 32; c++) begin setb(32'h1300 + c, $urandom_range(0, 100)); setb(32'h1320 + c, $urandom_range(0, 100)); end
    go(i_ops(MAP_SUB, RED_NONE));
    go(i_size(KS_4, 16'hFFFF, 0, 0));
    go(i_mem(OP_LD_2D, 32'h1300, W256, 1, 0, 0, 0));
    go(i_mem(OP_LD_COEFF, 32'h1320, W128, 0, 0, 5, 0));
    go(i_conv(OP_CONV_2D, 0, 0, 5, 0, 0));
    go(i_mem(OP_ST_OUT, 32'h1400, W128, 0, 0, 0, 0));
    drain();
    for (int c = 0; c < 16; c++) check(sgetb(32'h1400 + c), getb(32'h1300 + c) - getb(32'h1320 + c), "dog", c);

    // ---- 6. 3x3 extrema test ----
    for (int r = 0; r < 4; r++) for (int c = 0; c < 18; c++) setb(32'h1500 + 32 * r + c, $urandom_range(50, 120));
    for (int c = 0; c < 4; c++) setb(32'h1600 + c, 60);
    go(i_ops(MAP_CMPGT, RED_AND));
    go(i_size(KS_4, 16'h0777, 0, 0));
    for (int r = 0; r < 4; r++) go(i_mem(OP_LD_COEFF, 32'h1600, W32, 0, 0, r, 0));
    for (int r = 3; r >= 0; r--) go(i_mem(OP_LD_2D, 32'h1500 + 32 * r, W256, 1, 0, 0, 0));
    for (int q = 0; q < 16; q += 4) go(i_conv(OP_CONV_2D, q, 0, 0, q, 0));
    go(i_mem(OP_ST_OUT, 32'h1700, W128, 0, 0, 0, 0));
    drain();
    for (int q = 0; q < 16; q++) begin
      e = 1;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
        if (q + c >= 18 || !(getb(32'h1500 + 32 * r + q + c) > 60)) e = 0;
      check(getb(32'h1700 + q), e, "extrema", q);
    end

    // ---- 7. interleaved load ----
    go(i_ops(MAP_PASS, RED_NONE));
    go(i_mem(OP_LD_2D, 32'h1800, W256, 1, 0, 0, 0, 1));
    go(i_conv(OP_CONV_2D, 0, 0, 0, 0, 0));
    go(i_mem(OP_ST_OUT, 32'h1900, W128, 0, 0, 0, 0));
    go(i_conv(OP_CONV_2D, 0, 1, 0, 0, 0));
    go(i_mem(OP_ST_OUT, 32'h1910, W128, 0, 0, 0, 0));
    drain();
    for (int c = 0; c < 16; c++) begin
      check(getb(32'h1900 + c), getb(32'h1800 + 2 * c), "ilv_even", c);
      check(getb(32'h1910 + c), getb(32'h1800 + 2 * c + 1), "ilv_odd", c);
    end

    // ---- throughput: 32 convolutions back to back ----
    ncyc = 0;
    cmd = i_conv(OP_CONV_HOR, 0, 0, 0, 0, 0);
    cmd_valid = 1;
    for (int n = 0; n < 32; ) begin
      #1;
      if (cmd_ready) n++;
      ncyc++;
      @(negedge clk);
    end
    cmd_valid = 0;
    check(ncyc, 32, "cycles for 32 convolutions", 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
