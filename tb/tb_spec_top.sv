// tb_spec_top: end-to-end test of the whole design at its default sizes
// (four CE slices, two host ports, 16x16 SAD array, 16-unit bilateral array
// with a 1 KB L0 cache). Every unit runs a small real job and its results
// are checked against arithmetic done here:
// - CE slice 0 (host port 0): a 4-tap filter on an unaligned load that
//   crosses a memory line; the same filter written into the 2D input
//   register and passed through a vertical convolution; a SIMD add on the
//   output row; an interleaved load whose even and odd pixels are summed
//   by a masked vertical convolution. At the same time CE slice 3 (host port
//   1) computes 4x4 SADs with the 2D flow. Then both ports contend for
//   slice 1.
// - IME: SADs over a search row with horizontal and vertical register shifts.
// - FME: six rows through the upsampler, half-pixels checked.
// - CABAC LIFO: a 4x4 block pushed in scan order and popped reversed.
// - Bilateral array: per-unit addresses, shared table loads, a compare and
//   two conditional paths, stores, conflicting loads that evict the stored
//   lines, and reloads of the stored values.
// Each mechanism (memory wait, line-crossing load, port contention, each
// convolution flow, SIMD, interleaved load, write to the 2D register,
// horizontal and vertical reference shift, FME output, LIFO push and pop,
// L0 miss stall, dirty write-back, divergent conditional execution) is
// counted, and a mechanism that never happened counts as a failure.
module tb_spec_top;
  import ce_pkg::*;
  import bg_pkg::*;
  `include "ce_tb_util.svh"

  localparam int NS = 4;
  localparam int NU = 16;
  logic clk = 0, rst_n = 1;

  logic [1:0]   ce_valid = '0;
  logic [1:0]   ce_slice [2];
  ce_instr_t    ce_cmd [2];
  logic [1:0]   ce_ready;
  logic [NS-1:0] ce_mem_req, ce_mem_we, ce_mem_gnt, ce_mem_rvalid;
  logic [26:0]  ce_mem_line  [NS];
  logic [255:0] ce_mem_wdata [NS];
  logic [31:0]  ce_mem_be    [NS];
  logic [255:0] ce_mem_rdata [NS];

  logic ime_ref_ld = 0, ime_ref_half = 0, ime_ref_vshift = 0, ime_ref_hshift = 0;
  logic ime_cur_ld = 0, ime_sad_en = 0;
  logic [127:0] ime_ref_data = '0, ime_cur_data = '0;
  logic [3:0] ime_cur_row = '0;
  logic ime_sad_valid;
  logic [15:0] ime_sad_total;
  logic [11:0] ime_sad4 [16];

  logic fme_in_valid = 0;
  logic [7:0] fme_in_pix [10];
  logic fme_out_valid;
  logic [7:0] fme_hpel [5];
  logic [7:0] fme_vpel [5];
  logic [7:0] fme_dpel [5];

  logic lifo_push = 0, lifo_pop = 0;
  logic signed [15:0] lifo_din = '0, lifo_top;
  logic lifo_top_zero, lifo_empty, lifo_full;
  logic [4:0] lifo_count, lifo_nz_count;

  logic bg_valid = 0, bg_ready;
  bg_instr_t bg_instr;
  logic [2:0] bg_dbg_v = '0;
  logic [63:0] bg_dbg_data [NU];
  logic [NU-1:0] bg_dbg_flag;
  logic l1_req, l1_we, l1_gnt, l1_rvalid;
  logic [26:0] l1_line;
  logic [255:0] l1_wdata, l1_rdata;
  logic [31:0] l0_hits, l0_fills;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_memwait = 0, n_cross = 0, n_contend = 0, n_hor = 0, n_ver = 0, n_2d = 0;
  int n_simd = 0, n_ilv = 0, n_in2d = 0, n_hshift = 0, n_vshift = 0, n_fme = 0;
  int n_push = 0, n_pop = 0, n_l0stall = 0, n_wb = 0, n_split = 0;

  spec_top dut (.*);

  for (genvar s = 0; s < NS; s++) begin : g_mem
    tb_mem_model #(.NLINES(64), .RAND_WAIT(1'b1)) u_mem (
      .clk, .req(ce_mem_req[s]), .we(ce_mem_we[s]), .line(ce_mem_line[s]),
      .wdata(ce_mem_wdata[s]), .be(ce_mem_be[s]), .gnt(ce_mem_gnt[s]),
      .rvalid(ce_mem_rvalid[s]), .rdata(ce_mem_rdata[s]));
  end
  tb_mem_model #(.NLINES(256), .RAND_WAIT(1'b1)) u_l1 (
    .clk, .req(l1_req), .we(l1_we), .line(l1_line), .wdata(l1_wdata),
    .be('1), .gnt(l1_gnt), .rvalid(l1_rvalid), .rdata(l1_rdata));

  always #5 clk = ~clk;

  int grants0 = 0;   // memory grants to slice 0
  always @(posedge clk) begin
    if (ce_mem_req[0] && ce_mem_gnt[0]) grants0++;
    if (ce_mem_req != 0 && (ce_mem_req & ~ce_mem_gnt) != 0) n_memwait++;
    if (ce_valid == 2'b11 && ce_slice[0] == ce_slice[1] && $countones(ce_ready) == 1) n_contend++;
    if (fme_out_valid) n_fme++;
    if (lifo_push) n_push++;
    if (lifo_pop) n_pop++;
    if (bg_valid && !bg_ready) n_l0stall++;
    if (l1_req && l1_we && l1_gnt) n_wb++;
  end

  task automatic check(int got, int exp, string what, int idx = 0);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s[%0d]: got %0d expected %0d", what, idx, got, exp);
    end
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // ---------------- Convolution Engine ----------------
  function automatic int getb0(int a); return int'(g_mem[0].u_mem.mem[a / 32][8 * (a % 32) +: 8]); endfunction
  function automatic int getb3(int a); return int'(g_mem[3].u_mem.mem[a / 32][8 * (a % 32) +: 8]); endfunction

  task automatic issue(int p, int s, ce_instr_t i);
    ce_cmd[p] = i;
    ce_slice[p] = 2'(s);
    ce_valid[p] = 1;
    #1;
    while (!ce_ready[p]) begin @(negedge clk); #1; end
    @(negedge clk);
    ce_valid[p] = 0;
    case (i.op)
      OP_CONV_HOR: n_hor++;
      OP_CONV_VER: n_ver++;
      OP_CONV_2D:  n_2d++;
      OP_SIMD:     n_simd++;
      OP_LD_2D:    if (i.ilv) n_ilv++;
      default: ;
    endcase
    if (i.dest_in2d && i.op inside {OP_CONV_HOR, OP_CONV_VER, OP_CONV_2D}) n_in2d++;
  endtask

  // wait until slice s has finished everything it accepted
  task automatic drain(int p, int s);
    issue(p, s, '0);
    issue(p, s, '0);
  endtask

  task automatic ce_test();
    int s, g0, gx;
    int h [16];
    for (int a = 0; a < 64; a++) begin
      g_mem[0].u_mem.mem[a] = {$urandom, $urandom, $urandom, $urandom,
                               $urandom, $urandom, $urandom, $urandom} & {32{8'h0F}};
      g_mem[3].u_mem.mem[a] = {$urandom, $urandom, $urandom, $urandom,
                               $urandom, $urandom, $urandom, $urandom} & {32{8'h0F}};
    end
    g_mem[0].u_mem.mem[2][31:0] = 32'h04030201;   // coefficients 1 2 3 4 at 0x40
    g_mem[0].u_mem.mem[3][31:0] = 32'h00000101;   // coefficients 1 1 0 0 at 0x60
    fork
      begin
        issue(0, 0, i_ops(MAP_MUL, RED_ADD));
        issue(0, 0, i_size(KS_4, 16'hFFFF, 0, 1));
        issue(0, 0, i_mem(OP_LD_COEFF, 32'h40, W32, 0, 0, 0, 0));
        // 256-bit load from byte 12 spans lines 0 and 1
        drain(0, 0);
        grants0 = 0;
        issue(0, 0, i_mem(OP_LD_1D, 32'h0C, W256, 0, 0, 0, 0));
        drain(0, 0);
        if (grants0 == 2) n_cross++;
        else $display("grants for the crossing load: %0d", grants0);
        issue(0, 0, i_conv(OP_CONV_HOR, 0, 0, 0, 0, 0));
        issue(0, 0, i_mem(OP_ST_OUT, 32'h100, W128, 0, 0, 0, 0));
        // same filter into the 2D input register, then vertical pass-through
        issue(0, 0, i_conv(OP_CONV_HOR, 0, 0, 0, 0, 0, 1));
        issue(0, 0, i_size(KS_4, 16'h0001, 0, 1));
        issue(0, 0, i_conv(OP_CONV_VER, 0, 0, 0, 0, 0));
        issue(0, 0, i_simd(SIMD_ADDC, 0, 0, 5));
        issue(0, 0, i_mem(OP_ST_OUT, 32'h120, W128, 0, 0, 0, 0));
        // interleaved load: even pixels to row 0, odd to row 1, summed
        issue(0, 0, i_mem(OP_LD_COEFF, 32'h60, W32, 0, 0, 0, 0));
        issue(0, 0, i_mem(OP_LD_2D, 32'h80, W256, 1, 0, 0, 0, 1));
        issue(0, 0, i_size(KS_4, 16'h0003, 0, 1));
        issue(0, 0, i_conv(OP_CONV_VER, 0, 0, 0, 0, 0));
        issue(0, 0, i_mem(OP_ST_OUT, 32'h140, W128, 0, 0, 0, 0));
        drain(0, 0);
      end
      begin
        issue(1, 3, i_ops(MAP_ABSDIFF, RED_ADD));
        issue(1, 3, i_size(KS_4, 16'hFFFF, 0, 0));
        for (int r = 0; r < 4; r++) issue(1, 3, i_mem(OP_LD_COEFF, 32'h200 + 32 * r, W32, 0, 0, r, 0));
        for (int r = 3; r >= 0; r--) issue(1, 3, i_mem(OP_LD_2D, 32'h300 + 32 * r, W256, 1, 0, 0, 0));
        issue(1, 3, i_conv(OP_CONV_2D, 0, 0, 0, 0, 0));
        issue(1, 3, i_mem(OP_ST_OUT, 32'h500, W32, 0, 0, 0, 0));
        drain(1, 3);
      end
    join
    for (int q = 0; q < 16; q++) begin
      s = 0;
      for (int k = 0; k < 4; k++) s += (k + 1) * getb0(12 + q + k);
      h[q] = (s > 255) ? 255 : s;
      check(getb0(32'h100 + q), h[q], "CE horizontal filter", q);
      check(getb0(32'h120 + q), (h[q] + 5 > 255) ? 255 : h[q] + 5, "CE 2D-register path + SIMD", q);
      check(getb0(32'h140 + q), getb0(32'h80 + 2 * q) + getb0(32'h80 + 2 * q + 1), "CE interleaved sum", q);
    end
    for (int q = 0; q < 4; q++) begin
      s = 0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          g0 = getb3(32'h300 + 32 * r + q + c);
          gx = getb3(32'h200 + 32 * r + c);
          s += (g0 > gx) ? g0 - gx : gx - g0;
        end
      check(getb3(32'h500 + q), s, "CE 4x4 SAD", q);
    end
    // both host ports on slice 1
    ce_cmd[0] = '0; ce_cmd[1] = '0;
    ce_slice[0] = 1; ce_slice[1] = 1;
    ce_valid = 2'b11;
    repeat (20) begin
      #1;
      check($countones(ce_ready), 1, "one grant per cycle on a shared slice");
      @(negedge clk);
    end
    ce_valid = '0;
  endtask

  // ---------------- IME ----------------
  task automatic ime_test();
    int win [16][32];
    int cb [16][16];
    int s, s4 [16];
    for (int r = 0; r < 16; r++) for (int c = 0; c < 32; c++) win[r][c] = 0;
    for (int r = 0; r < 16; r++) begin
      ime_cur_ld = 1; ime_cur_row = 4'(r);
      for (int c = 0; c < 16; c++) begin
        cb[r][c] = $urandom_range(0, 255);
        ime_cur_data[8*c +: 8] = 8'(cb[r][c]);
      end
      @(negedge clk);
    end
    ime_cur_ld = 0;
    for (int step = 0; step < 20; step++) begin
      if (step < 16 || step == 18) begin
        // fill (first 16 steps) or one vertical step: new top row
        for (int hf = 0; hf < 2; hf++) begin
          ime_ref_ld = 1; ime_ref_half = hf[0]; ime_ref_vshift = (hf == 0);
          if (hf == 0) begin
            for (int r = 15; r > 0; r--) win[r] = win[r-1];
            if (step >= 16) n_vshift++;
          end
          for (int c = 0; c < 16; c++) begin
            win[0][16*hf + c] = $urandom_range(0, 255);
            ime_ref_data[8*c +: 8] = 8'(win[0][16*hf + c]);
          end
          @(negedge clk);
        end
        ime_ref_ld = 0; ime_ref_vshift = 0;
      end else begin
        ime_ref_hshift = 1;
        @(negedge clk);
        ime_ref_hshift = 0;
        for (int r = 0; r < 16; r++) for (int c = 0; c < 32; c++) win[r][c] = (c < 31) ? win[r][c+1] : 0;
        n_hshift++;
      end
      if (step >= 15) begin
        ime_sad_en = 1;
        @(negedge clk);
        ime_sad_en = 0;
        s = 0;
        for (int b = 0; b < 16; b++) s4[b] = 0;
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++)
            s4[4 * (r / 4) + c / 4] += (win[r][c] > cb[r][c]) ? win[r][c] - cb[r][c] : cb[r][c] - win[r][c];
        for (int b = 0; b < 16; b++) begin
          s += s4[b];
          check(int'(ime_sad4[b]), s4[b], "IME 4x4 SAD", b);
        end
        check(int'(ime_sad_valid), 1, "IME valid");
        check(int'(ime_sad_total), s, "IME 16x16 SAD", step);
      end
    end
  endtask

  // ---------------- FME ----------------
  function automatic int f6(int a, int b, int c, int d, int e, int f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction
  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic fme_test();
    int img [6][10];
    int hr [6];
    for (int r = 0; r < 6; r++) begin
      for (int c = 0; c < 10; c++) begin
        img[r][c] = $urandom_range(0, 255);
        fme_in_pix[c] = 8'(img[r][c]);
      end
      fme_in_valid = 1;
      @(negedge clk);
    end
    fme_in_valid = 0;
    check(int'(fme_out_valid), 1, "FME output valid");
    for (int j = 0; j < 5; j++) begin
      for (int r = 0; r < 6; r++)
        hr[r] = f6(img[r][j], img[r][j+1], img[r][j+2], img[r][j+3], img[r][j+4], img[r][j+5]);
      check(int'(fme_hpel[j]), clip((hr[2] + 16) >>> 5), "FME horizontal half-pel", j);
      check(int'(fme_vpel[j]), clip((f6(img[0][j+2], img[1][j+2], img[2][j+2], img[3][j+2],
                                        img[4][j+2], img[5][j+2]) + 16) >>> 5), "FME vertical half-pel", j);
      check(int'(fme_dpel[j]), clip((f6(hr[0], hr[1], hr[2], hr[3], hr[4], hr[5]) + 512) >>> 10),
            "FME centre half-pel", j);
    end
  endtask

  // ---------------- CABAC LIFO ----------------
  task automatic lifo_test();
    int blk [16];
    int nz = 0;
    for (int i = 0; i < 16; i++) begin
      blk[i] = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, 200) - 100;
      if (blk[i] != 0) nz++;
      lifo_push = 1;
      lifo_din = 16'(blk[i]);
      @(negedge clk);
    end
    lifo_push = 0;
    check(int'(lifo_full), 1, "LIFO full");
    check(int'(lifo_nz_count), nz, "LIFO non-zero count");
    for (int i = 15; i >= 0; i--) begin
      check(int'(lifo_top), blk[i], "LIFO reverse order", i);
      check(int'(lifo_top_zero), int'(blk[i] == 0), "LIFO zero flag", i);
      lifo_pop = 1;
      @(negedge clk);
    end
    lifo_pop = 0;
    check(int'(lifo_empty), 1, "LIFO empty");
  endtask

  // ---------------- Bilateral array ----------------
  function automatic bg_instr_t mk(bg_op_e op, bg_cond_e c, int vd, int va, int vb,
                                   int ad, int as_, bit half, int sh, int imm);
    bg_instr_t i;
    i.op = op; i.cond = c; i.vd = 3'(vd); i.va = 3'(va); i.vb = 3'(vb);
    i.ad = 2'(ad); i.as = 2'(as_); i.half = half; i.shift = 4'(sh); i.imm = 16'(imm);
    return i;
  endfunction

  task automatic bg_issue(bg_instr_t i);
    bg_instr = i;
    bg_valid = 1;
    @(posedge clk);
    while (!bg_ready) @(posedge clk);
    #1;
    bg_valid = 0;
    bg_instr = '0;
    @(negedge clk);
    if (i.cond != C_ALWAYS && bg_dbg_flag != '0 && bg_dbg_flag != '1) n_split++;
  endtask

  function automatic int lane(int u, int l);
    return int'($signed(bg_dbg_data[u][16*l +: 16]));
  endfunction

  task automatic bg_test();
    int w;
    // table word 1024 + u holds 3 * (1024 + u) + 1 in its low half
    for (int k = 0; k < 2048; k++)
      u_l1.mem[k / 8][32 * (k % 8) +: 32] = 32'(3 * k + 1);
    bg_issue(mk(BG_AUID,  C_ALWAYS, 0, 0, 0, 0, 0, 0, 6, 0));      // a0 = 64u
    bg_issue(mk(BG_AUID,  C_ALWAYS, 0, 0, 0, 2, 2, 0, 2, 0));      // a2 = 4u
    bg_issue(mk(BG_AADDI, C_ALWAYS, 0, 0, 0, 2, 2, 0, 0, 4096));   // a2 += 4096
    bg_issue(mk(BG_LD,    C_ALWAYS, 0, 0, 0, 0, 2, 0, 0, 0));      // v0 = table[1024+u]
    bg_issue(mk(BG_VADDI, C_ALWAYS, 1, 7, 0, 0, 0, 0, 0, 3 * 1032 + 1));
    bg_issue(mk(BG_CMPLT, C_ALWAYS, 0, 0, 1, 0, 0, 0, 0, 0));      // flag = v0 < v1
    bg_issue(mk(BG_VADDI, C_IF,     2, 0, 0, 0, 0, 0, 0, 100));
    bg_issue(mk(BG_VADDI, C_IFNOT,  2, 0, 0, 0, 0, 0, 0, -100));
    bg_dbg_v = 3'd2;
    #1;
    for (int u = 0; u < NU; u++) begin
      w = 3 * (1024 + u) + 1;
      check(int'(bg_dbg_flag[u]), int'(u < 8), "bilateral flag", u);
      check(lane(u, 0), (u < 8) ? w + 100 : w - 100, "bilateral conditional path", u);
    end
    bg_issue(mk(BG_ST, C_ALWAYS, 0, 2, 0, 0, 0, 0, 0, 0));         // mem[a0] = v2 low half
    // loads 1, 2 and 3 KB above the private regions evict their lines
    for (int k = 1; k < 4; k++) bg_issue(mk(BG_LD, C_ALWAYS, 4, 0, 0, 0, 0, 0, 0, 1024 * k));
    bg_issue(mk(BG_LD, C_ALWAYS, 3, 0, 0, 0, 0, 0, 0, 0));         // v3 = mem[a0]
    bg_dbg_v = 3'd3;
    #1;
    for (int u = 0; u < NU; u++) begin
      w = 3 * (1024 + u) + 1;
      check(lane(u, 0), (u < 8) ? w + 100 : w - 100, "bilateral store and reload", u);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce_cmd[0] = '0; ce_cmd[1] = '0; ce_slice[0] = '0; ce_slice[1] = '0;
    bg_instr = '0;
    for (int c = 0; c < 10; c++) fme_in_pix[c] = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      ce_test();
      ime_test();
      fme_test();
      lifo_test();
      bg_test();
    join
    need(n_memwait, "CE memory wait");
    need(n_cross, "CE load crossing a memory line");
    need(n_contend, "two host ports contending for one slice");
    need(n_hor, "CONVOLVE_1D_HOR");
    need(n_ver, "CONVOLVE_1D_VER");
    need(n_2d, "CONVOLVE_2D");
    need(n_simd, "CE SIMD operation");
    need(n_ilv, "interleaved 2D load");
    need(n_in2d, "convolution result written to the 2D input register");
    need(n_hshift, "IME horizontal shift");
    need(n_vshift, "IME vertical shift");
    need(n_fme, "FME output");
    need(n_push, "LIFO push");
    need(n_pop, "LIFO pop");
    need(n_l0stall, "L0 miss stall");
    need(n_wb, "L0 dirty write-back");
    need(n_split, "divergent conditional execution");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
