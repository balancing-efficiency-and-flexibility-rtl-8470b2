// tb_ce_workloads: runs on one Convolution Engine slice the kernels of the
// H.264 and SIFT mappings that the slice test does not cover, on random
// 8-bit images, each checked against arithmetic done in the testbench:
//   1. FME half-pixel row filter: six taps (1, -5, 20, 20, -5, 1) on the
//      8-tap pattern with mask 0x3F, rounding shift by 5, clamp to 0..255;
//      two steps give 16 half-pixels from one 256-bit load;
//   2. FME quarter-pixel averaging: matrix operation with the average map
//      and no reduction, 16 results per step;
//   3. SIFT Gaussian blurs of 9 and 13 taps on the 16-tap pattern with
//      masks 0x01FF and 0x1FFF, normalised by 8.
// Memory is the behavioural line memory with random grant delays.
module tb_ce_workloads;
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
  tb_mem_model #(.NLINES(64), .RAND_WAIT(1'b1)) u_mem (
    .clk, .req (mem_req), .we (mem_we), .line (mem_line), .wdata (mem_wdata),
    .be (mem_be), .gnt (mem_gnt), .rvalid (mem_rvalid), .rdata (mem_rdata)
  );

  always #5 clk = ~clk;

  function automatic int getb(int a);
    return int'(u_mem.mem[a / 32][8 * (a % 32) +: 8]);
  endfunction
  function automatic int sgetb(int a);
    return int'($signed(u_mem.mem[a / 32][8 * (a % 32) +: 8]));
  endfunction
  task automatic setb(int a, int v);
    u_mem.mem[a / 32][8 * (a % 32) +: 8] = 8'(v);
  endtask

  task automatic go(ce_instr_t i);
    cmd = i;
    cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    cmd = '0;
  endtask
  task automatic drain();
    go('0);
    go('0);
  endtask

  task automatic check(int got, int exp, string what, int idx);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s[%0d]: got %0d expected %0d", what, idx, got, exp);
    end
  endtask

  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, ntap;
    int six [6] = '{1, -5, 20, 20, -5, 1};
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64 * 32; a++) setb(a, $urandom);
    @(negedge clk);

    // ---- 1. FME half-pixel row filter ----
    for (int k = 0; k < 8; k++) setb(32'h200 + k, (k < 6) ? six[k] : 0);
    go(i_ops(MAP_MUL, RED_ADD));
    go(i_size(KS_8, 16'h003F, 5, 1));
    go(i_mem(OP_LD_COEFF, 32'h200, W64, 0, 1, 0, 0));
    go(i_mem(OP_LD_1D, 32'h000, W256, 0, 0, 0, 0));
    go(i_conv(OP_CONV_HOR, 0, 0, 0, 0, 0));
    go(i_conv(OP_CONV_HOR, 8, 0, 0, 8, 0));
    go(i_mem(OP_ST_OUT, 32'h400, W128, 0, 0, 0, 0));
    drain();
    for (int q = 0; q < 16; q++) begin
      s = 0;
      for (int k = 0; k < 6; k++) s += six[k] * getb(q + k);
      check(getb(32'h400 + q), clip((s + 16) >>> 5), "half-pixel", q);
    end

    // ---- 2. FME quarter-pixel average ----
    go(i_ops(MAP_AVG, RED_NONE));
    go(i_size(KS_4, 16'hFFFF, 0, 1));
    go(i_mem(OP_LD_COEFF, 32'h40, W128, 0, 0, 0, 0));
    go(i_mem(OP_LD_1D, 32'h60, W128, 0, 0, 0, 0));
    go(i_conv(OP_CONV_HOR, 0, 0, 0, 0, 0));
    go(i_mem(OP_ST_OUT, 32'h420, W128, 0, 0, 0, 0));
    drain();
    for (int q = 0; q < 16; q++)
      check(getb(32'h420 + q), (getb(32'h40 + q) + getb(32'h60 + q) + 1) >> 1, "quarter-pixel", q);

    // ---- 3. Gaussian blurs, 9 and 13 taps ----
    for (int g = 0; g < 2; g++) begin
      ntap = (g == 0) ? 9 : 13;
      for (int k = 0; k < 16; k++) setb(32'h240 + k, (k < ntap) ? $urandom_range(5, 35) : 0);
      go(i_ops(MAP_MUL, RED_ADD));
      go(i_size(KS_16, (g == 0) ? 16'h01FF : 16'h1FFF, 8, 1));
      go(i_mem(OP_LD_COEFF, 32'h240, W128, 0, 0, 0, 0));
      go(i_mem(OP_LD_1D, 32'h80 + 5 * g, W256, 0, 0, 0, 0));
      for (int q = 0; q < 16; q += 4) go(i_conv(OP_CONV_HOR, q, 0, 0, q, 0));
      go(i_mem(OP_ST_OUT, 32'h440 + 32 * g, W128, 0, 0, 0, 0));
      drain();
      for (int q = 0; q < 16; q++) begin
        s = 0;
        for (int k = 0; k < ntap; k++) s += getb(32'h240 + k) * getb(32'h80 + 5 * g + q + k);
        check(getb(32'h440 + 32 * g + q), clip((s + 128) >>> 8), $sformatf("gaussian %0d-tap", ntap), q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
