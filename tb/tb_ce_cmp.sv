// tb_ce_cmp: test of the four-slice CE multiprocessor fabric.
// Two host ports run programs concurrently: port 0 runs a 4-tap filter on
// slice 0, port 1 runs a 4x4 SAD on slice 3, and the results in the two
// slices' memories are checked against image arithmetic. Then both ports
// address slice 1 at once for 40 commands each; the test checks that the
// mux grants them alternately (round robin) and that every command is
// accepted exactly once.
module tb_ce_cmp;
  import ce_pkg::*;
  `include "ce_tb_util.svh"

  localparam int NS = 4;
  logic clk = 0, rst_n = 1;
  logic [1:0] p_valid = '0;
  logic [1:0] p_slice [2];
  ce_instr_t  p_cmd   [2];
  logic [1:0] p_ready;
  logic [NS-1:0] mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [26:0]  mem_line  [NS];
  logic [255:0] mem_wdata [NS];
  logic [31:0]  mem_be    [NS];
  logic [255:0] mem_rdata [NS];
  int checks = 0, failures = 0;

  ce_cmp dut (.*);

  for (genvar s = 0; s < NS; s++) begin : g_mem
    tb_mem_model #(.NLINES(64), .RAND_WAIT(1'b1)) u_mem (
      .clk, .req (mem_req[s]), .we (mem_we[s]), .line (mem_line[s]), .wdata (mem_wdata[s]),
      .be (mem_be[s]), .gnt (mem_gnt[s]), .rvalid (mem_rvalid[s]), .rdata (mem_rdata[s])
    );
  end

  always #5 clk = ~clk;

  function automatic int getb0(int a); return int'(g_mem[0].u_mem.mem[a / 32][8 * (a % 32) +: 8]); endfunction
  function automatic int getb3(int a); return int'(g_mem[3].u_mem.mem[a / 32][8 * (a % 32) +: 8]); endfunction

  task automatic issue(int p, int s, ce_instr_t i);
    p_cmd[p] = i;
    p_slice[p] = 2'(s);
    p_valid[p] = 1;
    #1;
    while (!p_ready[p]) begin @(negedge clk); #1; end
    @(negedge clk);
    p_valid[p] = 0;
  endtask

  task automatic check(int got, int exp, string what, int idx);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s[%0d]: got %0d expected %0d", what, idx, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int order [$];

  initial begin
    int s;
    p_cmd[0] = '0; p_cmd[1] = '0; p_slice[0] = 0; p_slice[1] = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      g_mem[0].u_mem.mem[a] = {$urandom, $urandom, $urandom, $urandom,
                               $urandom, $urandom, $urandom, $urandom} & {32{8'h0F}};
      g_mem[3].u_mem.mem[a] = {$urandom, $urandom, $urandom, $urandom,
                               $urandom, $urandom, $urandom, $urandom} & {32{8'h0F}};
    end
    @(negedge clk);
    fork
      begin   // port 0: 4-tap filter on slice 0, coefficients 1 2 3 4 at 0x40
        g_mem[0].u_mem.mem[2][31:0] = 32'h04030201;
        issue(0, 0, i_ops(MAP_MUL, RED_ADD));
        issue(0, 0, i_size(KS_4, 16'hFFFF, 0, 1));
        issue(0, 0, i_mem(OP_LD_COEFF, 32'h40, W32, 0, 1, 0, 0));
        issue(0, 0, i_mem(OP_LD_1D, 32'h0, W256, 0, 0, 0, 0));
        issue(0, 0, i_conv(OP_CONV_HOR, 0, 0, 0, 0, 0));
        issue(0, 0, i_mem(OP_ST_OUT, 32'h100, W128, 0, 0, 0, 0));
        issue(0, 0, '0);
      end
      begin   // port 1: 4x4 SAD on slice 3
        issue(1, 3, i_ops(MAP_ABSDIFF, RED_ADD));
        issue(1, 3, i_size(KS_4, 16'hFFFF, 0, 0));
        for (int r = 0; r < 4; r++) issue(1, 3, i_mem(OP_LD_COEFF, 32'h200 + 32 * r, W32, 0, 0, r, 0));
        for (int r = 3; r >= 0; r--) issue(1, 3, i_mem(OP_LD_2D, 32'h300 + 32 * r, W256, 1, 0, 0, 0));
        issue(1, 3, i_conv(OP_CONV_2D, 0, 0, 0, 0, 0));
        issue(1, 3, i_mem(OP_ST_OUT, 32'h500, W32, 0, 0, 0, 0));
        issue(1, 3, '0);
      end
    join
    for (int q = 0; q < 16; q++) begin
      s = 0;
      for (int k = 0; k < 4; k++) s += (k + 1) * getb0(q + k);
      check(getb0(32'h100 + q), (s > 255) ? 255 : s, "slice0 filter", q);
    end
    for (int q = 0; q < 4; q++) begin
      s = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        int x, y;
        x = getb3(32'h300 + 32 * r + q + c);
        y = getb3(32'h200 + 32 * r + c);
        s += (x > y) ? x - y : y - x;
      end
      check(getb3(32'h500 + q), s, "slice3 sad", q);
    end
    // contention on slice 1
    p_slice[0] = 1; p_slice[1] = 1;
    p_cmd[0] = '0; p_cmd[1] = '0;
    p_valid = 2'b11;
    for (int n = 0; n < 80; n++) begin
      #1;
      check($countones(p_ready), 1, "one grant per cycle", n);
      if (p_ready[0]) order.push_back(0);
      if (p_ready[1]) order.push_back(1);
      @(negedge clk);
    end
    p_valid = '0;
    for (int n = 1; n < order.size(); n++) check(order[n], 1 - order[n-1], "alternating grant", n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
