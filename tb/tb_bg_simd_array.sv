// tb_bg_simd_array: self-checking test of the lock-step bilateral SIMD array
// running against the real L0 cache and a behavioural L1 with random grant
// delays. A reference model in the testbench executes the same instruction
// stream on 16 software units and a word-addressed memory image. The program
// first gives every unit its own address (unit index) and a private store
// region, then runs random arithmetic, compares, conditional instructions,
// data-dependent address updates and loads (which may hit shared entries,
// like neighbouring pixels updating the same hash-table entry), and stores to
// the private regions. After every instruction all vector registers and
// flags are compared through the debug port. The test also counts stalled
// memory instructions and conditionally executed instructions that split the
// units, and fails if either never happened.
module tb_bg_simd_array;
  import bg_pkg::*;
  localparam int NU = 16;
  localparam int WORDS = 2048;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready;
  bg_instr_t in_instr;
  logic [NU-1:0] mreq, mwe;
  logic [31:0] maddr [NU];
  logic [31:0] mwdata [NU];
  logic [31:0] mrdata [NU];
  logic mstall;
  logic [2:0] dbg_v = '0;
  logic [63:0] dbg_data [NU];
  logic [NU-1:0] dbg_flag;
  logic l1_req, l1_we, l1_gnt, l1_rvalid;
  logic [26:0] l1_line;
  logic [255:0] l1_wdata, l1_rdata;
  logic [31:0] hit_count, miss_count;
  int checks = 0, failures = 0, stalled_mem = 0, split = 0;

  // reference state
  logic signed [15:0] rv [NU][NVREG][LANES];
  logic [31:0] ra [NU][NAREG];
  logic rf [NU];
  logic [31:0] rmem [WORDS];

  bg_simd_array #(.NU(NU)) dut (.*);
  bg_l0_cache #(.NPORT(NU)) l0 (
    .clk, .rst_n, .req(mreq), .we(mwe), .addr(maddr), .wdata(mwdata), .rdata(mrdata),
    .stall(mstall), .l1_req, .l1_we, .l1_line, .l1_wdata, .l1_gnt, .l1_rvalid, .l1_rdata,
    .hit_count, .miss_count);
  tb_mem_model #(.NLINES(256), .RAND_WAIT(1'b1)) l1 (
    .clk, .req(l1_req), .we(l1_we), .line(l1_line), .wdata(l1_wdata),
    .be('1), .gnt(l1_gnt), .rvalid(l1_rvalid), .rdata(l1_rdata));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int widx(logic [31:0] a);
    return int'(a[12:2]);
  endfunction

  task automatic model(bg_instr_t i);
    bit act;
    int na = 0;
    for (int u = 0; u < NU; u++) begin
      act = (i.cond == C_ALWAYS) || (i.cond == C_IF && rf[u]) || (i.cond == C_IFNOT && !rf[u]);
      if (act) na++;
      if (!act) continue;
      case (i.op)
        BG_VADD:  for (int l = 0; l < LANES; l++) rv[u][i.vd][l] = rv[u][i.va][l] + rv[u][i.vb][l];
        BG_VSUB:  for (int l = 0; l < LANES; l++) rv[u][i.vd][l] = rv[u][i.va][l] - rv[u][i.vb][l];
        BG_VMUL:  for (int l = 0; l < LANES; l++)
                    rv[u][i.vd][l] = 16'((int'(rv[u][i.va][l]) * int'(rv[u][i.vb][l])) >>> i.shift);
        BG_VADDI: for (int l = 0; l < LANES; l++) rv[u][i.vd][l] = rv[u][i.va][l] + i.imm;
        BG_CMPLT: rf[u] = rv[u][i.va][0] < rv[u][i.vb][0];
        BG_AADDI: ra[u][i.ad] = ra[u][i.as] + 32'(i.imm);
        BG_AADDV: ra[u][i.ad] = ra[u][i.as] + (32'(rv[u][i.va][0]) << i.shift);
        BG_AUID:  ra[u][i.ad] = ra[u][i.as] + (32'(u) << i.shift);
        BG_LD: begin
          rv[u][i.vd][2*i.half]   = rmem[widx(ra[u][i.as] + 32'(i.imm))][15:0];
          rv[u][i.vd][2*i.half+1] = rmem[widx(ra[u][i.as] + 32'(i.imm))][31:16];
        end
        BG_ST: rmem[widx(ra[u][i.as] + 32'(i.imm))] = {rv[u][i.va][2*i.half+1], rv[u][i.va][2*i.half]};
        default: ;
      endcase
    end
    if (i.cond != C_ALWAYS && na > 0 && na < NU) split++;
  endtask

  task automatic issue(bg_instr_t i);
    bit waited = 0;
    in_instr = i;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) begin waited = 1; @(posedge clk); end
    #1;
    in_valid = 0;
    in_instr = '0;
    if (waited) stalled_mem++;
    model(i);
    @(negedge clk);
    for (int r = 0; r < NVREG; r++) begin
      dbg_v = 3'(r);
      #1;
      for (int u = 0; u < NU; u++)
        for (int l = 0; l < LANES; l++)
          check($signed(dbg_data[u][16*l +: 16]) == rv[u][r][l],
                $sformatf("op %s unit %0d v%0d lane %0d", i.op.name(), u, r, l));
    end
    for (int u = 0; u < NU; u++) check(dbg_flag[u] == rf[u], "flag");
  endtask

  function automatic bg_instr_t mk(bg_op_e op, bg_cond_e c, int vd, int va, int vb,
                                   int ad, int as_, bit half, int sh, int imm);
    bg_instr_t i;
    i.op = op; i.cond = c; i.vd = 3'(vd); i.va = 3'(va); i.vb = 3'(vb);
    i.ad = 2'(ad); i.as = 2'(as_); i.half = half; i.shift = 4'(sh); i.imm = 16'(imm);
    return i;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    bg_instr_t i;
    in_instr = '0;
    for (int u = 0; u < NU; u++) begin
      rf[u] = 0;
      for (int a = 0; a < NAREG; a++) ra[u][a] = '0;
      for (int r = 0; r < NVREG; r++) for (int l = 0; l < LANES; l++) rv[u][r][l] = '0;
    end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    for (int w = 0; w < WORDS; w++) begin
      rmem[w] = $urandom;
      l1.mem[w / 8][32 * (w % 8) +: 32] = rmem[w];
    end
    rst_n = 1;
    @(negedge clk);
    // a0: private 64-byte region per unit; a1/a2: shared table pointers
    issue(mk(BG_AUID, C_ALWAYS, 0, 0, 0, 0, 0, 0, 6, 0));
    issue(mk(BG_AUID, C_ALWAYS, 0, 0, 0, 2, 2, 0, 2, 0));
    issue(mk(BG_AADDI, C_ALWAYS, 0, 0, 0, 2, 2, 0, 0, 4096));
    for (int r = 0; r < NVREG; r++) begin
      issue(mk(BG_LD, C_ALWAYS, r, 0, 0, 0, 2, 0, 0, 4 * r));
      issue(mk(BG_LD, C_ALWAYS, r, 0, 0, 0, 2, 1, 0, 4 * r + 64));
    end
    for (int t = 0; t < 1500; t++) begin
      k = $urandom_range(0, 11);
      i = mk(BG_NOP, bg_cond_e'($urandom_range(0, 2)), $urandom_range(0, 7), $urandom_range(0, 7),
             $urandom_range(0, 7), 0, 0, 1'($urandom), $urandom_range(0, 15), $signed(16'($urandom)));
      case (k)
        0: i.op = BG_VADD;
        1: i.op = BG_VSUB;
        2: i.op = BG_VMUL;
        3: i.op = BG_VADDI;
        4, 5: i.op = BG_CMPLT;
        6: begin i.op = BG_AADDV; i.ad = 1; i.as = 2; i.shift = 4'($urandom_range(0, 3)); end
        7: begin i.op = BG_AADDI; i.ad = 2'($urandom_range(2, 3)); i.as = i.ad; end
        8, 9: begin i.op = BG_LD; i.as = 2'($urandom_range(1, 3)); end
        default: begin i.op = BG_ST; i.as = 0; i.imm = 16'(4 * $urandom_range(0, 15)); end
      endcase
      issue(i);
    end
    check(stalled_mem > 0, "memory instructions stalled on L0 misses");
    check(split > 0, "conditional instructions split the units");
    $display("stalled memory instructions %0d, split conditionals %0d, L0 hits %0d fills %0d",
             stalled_mem, split, hit_count, miss_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
