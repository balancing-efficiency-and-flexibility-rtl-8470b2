// tb_bg_l0_cache: self-checking test of the multi-ported L0 cache.
// A reference word array mirrors an 8 KB backing store (behavioural L1 with
// random grant delays). Each step, the 16 ports present random reads and
// writes to distinct words, drawn either near a moving base address (the
// local access pattern of neighbouring pixels) or anywhere (conflicts and
// dirty evictions). The testbench holds the requests while `stall` is high
// and, once it drops, checks every read against the reference. It also
// forces two ports onto the same cache index with different tags, and checks
// that stalls, line fills and dirty write-backs occurred and that the local
// pattern reached a high hit rate.
module tb_bg_l0_cache;
  localparam int NPORT = 16;
  localparam int WORDS = 2048;   // 8 KB backing store
  logic clk = 0, rst_n = 1;
  logic [NPORT-1:0] req = '0, we = '0;
  logic [31:0] addr [NPORT];
  logic [31:0] wdata [NPORT];
  logic [31:0] rdata [NPORT];
  logic stall;
  logic l1_req, l1_we, l1_gnt, l1_rvalid;
  logic [26:0] l1_line;
  logic [255:0] l1_wdata, l1_rdata;
  logic [31:0] hit_count, miss_count;
  int checks = 0, failures = 0;
  int stall_cycles = 0, writebacks = 0;
  logic [31:0] ref_mem [WORDS];

  bg_l0_cache dut (.*);
  tb_mem_model #(.NLINES(256), .RAND_WAIT(1'b1)) l1 (
    .clk, .req(l1_req), .we(l1_we), .line(l1_line), .wdata(l1_wdata),
    .be('1), .gnt(l1_gnt), .rvalid(l1_rvalid), .rdata(l1_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (stall) stall_cycles++;
    if (l1_req && l1_we && l1_gnt) writebacks++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // present one access group, hold it through any stall, check reads
  task automatic access(int words [NPORT], bit [NPORT-1:0] r, bit [NPORT-1:0] w);
    for (int p = 0; p < NPORT; p++) begin
      addr[p]  = 32'(words[p] * 4);
      wdata[p] = $urandom;
    end
    req = r;
    we  = w & r;
    #1;
    while (stall) begin @(negedge clk); #1; end
    for (int p = 0; p < NPORT; p++)
      if (req[p] && !we[p])
        check(rdata[p] == ref_mem[words[p]], $sformatf("read port %0d word %0d", p, words[p]));
    for (int p = 0; p < NPORT; p++)
      if (req[p] && we[p]) ref_mem[words[p]] = wdata[p];
    @(negedge clk);
    req = '0;
    we  = '0;
  endtask

  function automatic bit used(int words [NPORT], int n, int v);
    for (int i = 0; i < n; i++) if (words[i] == v) return 1;
    return 0;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words [NPORT];
    int base, h0, m0, v;
    for (int i = 0; i < WORDS; i++) ref_mem[i] = '0;
    for (int p = 0; p < NPORT; p++) begin addr[p] = '0; wdata[p] = '0; end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // random accesses over the whole store
    for (int t = 0; t < 300; t++) begin
      for (int p = 0; p < NPORT; p++) begin
        do v = $urandom_range(0, WORDS - 1); while (used(words, p, v));
        words[p] = v;
      end
      access(words, NPORT'($urandom), NPORT'($urandom));
    end
    check(writebacks > 0, "dirty write-backs happened");

    // two ports on the same index, different tags (1 KB apart)
    for (int t = 0; t < 20; t++) begin
      for (int p = 0; p < NPORT; p++) words[p] = 8 * p + t % 8;
      words[1] = words[0] + 256;
      access(words, 16'h0003, NPORT'($urandom_range(0, 3)));
    end

    // local pattern: a base sweeping slowly, ports within 64 words of it
    h0 = int'(hit_count);
    m0 = int'(miss_count);
    base = 0;
    for (int t = 0; t < 400; t++) begin
      for (int p = 0; p < NPORT; p++) begin
        do v = base + $urandom_range(0, 63); while (used(words, p, v));
        words[p] = v % WORDS;
      end
      access(words, '1, NPORT'($urandom) & NPORT'($urandom));
      if (t % 4 == 3) base += 8;
    end
    // each fill brings 8 words; 16 accesses per step and a slow sweep
    // should keep more than 90% of port accesses hitting
    check((int'(hit_count) - h0) * 10 > 9 * ((int'(hit_count) - h0) + (int'(miss_count) - m0)),
          $sformatf("local hit rate: %0d hits %0d fills", int'(hit_count) - h0, int'(miss_count) - m0));
    check(stall_cycles > 0, "stalls happened");
    $display("stall cycles %0d, write-backs %0d, hits %0d, fills %0d",
             stall_cycles, writebacks, hit_count, miss_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
