// tb_cabac_lifo: self-checking test of the coefficient LIFO.
// A queue models the stack. Random pushes (about a third of them zero),
// pops and push-with-pop replacements are applied, never overflowing or
// underflowing; after every cycle the top value, zero flag, empty/full,
// count and non-zero count are compared with the model. A final phase
// pushes a full 4x4 block in scan order and checks it pops out reversed.
module tb_cabac_lifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 1;
  logic push = 0, pop = 0;
  logic signed [15:0] din = '0;
  logic signed [15:0] top;
  logic top_zero, empty, full;
  logic [4:0] count, nz_count;
  int checks = 0, failures = 0;
  int q [$];

  cabac_lifo dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic compare();
    int nz = 0;
    foreach (q[i]) if (q[i] != 0) nz++;
    check(int'(count) == q.size(), "count");
    check(int'(nz_count) == nz, "nz_count");
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == DEPTH), "full");
    if (q.size() > 0) begin
      check(int'(top) == q[$], $sformatf("top %0d expected %0d", top, q[$]));
      check(top_zero == (q[$] == 0), "top_zero");
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, k;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int t = 0; t < 2000; t++) begin
      v = ($urandom_range(0, 2) == 0) ? 0 : $signed(16'($urandom));
      k = $urandom_range(0, 3);
      push = (k == 0 || k == 3) && (q.size() < DEPTH || k == 3);
      pop  = (k == 1 || k == 3) && q.size() > 0;
      if (k == 3 && q.size() == 0) push = 1;
      din  = 16'(v);
      @(negedge clk);
      if (push && pop) q[$] = v;
      else if (push) q.push_back(v);
      else if (pop) void'(q.pop_back());
      push = 0;
      pop  = 0;
      compare();
    end
    // block in scan order, popped in reverse
    while (q.size() > 0) begin
      pop = 1;
      @(negedge clk);
      void'(q.pop_back());
      pop = 0;
      compare();
    end
    for (int i = 0; i < 16; i++) begin
      push = 1;
      din = (i % 3 == 0) ? 16'(i * 7 - 40) : '0;
      @(negedge clk);
      q.push_back(int'(din));
    end
    push = 0;
    compare();
    for (int i = 15; i >= 0; i--) begin
      check(int'(top) == ((i % 3 == 0) ? i * 7 - 40 : 0), "reverse order");
      pop = 1;
      @(negedge clk);
      void'(q.pop_back());
      pop = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
