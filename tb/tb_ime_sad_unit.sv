// tb_ime_sad_unit: self-checking test of the IME SAD datapath.
// Loads a random 16x16 current block and a 16x32 reference strip, then walks
// a raster of search positions: 16 horizontal shifts per row of positions,
// and vertical steps by loading a new top row (both halves) with row shift.
// At every position it checks the registered total SAD and all sixteen 4x4
// sub-block SADs, one cycle after sad_en, against sums computed from the
// testbench's copy of the reference window.
module tb_ime_sad_unit;
  localparam int N = 16, PW = 8;
  logic clk = 0, rst_n = 1;
  logic ref_ld = 0, ref_half = 0, ref_vshift = 0, ref_hshift = 0, cur_ld = 0, sad_en = 0;
  logic [N*PW-1:0] ref_data = '0, cur_data = '0;
  logic [3:0] cur_row = 0;
  logic sad_valid;
  logic [PW+7:0] sad_total;
  logic [PW+3:0] sad4 [16];
  int checks = 0, failures = 0;

  int win [N][2*N];   // model of the reference registers
  int cb  [N][N];

  ime_sad_unit dut (.*);

  always #5 clk = ~clk;

  task automatic load_ref(int half, bit vs, int pix []);
    ref_ld = 1; ref_half = half[0]; ref_vshift = vs;
    for (int c = 0; c < N; c++) ref_data[PW*c +: PW] = PW'(pix[c]);
    @(negedge clk);
    ref_ld = 0; ref_vshift = 0;
    if (vs) for (int r = N - 1; r >= 1; r--) win[r] = win[r-1];
    for (int c = 0; c < N; c++) win[0][half * N + c] = pix[c];
  endtask

  task automatic check_sad();
    int tot, s;
    sad_en = 1;
    @(negedge clk);
    sad_en = 0;
    checks++;
    if (!sad_valid) failures++;
    tot = 0;
    for (int b = 0; b < 16; b++) begin
      s = 0;
      for (int r = 4 * (b / 4); r < 4 * (b / 4) + 4; r++)
        for (int c = 4 * (b % 4); c < 4 * (b % 4) + 4; c++)
          s += (win[r][c] > cb[r][c]) ? win[r][c] - cb[r][c] : cb[r][c] - win[r][c];
      tot += s;
      checks++;
      if (int'(sad4[b]) != s) begin
        failures++;
        if (failures < 10) $display("FAIL sad4[%0d] %0d expected %0d", b, sad4[b], s);
      end
    end
    checks++;
    if (int'(sad_total) != tot) begin
      failures++;
      if (failures < 10) $display("FAIL total %0d expected %0d", sad_total, tot);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix [] = new [N];
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < N; r++) for (int c = 0; c < 2 * N; c++) win[r][c] = 0;
    for (int r = 0; r < N; r++) begin
      cur_ld = 1; cur_row = 4'(r);
      for (int c = 0; c < N; c++) begin cb[r][c] = $urandom_range(0, 255); cur_data[PW*c +: PW] = PW'(cb[r][c]); end
      @(negedge clk);
    end
    cur_ld = 0;
    for (int r = 0; r < N; r++)
      for (int h = 0; h < 2; h++) begin
        foreach (pix[c]) pix[c] = $urandom_range(0, 255);
        load_ref(h, h == 0, pix);
      end
    check_sad();
    for (int v = 0; v < 3; v++) begin
      for (int s = 0; s < 16; s++) begin
        ref_hshift = 1;
        @(negedge clk);
        ref_hshift = 0;
        for (int r = 0; r < N; r++) for (int c = 0; c < 2 * N; c++) win[r][c] = (c + 1 < 2 * N) ? win[r][c+1] : 0;
        check_sad();
      end
      for (int h = 0; h < 2; h++) begin
        foreach (pix[c]) pix[c] = $urandom_range(0, 255);
        load_ref(h, h == 0, pix);
      end
      check_sad();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
