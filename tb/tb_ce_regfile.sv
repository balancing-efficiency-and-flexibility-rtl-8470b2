// tb_ce_regfile: self-checking test of the slice register files.
// Issues random loads (1D with and without shift, 2D with row shift and
// interleave, coefficient rows), convolution result writes (to the output or
// the 2D input register, with and without row shift) and SIMD row writes,
// one per cycle, keeps its own copy of every register and compares all
// elements after every write.
module tb_ce_regfile;
  import ce_pkg::*;

  logic clk = 0, rst_n = 1;
  logic ld1d_we = 0, ld2d_we = 0, ldcf_we = 0, ld_shift = 0, ld_ilv = 0;
  logic [5:0] ld_n = 0;
  logic [4:0] ld_col = 0;
  logic [3:0] ld_row = 0;
  elem_t ld_data [MEM_BYTES];
  logic res_we = 0, res_to_in2d = 0, res_shift = 0;
  logic [4:0] res_col = 0, res_n = 0;
  elem_t res [16];
  logic simd_we = 0;
  logic [3:0] simd_row = 0;
  elem_t simd_data [SIMD_N];
  elem_t r1 [R1_N];
  elem_t r2 [R2_ROWS][R2_COLS];
  elem_t cf [CF_ROWS][CF_COLS];
  elem_t ro [R2_ROWS][R2_COLS];
  int checks = 0, failures = 0;

  elem_t m1 [R1_N];
  elem_t m2 [R2_ROWS][R2_COLS];
  elem_t mc [CF_ROWS][CF_COLS];
  elem_t mo [R2_ROWS][R2_COLS];

  ce_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic compare();
    int bad = 0;
    for (int i = 0; i < R1_N; i++) if (r1[i] != m1[i]) bad++;
    for (int r = 0; r < R2_ROWS; r++) for (int c = 0; c < R2_COLS; c++) begin
      if (r2[r][c] != m2[r][c]) bad++;
      if (ro[r][c] != mo[r][c]) bad++;
    end
    for (int r = 0; r < CF_ROWS; r++) for (int c = 0; c < CF_COLS; c++) if (cf[r][c] != mc[r][c]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      if (failures < 4) begin
        for (int i = 0; i < R1_N; i++) if (r1[i] != m1[i]) $display("r1[%0d] %0d exp %0d", i, r1[i], m1[i]);
        for (int r = 0; r < R2_ROWS; r++) for (int c = 0; c < R2_COLS; c++) begin
          if (r2[r][c] != m2[r][c]) $display("r2[%0d][%0d] %0d exp %0d", r, c, r2[r][c], m2[r][c]);
          if (ro[r][c] != mo[r][c]) $display("ro[%0d][%0d] %0d exp %0d", r, c, ro[r][c], mo[r][c]);
        end
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kind, n, col;
    bit reported = 0;
    elem_t t1 [R1_N];
    for (int i = 0; i < R1_N; i++) m1[i] = '0;
    for (int r = 0; r < R2_ROWS; r++) for (int c = 0; c < R2_COLS; c++) begin m2[r][c] = '0; mo[r][c] = '0; end
    for (int r = 0; r < CF_ROWS; r++) for (int c = 0; c < CF_COLS; c++) mc[r][c] = '0;
    for (int j = 0; j < MEM_BYTES; j++) ld_data[j] = '0;
    for (int j = 0; j < 16; j++) begin res[j] = '0; simd_data[j] = '0; end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int it = 0; it < 600; it++) begin
      kind = $urandom_range(0, 4);
      n = 4 << $urandom_range(0, 3);
      col = $urandom_range(0, 17);
      ld_n = 6'(n); ld_col = 5'(col); ld_row = 4'($urandom); ld_shift = $urandom; ld_ilv = $urandom;
      for (int j = 0; j < MEM_BYTES; j++) ld_data[j] = elem_t'($urandom);
      res_to_in2d = $urandom; res_shift = $urandom; res_col = 5'(col);
      res_n = 5'($urandom_range(1, 16));
      for (int j = 0; j < 16; j++) begin res[j] = elem_t'($urandom); simd_data[j] = elem_t'($urandom); end
      simd_row = 4'($urandom);
      ld1d_we = (kind == 0); ld2d_we = (kind == 1); ldcf_we = (kind == 2);
      res_we = (kind == 3); simd_we = (kind == 4);
      // reference update
      case (kind)
        0: begin
          t1 = m1;
          if (ld_shift) begin
            for (int i = 0; i < R1_N; i++)
              m1[i] = (i + n < R1_N) ? t1[i + n] : ld_data[i + n - R1_N];
          end else
            for (int j = 0; j < n; j++) m1[j] = ld_data[j];
        end
        1: begin
          if (ld_shift) begin
            for (int r = R2_ROWS - 1; r >= (ld_ilv ? 2 : 1); r--) m2[r] = m2[r - (ld_ilv ? 2 : 1)];
          end
          for (int j = 0; j < n; j++)
            if (ld_ilv) begin
              if (col + j / 2 < R2_COLS) m2[j % 2][col + j / 2] = ld_data[j];
            end else if (col + j < R2_COLS) m2[0][col + j] = ld_data[j];
        end
        2: for (int j = 0; j < n; j++) if (col + j < CF_COLS) mc[ld_row][col + j] = ld_data[j];
        3: begin
          if (res_to_in2d) begin
            if (res_shift) for (int r = R2_ROWS - 1; r >= 1; r--) m2[r] = m2[r - 1];
            for (int j = 0; j < res_n; j++) if (col + j < R2_COLS) m2[0][col + j] = res[j];
          end else begin
            if (res_shift) for (int r = R2_ROWS - 1; r >= 1; r--) mo[r] = mo[r - 1];
            for (int j = 0; j < res_n; j++) if (col + j < R2_COLS) mo[0][col + j] = res[j];
          end
        end
        default: for (int i = 0; i < SIMD_N; i++) mo[simd_row][i] = simd_data[i];
      endcase
      @(negedge clk);
      ld1d_we = 0; ld2d_we = 0; ldcf_we = 0; res_we = 0; simd_we = 0;
      compare();
      if (failures == 1 && !reported) begin
        $display("FAIL first mismatch at op %0d kind %0d n=%0d col=%0d shift=%0d ilv=%0d", it, kind, n, col, ld_shift, ld_ilv);
        reported = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
