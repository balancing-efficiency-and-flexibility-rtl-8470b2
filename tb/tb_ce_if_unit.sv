// tb_ce_if_unit: self-checking test of the interface units.
// Fills the registers with random data, then for each flow (horizontal,
// column, 2D), stencil size, offset and the matrix mode it rebuilds the
// expected lane contents stencil by stencil (location, then tap) and
// compares operand A, operand B, the lane enables, the reduction tap and the
// output count.
module tb_ce_if_unit;
  import ce_pkg::*;

  elem_t r1 [R1_N];
  elem_t r2 [R2_ROWS][R2_COLS];
  elem_t cf [CF_ROWS][CF_COLS];
  flow_e flow;
  ksize_e ksize;
  logic matrix;
  logic [5:0] in_off;
  logic [3:0] row_off;
  logic [1:0] band;
  logic [3:0] crow;
  logic [15:0] mask;
  elem_t a [NLANE];
  elem_t b [NLANE];
  logic [NLANE-1:0] lane_en;
  logic [2:0] glog;
  logic [4:0] n_out;
  int checks = 0, failures = 0;

  elem_t ea [NLANE];
  elem_t eb [NLANE];
  logic [NLANE-1:0] een;

  ce_if_unit dut (.*);

  function automatic elem_t g1(int i);
    return (i < R1_N) ? r1[i] : '0;
  endfunction
  function automatic elem_t g2(int r, int c);
    return (r < R2_ROWS && c < R2_COLS) ? r2[r][c] : '0;
  endfunction

  task automatic expect_lanes();
    int K, l;
    K = (ksize == KS_4) ? 4 : (ksize == KS_8) ? 8 : 16;
    for (int i = 0; i < NLANE; i++) begin ea[i] = '0; eb[i] = '0; een[i] = 0; end
    if (matrix) begin
      for (int i = 0; i < 16; i++) begin
        ea[i] = (flow == FLOW_1D_HOR) ? g1(in_off + i) : g2(row_off, in_off + i);
        eb[i] = cf[crow][i];
        een[i] = mask[i];
      end
    end else if (flow != FLOW_2D) begin
      l = 0;
      for (int loc = 0; loc < NLANE / K; loc++)
        for (int t = 0; t < K; t++) begin
          ea[l] = (flow == FLOW_1D_HOR) ? g1(in_off + loc + t) : g2(row_off + t, in_off + loc);
          eb[l] = cf[crow][t];
          een[l] = mask[t];
          l++;
        end
    end else if (K == 4) begin
      l = 0;
      for (int loc = 0; loc < 4; loc++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            ea[l] = g2(row_off + r, in_off + loc + c);
            eb[l] = cf[r][c];
            een[l] = mask[r * 4 + c];
            l++;
          end
    end else if (K == 8) begin
      l = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          ea[l] = g2(row_off + r, in_off + c);
          eb[l] = cf[r][c];
          een[l] = mask[(r * 8 + c) % 16];
          l++;
        end
    end else begin
      l = 0;
      for (int r = 4 * band; r < 4 * band + 4; r++)
        for (int c = 0; c < 16; c++) begin
          ea[l] = g2(row_off + r, in_off + c);
          eb[l] = cf[r][c];
          een[l] = mask[c];
          l++;
        end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_glog, exp_n;
    for (int i = 0; i < R1_N; i++) r1[i] = elem_t'($urandom);
    for (int r = 0; r < R2_ROWS; r++) for (int c = 0; c < R2_COLS; c++) r2[r][c] = elem_t'($urandom);
    for (int r = 0; r < CF_ROWS; r++) for (int c = 0; c < CF_COLS; c++) cf[r][c] = elem_t'($urandom);
    for (int it = 0; it < 400; it++) begin
      flow = flow_e'($urandom_range(0, 2));
      ksize = ksize_e'($urandom_range(0, 2));
      matrix = ($urandom_range(0, 4) == 0);
      in_off = 6'($urandom_range(0, 24));
      row_off = 4'($urandom_range(0, 12));
      band = 2'($urandom);
      crow = 4'($urandom);
      mask = (it % 2 == 0) ? 16'hFFFF : 16'($urandom);
      #1;
      expect_lanes();
      if (matrix) exp_glog = 0;
      else if (flow == FLOW_2D) exp_glog = (ksize == KS_4) ? 4 : 6;
      else exp_glog = (ksize == KS_4) ? 2 : (ksize == KS_8) ? 3 : 4;
      exp_n = matrix ? 16 : (64 >> exp_glog);
      checks++;
      if (int'(glog) != exp_glog || int'(n_out) != exp_n) begin
        failures++;
        $display("FAIL glog/n_out flow=%0d k=%0d m=%0d: %0d/%0d", flow, ksize, matrix, glog, n_out);
      end
      for (int l = 0; l < NLANE; l++) begin
        checks++;
        if (a[l] != ea[l] || b[l] != eb[l] || lane_en[l] != een[l]) begin
          failures++;
          if (failures < 10) $display("FAIL flow=%0d k=%0d m=%0d off=%0d/%0d lane %0d: a=%0d/%0d b=%0d/%0d en=%0d/%0d",
                                      flow, ksize, matrix, in_off, row_off, l, a[l], ea[l], b[l], eb[l], lane_en[l], een[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
