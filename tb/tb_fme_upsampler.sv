// tb_fme_upsampler: self-checking test of the half-pixel upsampler.
// Streams 12 random rows of ten pixels (with idle cycles in between) and,
// whenever six rows are stored, compares the horizontal, vertical and centre
// half-pixels with a direct two-dimensional evaluation of the H.264 six-tap
// filter on the testbench's copy of the image.
module tb_fme_upsampler;
  localparam int PW = 8;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  logic [PW-1:0] in_pix [10];
  logic out_valid;
  logic [PW-1:0] hpel [5];
  logic [PW-1:0] vpel [5];
  logic [PW-1:0] dpel [5];
  int checks = 0, failures = 0;
  int img [12][10];

  fme_upsampler dut (.*);

  always #5 clk = ~clk;

  function automatic int f6(int a, int b, int c, int d, int e, int f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction
  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  function automatic int hraw(int r, int j);
    return f6(img[r][j], img[r][j+1], img[r][j+2], img[r][j+3], img[r][j+4], img[r][j+5]);
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int top, nvalid;
    for (int i = 0; i < 10; i++) in_pix[i] = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    nvalid = 0;
    for (int r = 0; r < 12; r++) begin
      for (int c = 0; c < 10; c++) begin
        img[r][c] = (r % 3 == 0) ? ((c % 2) ? 255 : 0) : $urandom_range(0, 255);
        in_pix[c] = PW'(img[r][c]);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid != (r >= 5)) failures++;
      if (r >= 5) begin
        top = r - 5;   // oldest stored row
        nvalid++;
        for (int j = 0; j < 5; j++) begin
          check(hpel[j], clip((hraw(top + 2, j) + 16) >>> 5), "hpel");
          check(vpel[j], clip((f6(img[top][j+2], img[top+1][j+2], img[top+2][j+2],
                                  img[top+3][j+2], img[top+4][j+2], img[top+5][j+2]) + 16) >>> 5), "vpel");
          check(dpel[j], clip((f6(hraw(top, j), hraw(top+1, j), hraw(top+2, j),
                                  hraw(top+3, j), hraw(top+4, j), hraw(top+5, j)) + 512) >>> 10), "dpel");
        end
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    check(nvalid, 7, "output rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
