// fme_upsampler: H.264 fractional-motion-estimation half-pixel upsampler for
// a 4x4 block, built from shift registers wired straight into six-input
// filters.
//
// Each input beat is one image row of ten integer pixels p[0..9] (the four
// block columns plus three on the left and three on the right). Five row
// filters (RFIR) compute the horizontal half-pixel between p[j+2] and p[j+3]
// from p[j..j+5], j = 0..4. Ten column shift registers, six rows deep, keep
// the last six rows of the five integer pixels p[j+2] and of the five
// unrounded horizontal results. Column filters (CFIR) read all six entries
// of a column at once and produce the vertical half-pixel between the third
// and fourth stored rows. Outputs, valid once six rows are stored
// (`out_valid`), describe that position of the window, for j = 0..4:
//   hpel[j]  horizontal half-pixel of row 3 (third-newest),
//   vpel[j]  vertical half-pixel below integer pixel p[j+2] of row 3,
//   dpel[j]  centre half-pixel, filtered from the unrounded hpel column.
// The filter is the H.264 six-tap (1, -5, 20, 20, -5, 1) with its rounding:
// (x + 16) >> 5 for one pass, (x + 512) >> 10 for the two-pass centre value,
// clipped to 0..255; these taps are the video standard's, not stated with
// the design. Ten input pixels per row, six-entry shift registers and the
// RFIR/CFIR split follow the design. Outputs follow each accepted row by one
// clock edge (they are combinational from the registers).
module fme_upsampler #(
  parameter int unsigned PW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [PW-1:0] in_pix [10],
  output logic          out_valid,
  output logic [PW-1:0] hpel   [5],
  output logic [PW-1:0] vpel   [5],
  output logic [PW-1:0] dpel   [5]
);

  localparam int unsigned HW = PW + 8;   // unrounded row-filter result, signed

  logic signed [HW-1:0] hraw   [5];
  logic        [PW-1:0] icol   [5][6];   // [column][row], row 5 newest
  logic signed [HW-1:0] hcol   [5][6];
  logic [2:0]           nrows;

  function automatic int fir6(int a, int b, int c, int d, int e, int f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction

  function automatic logic [PW-1:0] clip(int v);
    if (v < 0) return '0;
    if (v > 2 ** PW - 1) return PW'(2 ** PW - 1);
    return PW'(v);
  endfunction

  // RFIR: horizontal filters on the incoming row
  always_comb begin
    for (int j = 0; j < 5; j++)
      hraw[j] = HW'(fir6(int'(in_pix[j]), int'(in_pix[j+1]), int'(in_pix[j+2]),
                         int'(in_pix[j+3]), int'(in_pix[j+4]), int'(in_pix[j+5])));
  end

  // column shift registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nrows <= '0;
      for (int j = 0; j < 5; j++)
        for (int r = 0; r < 6; r++) begin
          icol[j][r] <= '0;
          hcol[j][r] <= '0;
        end
    end else if (in_valid) begin
      if (nrows < 3'd6) nrows <= nrows + 3'd1;
      for (int j = 0; j < 5; j++) begin
        for (int r = 0; r < 5; r++) begin
          icol[j][r] <= icol[j][r+1];
          hcol[j][r] <= hcol[j][r+1];
        end
        icol[j][5] <= in_pix[j+2];
        hcol[j][5] <= hraw[j];
      end
    end
  end

  // CFIR: vertical filters over the six stored rows
  always_comb begin
    out_valid = (nrows == 3'd6);
    for (int j = 0; j < 5; j++) begin
      hpel[j] = clip((int'(hcol[j][2]) + 16) >>> 5);
      vpel[j] = clip((fir6(int'(icol[j][0]), int'(icol[j][1]), int'(icol[j][2]),
                           int'(icol[j][3]), int'(icol[j][4]), int'(icol[j][5])) + 16) >>> 5);
      dpel[j] = clip((fir6(int'(hcol[j][0]), int'(hcol[j][1]), int'(hcol[j][2]),
                           int'(hcol[j][3]), int'(hcol[j][4]), int'(hcol[j][5])) + 512) >>> 10);
    end
  end

endmodule
