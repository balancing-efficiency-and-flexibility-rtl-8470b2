// ime_sad_unit: H.264 integer-motion-estimation datapath: a 16x16 array of
// absolute-difference units fed by shiftable reference-pixel registers and
// current-macroblock registers, computing one 256-pixel SAD per cycle.
//
// Reference storage: 16 rows, each made of two 16-pixel registers. The one
// next to the SAD units holds the pixels being compared (pixels 0..15 of the
// row); the other is a staging register (pixels 16..31). Both take 128-bit
// loads. A horizontal shift moves every row by one pixel toward the SAD
// units (pixel 16 enters the compare register, the staging register is
// refilled by loads), so the next search position reuses 15 of 16 columns.
// A load with `ref_vshift` first moves every row down by one, putting the
// new row on top, so a vertical step costs one row load per register.
// The current macroblock sits in 16 rows of 16 pixels written through a
// 128-bit port.
//
// One operation per cycle: a reference load (with optional row shift) takes
// precedence over a horizontal shift. With `sad_en`, the SAD of the present
// compare window is registered: one cycle later `sad_valid` rises with the
// total 16x16 SAD and the sixteen 4x4 sub-block SADs (index 4*block_row +
// block_col), from which the larger H.264 partitions are sums. Sizes (16
// rows, two 16-pixel registers per row, 128-bit loads, 16x16 SAD array)
// follow the design; the shift direction naming, the zero fill and the
// operation priority are this implementation's choices.
module ime_sad_unit #(
  parameter int unsigned N  = 16,   // block size and pixels per register
  parameter int unsigned PW = 8     // pixel width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ref_ld,
  input  logic                 ref_half,    // 0: compare register, 1: staging register
  input  logic                 ref_vshift,
  input  logic [N*PW-1:0]      ref_data,
  input  logic                 ref_hshift,
  input  logic                 cur_ld,
  input  logic [$clog2(N)-1:0] cur_row,
  input  logic [N*PW-1:0]      cur_data,
  input  logic                 sad_en,
  output logic                 sad_valid,
  output logic [PW+$clog2(N*N)-1:0] sad_total,
  output logic [PW+3:0]        sad4 [(N/4)*(N/4)]
);

  localparam int unsigned NB = N / 4;

  logic [PW-1:0] refp [N][2*N];
  logic [PW-1:0] cur  [N][N];
  logic [PW+3:0] s4   [NB*NB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) begin
        for (int c = 0; c < 2 * N; c++) refp[r][c] <= '0;
        for (int c = 0; c < N; c++) cur[r][c] <= '0;
      end
    end else begin
      if (ref_ld) begin
        if (ref_vshift)
          for (int r = N - 1; r >= 1; r--) refp[r] <= refp[r-1];
        for (int c = 0; c < N; c++) refp[0][int'(ref_half) * N + c] <= ref_data[PW*c +: PW];
      end else if (ref_hshift) begin
        for (int r = 0; r < N; r++)
          for (int c = 0; c < 2 * N; c++) refp[r][c] <= (c + 1 < 2 * N) ? refp[r][c+1] : '0;
      end
      if (cur_ld)
        for (int c = 0; c < N; c++) cur[cur_row][c] <= cur_data[PW*c +: PW];
    end
  end

  // 256 absolute differences reduced in place to 4x4 sub-block sums
  always_comb begin
    for (int b = 0; b < NB * NB; b++) s4[b] = '0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        s4[(r / 4) * NB + c / 4] += (refp[r][c] > cur[r][c]) ?
                                    (PW+4)'(refp[r][c] - cur[r][c]) : (PW+4)'(cur[r][c] - refp[r][c]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad_valid <= 1'b0;
      sad_total <= '0;
      for (int b = 0; b < NB * NB; b++) sad4[b] <= '0;
    end else begin
      sad_valid <= sad_en;
      if (sad_en) begin
        logic [PW+$clog2(N*N)-1:0] t;
        t = '0;
        for (int b = 0; b < NB * NB; b++) begin
          sad4[b] <= s4[b];
          t += (PW+$clog2(N*N))'(s4[b]);
        end
        sad_total <= t;
      end
    end
  end

endmodule
