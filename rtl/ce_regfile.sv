// ce_regfile: the register files of one Convolution Engine slice.
//
//   r1  1D shift register, R1_N (40) entries. Loads either overwrite entries
//       0..n-1 or shift the register left by n and put the n new pixels at
//       the high end ("shift in pixels" as a stencil moves along a row).
//   r2  2D input shift register, 16 rows x 18 columns. A load writes the top
//       row (row 0), starting at column `ld_col`, optionally after shifting
//       every row down by one, so a 2D stencil moves down the image one row
//       per load. An interleaved load shifts by two rows and splits the data:
//       even elements to row 0, odd elements to row 1 (e.g. colour channels
//       of a Bayer row). Convolution results may also be written to row 0.
//   cf  2D coefficient register, 16 x 16. A load writes row `ld_row`
//       starting at column `ld_col`.
//   ro  2D output register, 16 x 18. Convolution results are written to row
//       0 starting at column `res_col`, optionally shifting the rows down
//       first; the SIMD unit reads and writes whole rows (columns 0..15) as
//       vector registers.
// All reads are parallel, every element is visible at the outputs. Writes
// happen at the rising clock edge; one write source is active per cycle
// (the controller issues one instruction at a time). Sizes follow the
// engine's main configuration; the write-position operands, the
// interleave row assignment and reset to zero are this design's choices.
module ce_regfile
  import ce_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // loads
  input  logic        ld1d_we,
  input  logic        ld2d_we,
  input  logic        ldcf_we,
  input  logic        ld_shift,
  input  logic        ld_ilv,
  input  logic [5:0]  ld_n,
  input  logic [4:0]  ld_col,
  input  logic [3:0]  ld_row,
  input  elem_t       ld_data [MEM_BYTES],
  // convolution results
  input  logic        res_we,
  input  logic        res_to_in2d,
  input  logic        res_shift,
  input  logic [4:0]  res_col,
  input  logic [4:0]  res_n,
  input  elem_t       res     [16],
  // SIMD write-back
  input  logic        simd_we,
  input  logic [3:0]  simd_row,
  input  elem_t       simd_data [SIMD_N],
  // parallel read
  output elem_t       r1 [R1_N],
  output elem_t       r2 [R2_ROWS][R2_COLS],
  output elem_t       cf [CF_ROWS][CF_COLS],
  output elem_t       ro [R2_ROWS][R2_COLS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < R1_N; i++) r1[i] <= '0;
      for (int r = 0; r < R2_ROWS; r++)
        for (int c = 0; c < R2_COLS; c++) begin
          r2[r][c] <= '0;
          ro[r][c] <= '0;
        end
      for (int r = 0; r < CF_ROWS; r++)
        for (int c = 0; c < CF_COLS; c++) cf[r][c] <= '0;
    end else begin
      // 1D shift register
      if (ld1d_we) begin
        if (ld_shift) begin
          for (int i = 0; i < R1_N; i++) begin
            if (i + int'(ld_n) < R1_N) r1[i] <= r1[i + int'(ld_n)];
            else if (i + int'(ld_n) - R1_N < MEM_BYTES) r1[i] <= ld_data[i + int'(ld_n) - R1_N];
          end
        end else begin
          for (int j = 0; j < MEM_BYTES; j++)
            if (j < int'(ld_n) && j < R1_N) r1[j] <= ld_data[j];
        end
      end
      // 2D input shift register: loads
      if (ld2d_we) begin
        if (ld_shift) begin
          for (int r = R2_ROWS - 1; r >= 0; r--)
            if (ld_ilv) begin
              if (r >= 2) r2[r] <= r2[r-2];
            end else begin
              if (r >= 1) r2[r] <= r2[r-1];
            end
        end
        for (int j = 0; j < MEM_BYTES; j++) begin
          if (ld_ilv) begin
            if (j < int'(ld_n) && int'(ld_col) + j / 2 < R2_COLS) begin
              if (j % 2 == 0) r2[0][int'(ld_col) + j / 2] <= ld_data[j];
              else            r2[1][int'(ld_col) + j / 2] <= ld_data[j];
            end
          end else if (j < int'(ld_n) && int'(ld_col) + j < R2_COLS) begin
            r2[0][int'(ld_col) + j] <= ld_data[j];
          end
        end
      end
      // coefficient register
      if (ldcf_we) begin
        for (int j = 0; j < MEM_BYTES; j++)
          if (j < int'(ld_n) && int'(ld_col) + j < CF_COLS) cf[ld_row][int'(ld_col) + j] <= ld_data[j];
      end
      // convolution results
      if (res_we) begin
        if (res_to_in2d) begin
          if (res_shift)
            for (int r = R2_ROWS - 1; r >= 1; r--) r2[r] <= r2[r-1];
          for (int j = 0; j < 16; j++)
            if (j < int'(res_n) && int'(res_col) + j < R2_COLS) r2[0][int'(res_col) + j] <= res[j];
        end else begin
          if (res_shift)
            for (int r = R2_ROWS - 1; r >= 1; r--) ro[r] <= ro[r-1];
          for (int j = 0; j < 16; j++)
            if (j < int'(res_n) && int'(res_col) + j < R2_COLS) ro[0][int'(res_col) + j] <= res[j];
        end
      end
      // SIMD write-back
      if (simd_we) begin
        for (int i = 0; i < SIMD_N; i++) ro[simd_row][i] <= simd_data[i];
      end
    end
  end

endmodule
