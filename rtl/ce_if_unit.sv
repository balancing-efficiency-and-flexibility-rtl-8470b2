// ce_if_unit: the interface units of the Convolution Engine.
//
// They arrange register data into the pattern a stencil needs and feed it to
// the two operand ports of the 64 map ALUs, so that the ALUs themselves stay a
// plain array. Port A carries image data, port B carries the coefficient
// register ("broadcast coefficient"):
//   * horizontal interface (1D flow along a row): lane p*K+k gets 1D register
//     entry in_off+p+k, i.e. 64/K shifted copies of a K-wide window
//     ("shifted broadcast"); port B gets coefficient[crow][k] repeated;
//   * column interface (1D vertical flow): lane p*K+k gets 2D register
//     element [row_off+k][in_off+p], one column per stencil location;
//   * 2D interface: 4x4 blocks (four locations, lane p*16+r*4+c gets
//     [row_off+r][in_off+p+c]), one 8x8 block, or one 4-row band of a 16x16
//     block per step (64 ALUs cannot hold 256 products); port B gets the
//     matching coefficient [r][c];
//   * matrix operations (no reduction): lanes 0..15 get 16 consecutive
//     elements of a row of the source and coefficient row crow.
// Stencil sizes 4, 8, 16 and 4x4, 8x8, 16x16 are the engine's; the band step
// for 16x16, the matrix-operation layout and zero fill for indices past the
// register edge are this design's choices. The 16-bit stencil mask disables
// lanes by their index inside the stencil (modulo 16); a disabled lane feeds
// the reduction identity. Purely combinational. glog is log2 of the number of
// lanes each output reduces; n_out is the number of outputs of the step.
module ce_if_unit
  import ce_pkg::*;
(
  input  elem_t        r1   [R1_N],
  input  elem_t        r2   [R2_ROWS][R2_COLS],
  input  elem_t        cf   [CF_ROWS][CF_COLS],
  input  flow_e        flow,
  input  ksize_e       ksize,
  input  logic         matrix,    // reduce op is NONE
  input  logic [5:0]   in_off,
  input  logic [3:0]   row_off,
  input  logic [1:0]   band,
  input  logic [3:0]   crow,
  input  logic [15:0]  mask,
  output elem_t        a     [NLANE],
  output elem_t        b     [NLANE],
  output logic [NLANE-1:0] lane_en,
  output logic [2:0]   glog,
  output logic [4:0]   n_out
);

  function automatic elem_t rd1(int unsigned i);
    if (i < R1_N) return r1[i];
    return '0;
  endfunction

  function automatic elem_t rd2(int unsigned r, int unsigned c);
    if (r < R2_ROWS && c < R2_COLS) return r2[r][c];
    return '0;
  endfunction

  function automatic elem_t rdc(int unsigned r, int unsigned c);
    if (r < CF_ROWS && c < CF_COLS) return cf[r][c];
    return '0;
  endfunction

  always_comb begin
    int unsigned k_taps, lg, p, k, r, c;
    k_taps = ksize_taps(ksize);
    lg = (ksize == KS_4) ? 2 : (ksize == KS_8) ? 3 : 4;
    if (matrix)                glog = 3'd0;
    else if (flow == FLOW_2D)  glog = (ksize == KS_4) ? 3'd4 : 3'd6;
    else                       glog = 3'(lg);
    n_out = matrix ? 5'd16 : 5'(NLANE >> glog);

    for (int unsigned l = 0; l < NLANE; l++) begin
      p = 0; k = 0; r = 0; c = 0;
      a[l] = '0;
      b[l] = '0;
      lane_en[l] = 1'b0;
      if (matrix) begin
        if (l < 16) begin
          a[l] = (flow == FLOW_1D_HOR) ? rd1(in_off + l) : rd2(row_off, in_off + l);
          b[l] = rdc(crow, l);
          lane_en[l] = mask[l];
        end
      end else begin
        unique case (flow)
          FLOW_1D_HOR: begin
            p = l >> lg;
            k = l & (k_taps - 1);
            a[l] = rd1(in_off + p + k);
            b[l] = rdc(crow, k);
            lane_en[l] = mask[k];
          end
          FLOW_1D_VER: begin
            p = l >> lg;
            k = l & (k_taps - 1);
            a[l] = rd2(row_off + k, in_off + p);
            b[l] = rdc(crow, k);
            lane_en[l] = mask[k];
          end
          default: begin
            if (ksize == KS_4) begin
              p = l >> 4;
              r = (l >> 2) & 3;
              c = l & 3;
              a[l] = rd2(row_off + r, in_off + p + c);
              b[l] = rdc(r, c);
              lane_en[l] = mask[l & 15];
            end else if (ksize == KS_8) begin
              r = l >> 3;
              c = l & 7;
              a[l] = rd2(row_off + r, in_off + c);
              b[l] = rdc(r, c);
              lane_en[l] = mask[l & 15];
            end else begin
              r = 4 * band + (l >> 4);
              c = l & 15;
              a[l] = rd2(row_off + r, in_off + c);
              b[l] = rdc(r, c);
              lane_en[l] = mask[c];
            end
          end
        endcase
      end
    end
  end

endmodule
