// ce_simd_unit: the light-weight 16-element vector unit of the Convolution
// Engine.
//
// It treats rows of the 2D output register as vector registers and post-
// processes convolution results: element-wise add, subtract, max, min of two
// rows, add or subtract a constant, threshold against a constant (elements
// below it become 0) and move. There is no multiplier. Results saturate to the
// signed 10-bit element range. The 16-element width and the add/subtract
// class follow the engine; max/min/threshold/move and saturation are this
// design's choices (thresholding is what the extrema search needs).
// Combinational; the controller writes the result back to row `row` in the
// same cycle.
module ce_simd_unit
  import ce_pkg::*;
(
  input  simd_op_e    op,
  input  elem_t       va  [SIMD_N],
  input  elem_t       vb  [SIMD_N],
  input  logic [15:0] imm,
  output elem_t       vy  [SIMD_N]
);

  localparam int EMAX = 2 ** (DW - 1) - 1;
  localparam int EMIN = -(2 ** (DW - 1));

  function automatic elem_t sat(int v);
    if (v > EMAX) return elem_t'(EMAX);
    if (v < EMIN) return elem_t'(EMIN);
    return elem_t'(v);
  endfunction

  always_comb begin
    int x, z, c;
    c = int'($signed(imm));
    for (int i = 0; i < SIMD_N; i++) begin
      x = int'(va[i]);
      z = int'(vb[i]);
      case (op)
        SIMD_ADD:  vy[i] = sat(x + z);
        SIMD_SUB:  vy[i] = sat(x - z);
        SIMD_ADDC: vy[i] = sat(x + c);
        SIMD_SUBC: vy[i] = sat(x - c);
        SIMD_MAX:  vy[i] = (x > z) ? va[i] : vb[i];
        SIMD_MIN:  vy[i] = (x < z) ? va[i] : vb[i];
        SIMD_THRC: vy[i] = (x >= c) ? va[i] : '0;
        default:   vy[i] = vb[i];
      endcase
    end
  end

endmodule
