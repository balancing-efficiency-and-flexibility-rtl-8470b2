// ce_map_array: the map stage of the Convolution Engine, an array of NLANE
// (64) two-input fixed-point ALUs working in lock step.
//
// All lanes perform the same operation, chosen by the configuration: multiply
// (filtering), absolute difference (SAD), add, subtract, compare greater /
// less (extrema search, result 0 or 1), rounded average (quarter-pixel
// interpolation) or pass-through. Operands are signed 10-bit elements; the
// result is MW (20) bits wide so a full product fits. The operation list
// follows the map operators the engine supports; pass-through and the
// rounding of the average are this design's additions. Combinational.
module ce_map_array
  import ce_pkg::*;
(
  input  map_op_e op,
  input  elem_t   a [NLANE],
  input  elem_t   b [NLANE],
  output map_t    y [NLANE]
);

  function automatic map_t alu(map_op_e f, elem_t x, elem_t z);
    map_t xs, zs, d;
    xs = MW'(x);
    zs = MW'(z);
    d  = xs - zs;
    case (f)
      MAP_MUL:     return xs * zs;
      MAP_ABSDIFF: return (d < 0) ? -d : d;
      MAP_ADD:     return xs + zs;
      MAP_SUB:     return d;
      MAP_CMPGT:   return (x > z) ? map_t'(1) : map_t'(0);
      MAP_CMPLT:   return (x < z) ? map_t'(1) : map_t'(0);
      MAP_AVG:     return (xs + zs + map_t'(1)) >>> 1;
      default:     return xs;
    endcase
  endfunction

  always_comb begin
    for (int l = 0; l < NLANE; l++) y[l] = alu(op, a[l], b[l]);
  end

endmodule
