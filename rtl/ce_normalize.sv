// ce_normalize: brings a reduction result back to the 10-bit element width of
// the output register.
//
// The result is shifted right arithmetically by `shift` bits with
// round-half-up, then clamped either to 0..255 (sat_u8, for results stored as
// 8-bit pixels) or to the signed 10-bit range. The engine names a normalise
// step between reduction and output register; the shift-round-clamp recipe is
// this design's. Combinational, one instance per reduction output.
module ce_normalize
  import ce_pkg::*;
(
  input  acc_t       x,
  input  logic [4:0] shift,
  input  logic       sat_u8,
  output elem_t      y
);

  localparam acc_t EMAX = acc_t'(2 ** (DW - 1) - 1);
  localparam acc_t EMIN = -acc_t'(2 ** (DW - 1));

  acc_t rounded;

  always_comb begin
    if (shift == 0) rounded = x;
    else            rounded = (x + (acc_t'(1) <<< (shift - 1))) >>> shift;
    if (sat_u8) begin
      if (rounded < 0)                 y = '0;
      else if (rounded > acc_t'(255))  y = elem_t'(255);
      else                             y = elem_t'(rounded);
    end else begin
      if (rounded < EMIN)              y = elem_t'(EMIN);
      else if (rounded > EMAX)         y = elem_t'(EMAX);
      else                             y = elem_t'(rounded);
    end
  end

endmodule
