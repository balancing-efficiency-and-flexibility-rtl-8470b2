// cabac_lifo: 16-entry last-in first-out store for the DCT coefficients of a
// block, used by the H.264 CABAC binarisation stage.
//
// Coefficients are pushed in scan order and popped in reverse, which is the
// order binarisation consumes them. Every entry carries a one-bit flag,
// set when the coefficient is zero, so the encoder can test for zero values
// without reading and comparing the coefficient. The top entry and its flag
// are always visible; `nz_count` tells how many stored coefficients are
// non-zero. Push and pop in the same cycle replace the top entry. Depth and
// the zero flag follow the design; the coefficient width, the non-zero count
// and the push-and-pop rule are this implementation's choices. A push to a
// full LIFO or a pop from an empty one is an error (asserted) and ignored.
module cabac_lifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned CW    = 16   // coefficient width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic                     pop,
  input  logic signed [CW-1:0]     din,
  output logic signed [CW-1:0]     top,
  output logic                     top_zero,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output logic [$clog2(DEPTH):0]   nz_count
);

  logic signed [CW-1:0] val  [DEPTH];
  logic                 zero [DEPTH];

  assign empty    = (count == 0);
  assign full     = (count == DEPTH);
  assign top      = empty ? '0 : val[count - 1];
  assign top_zero = empty ? 1'b0 : zero[count - 1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      nz_count <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        val[i]  <= '0;
        zero[i] <= 1'b0;
      end
    end else if (push && pop && !empty) begin
      val[count - 1]  <= din;
      zero[count - 1] <= (din == 0);
      nz_count <= nz_count - {{$clog2(DEPTH){1'b0}}, !zero[count - 1]}
                           + {{$clog2(DEPTH){1'b0}}, din != 0};
    end else if (push && !full) begin
      val[count]  <= din;
      zero[count] <= (din == 0);
      count    <= count + 1'b1;
      nz_count <= nz_count + {{$clog2(DEPTH){1'b0}}, din != 0};
    end else if (pop && !empty) begin
      count    <= count - 1'b1;
      nz_count <= nz_count - {{$clog2(DEPTH){1'b0}}, !zero[count - 1]};
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push && !pop |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
