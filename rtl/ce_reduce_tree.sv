// ce_reduce_tree: the reduce stage of the Convolution Engine.
//
// A binary tree over the 64 map results. Every level halves the number of
// values; results can be tapped after 4:1, 8:1, 16:1, 32:1 and 64:1 reduction
// (glog = 2..6 gives 64>>glog outputs, output j reducing lanes
// j*2^glog .. (j+1)*2^glog-1), or taken straight from the map stage (glog = 0,
// matrix operations). The tree performs arithmetic reduction (sum, max, min)
// or logical reduction (AND, OR of "value is non-zero"). A lane whose
// lane_en bit is clear contributes the identity of the operation. The taps
// and the two reduction classes follow the engine; max/min/OR and the lane
// enables are this design's choices. Sums are AW (26) bits, enough for 64
// full-width products. Combinational.
module ce_reduce_tree
  import ce_pkg::*;
(
  input  red_op_e          op,
  input  logic [2:0]       glog,
  input  map_t             x       [NLANE],
  input  logic [NLANE-1:0] lane_en,
  output acc_t             y       [NLANE]
);

  localparam int LEVELS = $clog2(NLANE);
  localparam acc_t ACC_MAX = {1'b0, {(AW-1){1'b1}}};
  localparam acc_t ACC_MIN = {1'b1, {(AW-1){1'b0}}};

  function automatic acc_t ident(red_op_e f);
    case (f)
      RED_AND: return acc_t'(1);
      RED_MAX: return ACC_MIN;
      RED_MIN: return ACC_MAX;
      default: return '0;
    endcase
  endfunction

  function automatic acc_t comb2(red_op_e f, acc_t p, acc_t q);
    case (f)
      RED_AND: return acc_t'((p != 0) && (q != 0));
      RED_OR:  return acc_t'((p != 0) || (q != 0));
      RED_MAX: return (p > q) ? p : q;
      RED_MIN: return (p < q) ? p : q;
      default: return p + q;
    endcase
  endfunction

  acc_t lvl [LEVELS+1][NLANE];

  always_comb begin
    for (int l = 0; l < NLANE; l++) begin
      if (!lane_en[l])          lvl[0][l] = ident(op);
      else if (op == RED_AND || op == RED_OR)
                                lvl[0][l] = acc_t'(x[l] != 0);
      else                      lvl[0][l] = AW'(x[l]);
    end
    for (int s = 1; s <= LEVELS; s++) begin
      for (int l = 0; l < NLANE; l++) begin
        if (l < (NLANE >> s)) lvl[s][l] = comb2(op, lvl[s-1][2*l], lvl[s-1][2*l+1]);
        else                  lvl[s][l] = '0;
      end
    end
    for (int l = 0; l < NLANE; l++) begin
      if (glog == 0)           y[l] = AW'(x[l]);
      else if (glog <= LEVELS) y[l] = lvl[glog][l];
      else                     y[l] = '0;
    end
  end

endmodule
