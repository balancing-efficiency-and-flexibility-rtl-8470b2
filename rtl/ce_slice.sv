// ce_slice: one Convolution Engine slice.
//
// Data flow: the load/store unit fills the 1D shift register, the 2D input
// shift register and the coefficient register from memory; on a convolution
// instruction the interface units lay register data out over the 64 map
// ALUs (horizontal, column or 2D flow), the reduction tree combines the ALU
// results at the tap set by the stencil size, each of up to 16 results is
// normalised to 10 bits and written to row 0 of the output register (or of
// the 2D input register, for chained filters). The SIMD unit post-processes
// rows of the output register, and the store instruction writes the output
// register's top row back to memory.
//
// Interface: a command port (valid/ready, one ce_instr_t per command) from a
// host core and a 256-bit memory port (see ce_lsu). Timing: configuration,
// convolution and SIMD instructions take one cycle each; a load occupies the
// slice for 3 cycles and a store for 2, plus 2 (load) or 1 (store) when the
// access crosses a 32-byte line, plus memory wait states.
// The block structure follows the engine; the single-cycle datapath and the
// instruction format are this design's choices.
module ce_slice
  import ce_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  input  ce_instr_t    cmd,
  output logic         cmd_ready,
  output logic         mem_req,
  output logic         mem_we,
  output logic [26:0]  mem_line,
  output logic [255:0] mem_wdata,
  output logic [31:0]  mem_be,
  input  logic         mem_gnt,
  input  logic         mem_rvalid,
  input  logic [255:0] mem_rdata
);

  ce_cfg_t   cfg;
  ce_instr_t ex;
  logic      lsu_start, lsu_done, lsu_busy;
  logic      ld1d_we, ld2d_we, ldcf_we, conv_we, simd_we;

  elem_t r1 [R1_N];
  elem_t r2 [R2_ROWS][R2_COLS];
  elem_t cf [CF_ROWS][CF_COLS];
  elem_t ro [R2_ROWS][R2_COLS];
  elem_t ld_data [MEM_BYTES];
  elem_t st_data [MEM_BYTES];

  ce_ctrl u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .cfg, .ex,
    .lsu_start, .lsu_done, .ld1d_we, .ld2d_we, .ldcf_we, .conv_we, .simd_we
  );

  // store data: top row of the output register from column ex.col
  always_comb begin
    for (int j = 0; j < MEM_BYTES; j++)
      st_data[j] = (int'(ex.col) + j < R2_COLS) ? ro[0][int'(ex.col) + j] : '0;
  end

  ce_lsu u_lsu (
    .clk, .rst_n,
    .start (lsu_start), .store (ex.op == OP_ST_OUT), .addr (ex.addr),
    .width (ex.width), .sext (ex.sext), .wdata (st_data),
    .busy (lsu_busy), .done (lsu_done), .rdata (ld_data),
    .mem_req, .mem_we, .mem_line, .mem_wdata, .mem_be,
    .mem_gnt, .mem_rvalid, .mem_rdata
  );

  // ---- convolution datapath ----
  flow_e            flow;
  elem_t            op_a [NLANE];
  elem_t            op_b [NLANE];
  logic [NLANE-1:0] lane_en;
  logic [2:0]       glog;
  logic [4:0]       n_out;
  map_t             mapped  [NLANE];
  acc_t             reduced [NLANE];
  elem_t            res     [16];

  always_comb begin
    case (ex.op)
      OP_CONV_VER: flow = FLOW_1D_VER;
      OP_CONV_2D:  flow = FLOW_2D;
      default:     flow = FLOW_1D_HOR;
    endcase
  end

  ce_if_unit u_if (
    .r1, .r2, .cf, .flow, .ksize (cfg.ksize), .matrix (cfg.red_op == RED_NONE),
    .in_off (ex.in_off), .row_off (ex.row_off), .band (ex.band), .crow (ex.row),
    .mask (cfg.mask), .a (op_a), .b (op_b), .lane_en, .glog, .n_out
  );

  ce_map_array u_map (.op (cfg.map_op), .a (op_a), .b (op_b), .y (mapped));

  ce_reduce_tree u_red (
    .op (cfg.red_op), .glog, .x (mapped), .lane_en, .y (reduced)
  );

  for (genvar j = 0; j < 16; j++) begin : g_norm
    ce_normalize u_norm (
      .x (reduced[j]), .shift (cfg.norm), .sat_u8 (cfg.sat_u8), .y (res[j])
    );
  end

  // ---- SIMD unit ----
  elem_t va [SIMD_N];
  elem_t vb [SIMD_N];
  elem_t vy [SIMD_N];

  always_comb begin
    for (int i = 0; i < SIMD_N; i++) begin
      va[i] = ro[ex.row][i];
      vb[i] = ro[ex.row_b][i];
    end
  end

  ce_simd_unit u_simd (.op (ex.simd_op), .va, .vb, .imm (ex.imm), .vy);

  // ---- register files ----
  ce_regfile u_rf (
    .clk, .rst_n,
    .ld1d_we, .ld2d_we, .ldcf_we,
    .ld_shift (ex.shift), .ld_ilv (ex.ilv),
    .ld_n (6'(width_bytes(ex.width))), .ld_col (ex.col), .ld_row (ex.row),
    .ld_data,
    .res_we (conv_we), .res_to_in2d (ex.dest_in2d), .res_shift (ex.shift),
    .res_col (ex.col), .res_n (n_out), .res,
    .simd_we, .simd_row (ex.row), .simd_data (vy),
    .r1, .r2, .cf, .ro
  );

endmodule
