// ce_ctrl: instruction controller of a Convolution Engine slice.
//
// The host core decodes CE instructions and hands each one to the slice over
// a command port (valid/ready). The controller keeps the kernel
// configuration (map and reduce functions, stencil size and mask,
// normalisation) written by SET_CE_OPS / SET_CE_OPSIZE, and sequences the
// others:
//   * configuration, convolution and SIMD instructions complete in the cycle
//     they are accepted: the datapath is combinational from the registers
//     and the result is written at the next clock edge, so one such
//     instruction is accepted per cycle;
//   * loads and stores start the load/store unit and hold cmd_ready low
//     until it is done (a load occupies the slice 3 cycles, a store 2, one
//     or two more when the access crosses a memory line, plus memory wait
//     states); a load's register write happens on the done cycle.
// `ex` is the instruction the datapath executes in this cycle: the incoming
// command when idle, the held load/store otherwise. The split between single
// cycle and multi-cycle instructions and the handshake are this design's
// choices; the instruction classes follow the engine's ISA extension.
module ce_ctrl
  import ce_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmd_valid,
  input  ce_instr_t cmd,
  output logic      cmd_ready,
  output ce_cfg_t   cfg,
  output ce_instr_t ex,
  output logic      lsu_start,
  input  logic      lsu_done,
  output logic      ld1d_we,
  output logic      ld2d_we,
  output logic      ldcf_we,
  output logic      conv_we,
  output logic      simd_we
);

  logic      busy_q;
  ce_instr_t instr_q;
  logic      accept, is_mem;

  assign cmd_ready = !busy_q;
  assign accept    = cmd_valid && cmd_ready;
  assign is_mem    = (cmd.op == OP_LD_COEFF) || (cmd.op == OP_LD_1D) ||
                     (cmd.op == OP_LD_2D)    || (cmd.op == OP_ST_OUT);
  assign ex        = busy_q ? instr_q : cmd;
  assign lsu_start = accept && is_mem;
  assign conv_we   = accept && ((cmd.op == OP_CONV_HOR) || (cmd.op == OP_CONV_VER) ||
                                (cmd.op == OP_CONV_2D));
  assign simd_we   = accept && (cmd.op == OP_SIMD);
  assign ld1d_we   = busy_q && lsu_done && (instr_q.op == OP_LD_1D);
  assign ld2d_we   = busy_q && lsu_done && (instr_q.op == OP_LD_2D);
  assign ldcf_we   = busy_q && lsu_done && (instr_q.op == OP_LD_COEFF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      instr_q <= '0;
      cfg     <= '{map_op: MAP_MUL, red_op: RED_ADD, ksize: KS_4,
                   mask: 16'hFFFF, norm: 5'd0, sat_u8: 1'b0};
    end else begin
      if (accept) begin
        if (cmd.op == OP_SET_OPS) begin
          cfg.map_op <= cmd.map_op;
          cfg.red_op <= cmd.red_op;
        end
        if (cmd.op == OP_SET_SIZE) begin
          cfg.ksize  <= cmd.ksize;
          cfg.mask   <= cmd.imm;
          cfg.norm   <= cmd.norm;
          cfg.sat_u8 <= cmd.sat_u8;
        end
        if (is_mem) begin
          busy_q  <= 1'b1;
          instr_q <= cmd;
        end
      end else if (busy_q && lsu_done) begin
        busy_q <= 1'b0;
      end
    end
  end

  // A command offered while the slice is busy must be held unchanged.
  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));

endmodule
