// ce_tb_util.svh: helpers shared by the Convolution Engine testbenches to
// build instructions. Each returns a ce_instr_t with all unused fields zero.
`ifndef CE_TB_UTIL_SVH
`define CE_TB_UTIL_SVH

function automatic ce_pkg::ce_instr_t i_ops(ce_pkg::map_op_e m, ce_pkg::red_op_e r);
  ce_pkg::ce_instr_t i = '0;
  i.op = ce_pkg::OP_SET_OPS; i.map_op = m; i.red_op = r;
  return i;
endfunction

function automatic ce_pkg::ce_instr_t i_size(ce_pkg::ksize_e k, logic [15:0] mask, int norm, bit u8);
  ce_pkg::ce_instr_t i = '0;
  i.op = ce_pkg::OP_SET_SIZE; i.ksize = k; i.imm = mask; i.norm = 5'(norm); i.sat_u8 = u8;
  return i;
endfunction

function automatic ce_pkg::ce_instr_t i_mem(ce_pkg::opcode_e op, int addr, ce_pkg::width_e w,
                                            bit shift, bit sext, int row, int col, bit ilv = 0);
  ce_pkg::ce_instr_t i = '0;
  i.op = op; i.addr = 32'(addr); i.width = w; i.shift = shift; i.sext = sext;
  i.row = 4'(row); i.col = 5'(col); i.ilv = ilv;
  return i;
endfunction

function automatic ce_pkg::ce_instr_t i_conv(ce_pkg::opcode_e op, int in_off, int row_off, int crow,
                                             int col, bit shift, bit to_in2d = 0, int band = 0);
  ce_pkg::ce_instr_t i = '0;
  i.op = op; i.in_off = 6'(in_off); i.row_off = 4'(row_off); i.row = 4'(crow);
  i.col = 5'(col); i.shift = shift; i.dest_in2d = to_in2d; i.band = 2'(band);
  return i;
endfunction

function automatic ce_pkg::ce_instr_t i_simd(ce_pkg::simd_op_e op, int row, int row_b, int imm);
  ce_pkg::ce_instr_t i = '0;
  i.op = ce_pkg::OP_SIMD; i.simd_op = op; i.row = 4'(row); i.row_b = 4'(row_b); i.imm = 16'(imm);
  return i;
endfunction

`endif
