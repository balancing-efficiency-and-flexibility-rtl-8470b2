// bg_pkg: instruction format of the bilateral-grid SIMD array.
//
// The array is a row of 4-lane SIMD units that all execute one instruction
// stream; each unit keeps its own vector registers, address registers and a
// condition flag. Instructions are vector arithmetic on 16-bit lanes, address
// arithmetic (including adding a data value, used to turn a hash value into a
// table address), a compare that sets the flag, and 32-bit loads and stores
// through each unit's own L0 cache port. Every instruction can be made
// conditional on the flag so that short data-dependent branches run both
// paths and each unit keeps one result. The lane count, the single
// instruction stream, the per-unit address generation and the conditional
// execution follow the design; the opcode list, register counts and field
// layout are this implementation's own.
package bg_pkg;

  localparam int unsigned LANES = 4;    // r, g, b, w
  localparam int unsigned LW    = 16;   // lane width
  localparam int unsigned NVREG = 8;
  localparam int unsigned NAREG = 4;

  typedef enum logic [3:0] {
    BG_NOP   = 4'd0,
    BG_VADD  = 4'd1,   // vd = va + vb
    BG_VSUB  = 4'd2,   // vd = va - vb
    BG_VMUL  = 4'd3,   // vd = (va * vb) >>> shift
    BG_VADDI = 4'd4,   // vd = va + imm (every lane)
    BG_CMPLT = 4'd5,   // flag = va[0] < vb[0]
    BG_AADDI = 4'd6,   // ad = as + imm
    BG_AADDV = 4'd7,   // ad = as + (va[0] << shift)
    BG_LD    = 4'd8,   // vd lanes {2h+1,2h} = mem[as + imm]
    BG_ST    = 4'd9,   // mem[as + imm] = va lanes {2h+1,2h}
    BG_AUID  = 4'd10   // ad = as + (unit index << shift)
  } bg_op_e;

  typedef enum logic [1:0] {
    C_ALWAYS = 2'd0,   // every unit executes
    C_IF     = 2'd1,   // units with flag set
    C_IFNOT  = 2'd2    // units with flag clear
  } bg_cond_e;

  typedef struct packed {
    bg_op_e      op;
    bg_cond_e    cond;
    logic [2:0]  vd, va, vb;
    logic [1:0]  ad, as;
    logic        half;     // LD/ST: which 32-bit half of the vector
    logic [3:0]  shift;
    logic signed [15:0] imm;
  } bg_instr_t;

endpackage
