// ce_pkg: shared sizes, operation encodings and the instruction format of the
// Convolution Engine (CE).
//
// The CE is a programmable stencil datapath: interface units spread data held
// in small shift registers over 64 ALUs (the "map" step), a reduction tree
// combines the ALU results (the "reduce" step), and the results land in an
// output register. The sizes below are the engine's main configuration: 64
// ALUs of 10 bits, a 40-entry 1D shift register, 16x18 input and output
// registers and a 16x16 coefficient register. The instruction set follows the
// major CE instructions (configure map/reduce and stencil size, register
// loads, output store, three convolution flows, SIMD). The bit-level format of
// an instruction is this design's own: one packed struct delivered by the
// host core per command, carrying the byte address the host computed.
package ce_pkg;

  // Element width of every CE register and ALU operand.
  localparam int unsigned DW      = 10;
  // Number of map ALUs (lanes).
  localparam int unsigned NLANE   = 64;
  // 1D shift register entries.
  localparam int unsigned R1_N    = 40;
  // 2D input / output shift register: rows x columns.
  localparam int unsigned R2_ROWS = 16;
  localparam int unsigned R2_COLS = 18;
  // Coefficient register: rows x columns.
  localparam int unsigned CF_ROWS = 16;
  localparam int unsigned CF_COLS = 16;
  // SIMD unit width.
  localparam int unsigned SIMD_N  = 16;
  // Widest memory access: 256 bits = 32 bytes, one 8-bit pixel per byte.
  localparam int unsigned MEM_BYTES = 32;
  // Map result width (a 10x10 signed product) and accumulator width
  // (64 map results summed).
  localparam int unsigned MW      = 2 * DW;
  localparam int unsigned AW      = MW + 6;

  typedef logic signed [DW-1:0] elem_t;
  typedef logic signed [MW-1:0] map_t;
  typedef logic signed [AW-1:0] acc_t;

  // Map (ALU) operations.
  typedef enum logic [2:0] {
    MAP_MUL     = 3'd0,  // a * b
    MAP_ABSDIFF = 3'd1,  // |a - b|
    MAP_ADD     = 3'd2,  // a + b
    MAP_SUB     = 3'd3,  // a - b
    MAP_CMPGT   = 3'd4,  // a > b ? 1 : 0
    MAP_CMPLT   = 3'd5,  // a < b ? 1 : 0
    MAP_AVG     = 3'd6,  // (a + b + 1) >> 1
    MAP_PASS    = 3'd7   // a
  } map_op_e;

  // Reduce operations.
  typedef enum logic [2:0] {
    RED_ADD  = 3'd0,  // sum
    RED_AND  = 3'd1,  // logical AND (all non-zero -> 1)
    RED_OR   = 3'd2,  // logical OR
    RED_MAX  = 3'd3,
    RED_MIN  = 3'd4,
    RED_NONE = 3'd5   // matrix operation: no reduction, 16 results
  } red_op_e;

  // Stencil size selector: 4, 8 or 16 (1D) / 4x4, 8x8, 16x16 (2D).
  typedef enum logic [1:0] {
    KS_4  = 2'd0,
    KS_8  = 2'd1,
    KS_16 = 2'd2
  } ksize_e;

  // Data flow of a convolution step.
  typedef enum logic [1:0] {
    FLOW_1D_HOR = 2'd0,
    FLOW_1D_VER = 2'd1,
    FLOW_2D     = 2'd2
  } flow_e;

  // Memory access width: 32, 64, 128 or 256 bits.
  typedef enum logic [1:0] {
    W32  = 2'd0,
    W64  = 2'd1,
    W128 = 2'd2,
    W256 = 2'd3
  } width_e;

  // SIMD operations on rows of the output register (16 lanes).
  typedef enum logic [2:0] {
    SIMD_ADD   = 3'd0,  // row[a] = row[a] + row[b]
    SIMD_SUB   = 3'd1,  // row[a] = row[a] - row[b]
    SIMD_ADDC  = 3'd2,  // row[a] = row[a] + imm
    SIMD_SUBC  = 3'd3,  // row[a] = row[a] - imm
    SIMD_MAX   = 3'd4,  // row[a] = max(row[a], row[b])
    SIMD_MIN   = 3'd5,  // row[a] = min(row[a], row[b])
    SIMD_THRC  = 3'd6,  // row[a] = row[a] >= imm ? row[a] : 0
    SIMD_MOV   = 3'd7   // row[a] = row[b]
  } simd_op_e;

  // Instruction opcodes (major CE instructions plus SIMD and NOP).
  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_SET_OPS  = 4'd1,   // SET_CE_OPS: map and reduce functions
    OP_SET_SIZE = 4'd2,   // SET_CE_OPSIZE: stencil size, mask, normalisation
    OP_LD_COEFF = 4'd3,   // LD_COEFF_REG_n
    OP_LD_1D    = 4'd4,   // LD_1D_REG_n
    OP_LD_2D    = 4'd5,   // LD_2D_REG_n
    OP_ST_OUT   = 4'd6,   // ST_OUT_REG_n
    OP_CONV_HOR = 4'd7,   // CONVOLVE_1D_HOR
    OP_CONV_VER = 4'd8,   // CONVOLVE_1D_VER
    OP_CONV_2D  = 4'd9,   // CONVOLVE_2D
    OP_SIMD     = 4'd10   // vector operation on the output register
  } opcode_e;

  // One CE instruction as delivered by a host core. Fields not used by an
  // opcode are ignored.
  typedef struct packed {
    opcode_e     op;
    logic [31:0] addr;      // byte address (loads/stores)
    width_e      width;     // access width (loads/stores)
    logic        shift;     // loads: shift before write; conv: shift output rows
    logic        ilv;       // LD_2D: interleaved split into two rows
    logic        sext;      // loads: sign-extend bytes (else zero-extend)
    logic        dest_in2d; // conv: write results to 2D input register
    logic [3:0]  row;       // coeff row (LD_COEFF, 1D conv), SIMD dest row
    logic [3:0]  row_b;     // SIMD source row
    logic [5:0]  in_off;    // conv: horizontal (column) offset into source
    logic [3:0]  row_off;   // conv: vertical offset into 2D register
    logic [1:0]  band;      // CONV_2D 16x16: which 4-row band
    logic [4:0]  col;       // output column offset (conv), column offset (loads/stores)
    map_op_e     map_op;    // SET_OPS
    red_op_e     red_op;    // SET_OPS
    ksize_e      ksize;     // SET_SIZE
    logic [15:0] imm;       // SET_SIZE: stencil mask; SIMD: constant
    logic [4:0]  norm;      // SET_SIZE: right shift applied when normalising
    logic        sat_u8;    // SET_SIZE: clamp results to 0..255
    simd_op_e    simd_op;   // SIMD
  } ce_instr_t;

  // Configuration set by SET_CE_OPS / SET_CE_OPSIZE, fixed for a kernel.
  typedef struct packed {
    map_op_e     map_op;
    red_op_e     red_op;
    ksize_e      ksize;
    logic [15:0] mask;    // stencil element enables, index within stencil mod 16
    logic [4:0]  norm;    // normalisation right shift
    logic        sat_u8;  // clamp results to 0..255
  } ce_cfg_t;

  // Number of bytes of an access width.
  function automatic int unsigned width_bytes(width_e w);
    case (w)
      W32:     return 4;
      W64:     return 8;
      W128:    return 16;
      default: return 32;
    endcase
  endfunction

  // Number of taps of a stencil size selector.
  function automatic int unsigned ksize_taps(ksize_e k);
    case (k)
      KS_4:    return 4;
      KS_8:    return 8;
      default: return 16;
    endcase
  endfunction

endpackage
