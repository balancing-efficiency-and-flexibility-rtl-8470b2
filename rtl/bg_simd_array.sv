// bg_simd_array: lock-step array of 4-lane SIMD units for the modified
// bilateral grid (splat, blur and slice on (r, g, b, w) values).
//
// One instruction per cycle is broadcast to NU units (16 by default). Each
// unit has NVREG vector registers of four 16-bit lanes, NAREG 32-bit address
// registers and a condition flag; see bg_pkg for the operations. Memory
// instructions drive every active unit's L0 port at once (port u belongs to
// unit u). While the L0 cache raises `stall`, in_ready is low, the caller
// holds the instruction, and all units wait; when the stall drops, loads
// write back and the next instruction may enter. Arithmetic instructions
// never stall and complete in the cycle they are accepted (registers update
// at the clock edge). A debug port shows one vector register and the flag of
// every unit. Lane arithmetic wraps at 16 bits. The array structure, the
// shared instruction stream, per-unit ports and address generation,
// conditional execution and stall-all-on-miss behaviour follow the design;
// the register counts, operations and timing are this implementation's.
module bg_simd_array
  import bg_pkg::*;
#(
  parameter int unsigned NU = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction stream
  input  logic                 in_valid,
  input  bg_instr_t            in_instr,
  output logic                 in_ready,
  // L0 cache ports
  output logic [NU-1:0]        mreq,
  output logic [NU-1:0]        mwe,
  output logic [31:0]          maddr  [NU],
  output logic [31:0]          mwdata [NU],
  input  logic [31:0]          mrdata [NU],
  input  logic                 mstall,
  // debug view
  input  logic [2:0]           dbg_v,
  output logic [LANES*LW-1:0]  dbg_data [NU],
  output logic [NU-1:0]        dbg_flag
);

  typedef logic signed [LW-1:0] lane_t;

  lane_t       vr   [NU][NVREG][LANES];
  logic [31:0] ar   [NU][NAREG];
  logic        flag [NU];
  logic [NU-1:0] act;           // unit executes this instruction
  logic        is_mem;
  logic        fire;

  assign is_mem   = (in_instr.op == BG_LD) || (in_instr.op == BG_ST);
  assign in_ready = !(is_mem && mstall);
  assign fire     = in_valid && in_ready;

  always_comb begin
    for (int u = 0; u < NU; u++) begin
      case (in_instr.cond)
        C_IF:    act[u] = flag[u];
        C_IFNOT: act[u] = !flag[u];
        default: act[u] = 1'b1;
      endcase
      mreq[u]   = in_valid && is_mem && act[u];
      mwe[u]    = in_instr.op == BG_ST;
      maddr[u]  = ar[u][in_instr.as] + 32'(in_instr.imm);
      mwdata[u] = {vr[u][in_instr.va][2*in_instr.half+1], vr[u][in_instr.va][2*in_instr.half]};
      dbg_flag[u] = flag[u];
      for (int l = 0; l < LANES; l++) dbg_data[u][LW*l +: LW] = vr[u][dbg_v][l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < NU; u++) begin
        flag[u] <= 1'b0;
        for (int a = 0; a < NAREG; a++) ar[u][a] <= '0;
        for (int r = 0; r < NVREG; r++)
          for (int l = 0; l < LANES; l++) vr[u][r][l] <= '0;
      end
    end else if (fire) begin
      for (int u = 0; u < NU; u++) begin
        if (act[u]) begin
          case (in_instr.op)
            BG_VADD: for (int l = 0; l < LANES; l++)
              vr[u][in_instr.vd][l] <= vr[u][in_instr.va][l] + vr[u][in_instr.vb][l];
            BG_VSUB: for (int l = 0; l < LANES; l++)
              vr[u][in_instr.vd][l] <= vr[u][in_instr.va][l] - vr[u][in_instr.vb][l];
            BG_VMUL: for (int l = 0; l < LANES; l++)
              vr[u][in_instr.vd][l] <= LW'((32'(vr[u][in_instr.va][l]) * 32'(vr[u][in_instr.vb][l])) >>> in_instr.shift);
            BG_VADDI: for (int l = 0; l < LANES; l++)
              vr[u][in_instr.vd][l] <= vr[u][in_instr.va][l] + in_instr.imm;
            BG_CMPLT: flag[u] <= vr[u][in_instr.va][0] < vr[u][in_instr.vb][0];
            BG_AADDI: ar[u][in_instr.ad] <= ar[u][in_instr.as] + 32'(in_instr.imm);
            BG_AADDV: ar[u][in_instr.ad] <= ar[u][in_instr.as]
                                            + (32'(vr[u][in_instr.va][0]) << in_instr.shift);
            BG_AUID:  ar[u][in_instr.ad] <= ar[u][in_instr.as] + (32'(u) << in_instr.shift);
            BG_LD: begin
              vr[u][in_instr.vd][2*in_instr.half]   <= mrdata[u][15:0];
              vr[u][in_instr.vd][2*in_instr.half+1] <= mrdata[u][31:16];
            end
            default: ;
          endcase
        end
      end
    end
  end

  // The caller must hold a memory instruction while it is stalled.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_instr));

endmodule
