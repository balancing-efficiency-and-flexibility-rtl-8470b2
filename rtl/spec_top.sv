// spec_top: the specialised units of this design side by side.
//
// - Convolution Engine multiprocessor (ce_cmp): NSLICE CE slices, each with
//   its own 256-bit memory port, driven by NPORT host instruction ports.
// - H.264 units: the integer motion-estimation SAD array (ime_sad_unit), the
//   fractional motion-estimation half-pixel upsampler (fme_upsampler) and the
//   CABAC coefficient LIFO (cabac_lifo). Each exposes its own control and
//   data ports, standing for the custom-instruction operands of its host.
// - Bilateral-grid engine: the lock-step SIMD array (bg_simd_array) with its
//   multi-ported L0 cache (bg_l0_cache), which has one 256-bit L1 port.
//
// All ports pass straight through; timing is that of the individual units.
// The host processors, their caches and the memory system lie outside this
// module and are supplied by the environment. Grouping the units into one
// top level is this implementation's choice: in the design they belong to
// different processors of a heterogeneous chip.
module spec_top
  import ce_pkg::*;
  import bg_pkg::*;
#(
  parameter int unsigned NSLICE = 4,
  parameter int unsigned NPORT  = 2,
  parameter int unsigned BG_NU  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Convolution Engine host ports
  input  logic [NPORT-1:0]       ce_valid,
  input  logic [1:0]             ce_slice  [NPORT],
  input  ce_instr_t              ce_cmd    [NPORT],
  output logic [NPORT-1:0]       ce_ready,
  // Convolution Engine memory ports (one per slice)
  output logic [NSLICE-1:0]      ce_mem_req,
  output logic [NSLICE-1:0]      ce_mem_we,
  output logic [26:0]            ce_mem_line  [NSLICE],
  output logic [255:0]           ce_mem_wdata [NSLICE],
  output logic [31:0]            ce_mem_be    [NSLICE],
  input  logic [NSLICE-1:0]      ce_mem_gnt,
  input  logic [NSLICE-1:0]      ce_mem_rvalid,
  input  logic [255:0]           ce_mem_rdata [NSLICE],
  // IME SAD array
  input  logic                   ime_ref_ld,
  input  logic                   ime_ref_half,
  input  logic                   ime_ref_vshift,
  input  logic [127:0]           ime_ref_data,
  input  logic                   ime_ref_hshift,
  input  logic                   ime_cur_ld,
  input  logic [3:0]             ime_cur_row,
  input  logic [127:0]           ime_cur_data,
  input  logic                   ime_sad_en,
  output logic                   ime_sad_valid,
  output logic [15:0]            ime_sad_total,
  output logic [11:0]            ime_sad4 [16],
  // FME upsampler
  input  logic                   fme_in_valid,
  input  logic [7:0]             fme_in_pix [10],
  output logic                   fme_out_valid,
  output logic [7:0]             fme_hpel [5],
  output logic [7:0]             fme_vpel [5],
  output logic [7:0]             fme_dpel [5],
  // CABAC coefficient LIFO
  input  logic                   lifo_push,
  input  logic                   lifo_pop,
  input  logic signed [15:0]     lifo_din,
  output logic signed [15:0]     lifo_top,
  output logic                   lifo_top_zero,
  output logic                   lifo_empty,
  output logic                   lifo_full,
  output logic [4:0]             lifo_count,
  output logic [4:0]             lifo_nz_count,
  // Bilateral SIMD array instruction stream and debug view
  input  logic                   bg_valid,
  input  bg_instr_t              bg_instr,
  output logic                   bg_ready,
  input  logic [2:0]             bg_dbg_v,
  output logic [63:0]            bg_dbg_data [BG_NU],
  output logic [BG_NU-1:0]       bg_dbg_flag,
  // L0 cache to L1
  output logic                   l1_req,
  output logic                   l1_we,
  output logic [26:0]            l1_line,
  output logic [255:0]           l1_wdata,
  input  logic                   l1_gnt,
  input  logic                   l1_rvalid,
  input  logic [255:0]           l1_rdata,
  output logic [31:0]            l0_hits,
  output logic [31:0]            l0_fills
);

  ce_cmp #(.NSLICE(NSLICE), .NPORT(NPORT)) u_cmp (
    .clk, .rst_n,
    .p_valid(ce_valid), .p_slice(ce_slice), .p_cmd(ce_cmd), .p_ready(ce_ready),
    .mem_req(ce_mem_req), .mem_we(ce_mem_we), .mem_line(ce_mem_line),
    .mem_wdata(ce_mem_wdata), .mem_be(ce_mem_be), .mem_gnt(ce_mem_gnt),
    .mem_rvalid(ce_mem_rvalid), .mem_rdata(ce_mem_rdata));

  ime_sad_unit u_ime (
    .clk, .rst_n,
    .ref_ld(ime_ref_ld), .ref_half(ime_ref_half), .ref_vshift(ime_ref_vshift),
    .ref_data(ime_ref_data), .ref_hshift(ime_ref_hshift),
    .cur_ld(ime_cur_ld), .cur_row(ime_cur_row), .cur_data(ime_cur_data),
    .sad_en(ime_sad_en), .sad_valid(ime_sad_valid), .sad_total(ime_sad_total),
    .sad4(ime_sad4));

  fme_upsampler u_fme (
    .clk, .rst_n,
    .in_valid(fme_in_valid), .in_pix(fme_in_pix), .out_valid(fme_out_valid),
    .hpel(fme_hpel), .vpel(fme_vpel), .dpel(fme_dpel));

  cabac_lifo u_lifo (
    .clk, .rst_n,
    .push(lifo_push), .pop(lifo_pop), .din(lifo_din), .top(lifo_top),
    .top_zero(lifo_top_zero), .empty(lifo_empty), .full(lifo_full),
    .count(lifo_count), .nz_count(lifo_nz_count));

  logic [BG_NU-1:0] l0_req, l0_we;
  logic [31:0]      l0_addr  [BG_NU];
  logic [31:0]      l0_wdata [BG_NU];
  logic [31:0]      l0_rdata [BG_NU];
  logic             l0_stall;

  bg_simd_array #(.NU(BG_NU)) u_bg (
    .clk, .rst_n,
    .in_valid(bg_valid), .in_instr(bg_instr), .in_ready(bg_ready),
    .mreq(l0_req), .mwe(l0_we), .maddr(l0_addr), .mwdata(l0_wdata),
    .mrdata(l0_rdata), .mstall(l0_stall),
    .dbg_v(bg_dbg_v), .dbg_data(bg_dbg_data), .dbg_flag(bg_dbg_flag));

  bg_l0_cache #(.NPORT(BG_NU)) u_l0 (
    .clk, .rst_n,
    .req(l0_req), .we(l0_we), .addr(l0_addr), .wdata(l0_wdata), .rdata(l0_rdata),
    .stall(l0_stall),
    .l1_req, .l1_we, .l1_line, .l1_wdata, .l1_gnt, .l1_rvalid, .l1_rdata,
    .hit_count(l0_hits), .miss_count(l0_fills));

endmodule
