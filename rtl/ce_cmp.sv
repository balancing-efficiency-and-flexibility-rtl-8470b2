// ce_cmp: the Convolution Engine chip multiprocessor fabric.
//
// NSLICE (4) CE slices are driven by NPORT (2) host cores. Every core has
// one command port; a command names the slice it is for, and a per-slice
// multiplexer picks among the ports addressing that slice, round robin when
// both do, so each core can run its own thread of CE code on the slices it
// owns. A port's ready is the ready of the slice that accepted it. Each slice
// keeps its own 256-bit memory port, brought out to the data memory. Four
// slices and two cores follow the engine's multiprocessor; the round-robin
// mux and the slice field are this design's choices. Slices run
// independently: joining slices into a wider one is not built.
module ce_cmp
  import ce_pkg::*;
#(
  parameter int unsigned NSLICE = 4,
  parameter int unsigned NPORT  = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host command ports
  input  logic      [NPORT-1:0]     p_valid,
  input  logic      [1:0]           p_slice [NPORT],
  input  ce_instr_t                 p_cmd   [NPORT],
  output logic      [NPORT-1:0]     p_ready,
  // per-slice memory ports
  output logic      [NSLICE-1:0]    mem_req,
  output logic      [NSLICE-1:0]    mem_we,
  output logic      [26:0]          mem_line  [NSLICE],
  output logic      [255:0]         mem_wdata [NSLICE],
  output logic      [31:0]          mem_be    [NSLICE],
  input  logic      [NSLICE-1:0]    mem_gnt,
  input  logic      [NSLICE-1:0]    mem_rvalid,
  input  logic      [255:0]         mem_rdata [NSLICE]
);

  localparam int PW = (NPORT > 1) ? $clog2(NPORT) : 1;

  logic [NSLICE-1:0] s_valid, s_ready;
  ce_instr_t         s_cmd  [NSLICE];
  logic [PW-1:0]     s_sel  [NSLICE];
  logic [PW-1:0]     s_last [NSLICE];

  // per-slice round-robin selection among the requesting ports
  always_comb begin
    int unsigned q;
    for (int s = 0; s < NSLICE; s++) begin
      s_valid[s] = 1'b0;
      s_sel[s]   = '0;
      for (int i = 1; i <= NPORT; i++) begin
        q = (int'(s_last[s]) + i) % NPORT;
        if (!s_valid[s] && p_valid[q] && int'(p_slice[q]) == s) begin
          s_valid[s] = 1'b1;
          s_sel[s]   = PW'(q);
        end
      end
      s_cmd[s] = p_cmd[s_sel[s]];
    end
    for (int p = 0; p < NPORT; p++) begin
      p_ready[p] = 1'b0;
      for (int s = 0; s < NSLICE; s++)
        if (s_valid[s] && int'(s_sel[s]) == p && s_ready[s]) p_ready[p] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSLICE; s++) s_last[s] <= PW'(NPORT - 1);
    end else begin
      for (int s = 0; s < NSLICE; s++)
        if (s_valid[s] && s_ready[s]) s_last[s] <= s_sel[s];
    end
  end

  for (genvar s = 0; s < NSLICE; s++) begin : g_slice
    ce_slice u_slice (
      .clk, .rst_n,
      .cmd_valid (s_valid[s]), .cmd (s_cmd[s]), .cmd_ready (s_ready[s]),
      .mem_req (mem_req[s]), .mem_we (mem_we[s]), .mem_line (mem_line[s]),
      .mem_wdata (mem_wdata[s]), .mem_be (mem_be[s]), .mem_gnt (mem_gnt[s]),
      .mem_rvalid (mem_rvalid[s]), .mem_rdata (mem_rdata[s])
    );
  end

endmodule
