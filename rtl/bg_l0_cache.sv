// bg_l0_cache: small multi-ported L0 data cache between the lock-step SIMD
// array of the bilateral-grid engine and the L1 data cache.
//
// Adjacent pixels tend to touch the same hash-table entries, so a tiny cache
// close to the array catches most accesses and offers one port per SIMD
// unit. Organisation: SIZE_BYTES (1 KB) direct mapped, LINE_BYTES (32) per
// line, 32-bit words, write-back with write-allocate, NPORT (16) ports.
//
// Protocol: in any cycle each port may present a read or a write. If every
// requesting port hits, all accesses complete in that cycle: read data is
// returned combinationally and writes land at the clock edge (when two
// ports write the same word, the higher-numbered port wins; reads see the
// data from before the edge). If any port misses, `stall` is raised, all
// ports must hold their requests, and the misses are served one after
// another, lowest port first: a dirty victim line is written back, then the
// line is fetched from L1. While stalled, a port whose access hits is
// completed at once (its read data is kept in a per-port register, its write
// lands) and it drops out of the miss check; this also keeps two ports that
// map to the same line with different tags from evicting each other forever.
// When no pending port misses, stall drops and the remaining accesses
// complete. L1 side: one line per transaction, request held
// until l1_gnt, read data returned later with l1_rvalid. hit_count and
// miss_count count port accesses and line fills for measuring the hit rate.
// The 1 KB size, the multiple ports and the stall-all-units miss handling
// follow the design; associativity, line size, write policy and the port
// priorities are this implementation's choices.
module bg_l0_cache #(
  parameter int unsigned SIZE_BYTES = 1024,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned NPORT      = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // SIMD unit ports
  input  logic [NPORT-1:0]        req,
  input  logic [NPORT-1:0]        we,
  input  logic [31:0]             addr  [NPORT],
  input  logic [31:0]             wdata [NPORT],
  output logic [31:0]             rdata [NPORT],
  output logic                    stall,
  // L1 side
  output logic                    l1_req,
  output logic                    l1_we,
  output logic [31-$clog2(LINE_BYTES):0] l1_line,
  output logic [LINE_BYTES*8-1:0] l1_wdata,
  input  logic                    l1_gnt,
  input  logic                    l1_rvalid,
  input  logic [LINE_BYTES*8-1:0] l1_rdata,
  // statistics
  output logic [31:0]             hit_count,
  output logic [31:0]             miss_count
);

  localparam int unsigned NLINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned WPL    = LINE_BYTES / 4;
  localparam int unsigned OB     = $clog2(LINE_BYTES);
  localparam int unsigned IB     = $clog2(NLINES);
  localparam int unsigned TB     = 32 - OB - IB;
  localparam int unsigned PB     = (NPORT > 1) ? $clog2(NPORT) : 1;

  typedef enum logic [1:0] {S_RUN, S_WB, S_FILL_REQ, S_FILL_WAIT} state_e;

  logic [31:0]   data  [NLINES][WPL];
  logic [TB-1:0] tag   [NLINES];
  logic          valid [NLINES];
  logic          dirty [NLINES];

  state_e            state;
  logic [NPORT-1:0]  hit, miss;
  logic [NPORT-1:0]  done;        // port already served during this stall
  logic [NPORT-1:0]  pend;        // requesting and not yet served
  logic [31:0]       rdata_q [NPORT];
  logic              any_miss;
  logic [PB-1:0]     mp;          // port being served
  logic [31:0]       maddr;
  logic              vdirty;      // victim line dirty, counting writes landing now

  function automatic logic [IB-1:0] idx_of(logic [31:0] a);
    return a[OB +: IB];
  endfunction
  function automatic logic [TB-1:0] tag_of(logic [31:0] a);
    return a[31 -: TB];
  endfunction

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      pend[p] = req[p] && !done[p];
      hit[p]  = pend[p] && valid[idx_of(addr[p])] && (tag[idx_of(addr[p])] == tag_of(addr[p]));
      miss[p] = pend[p] && !hit[p];
      rdata[p] = done[p] ? rdata_q[p] : data[idx_of(addr[p])][addr[p][OB-1:2]];
    end
    any_miss = |miss;
    mp = '0;
    for (int p = NPORT - 1; p >= 0; p--) if (miss[p]) mp = PB'(p);
    maddr = addr[mp];
    vdirty = valid[idx_of(maddr)] && dirty[idx_of(maddr)];
    for (int p = 0; p < NPORT; p++)
      if (hit[p] && we[p] && idx_of(addr[p]) == idx_of(maddr)) vdirty = 1'b1;
  end

  assign stall = any_miss || (state != S_RUN);

  // L1 transactions
  always_comb begin
    l1_req   = (state == S_WB) || (state == S_FILL_REQ);
    l1_we    = (state == S_WB);
    l1_line  = (state == S_WB) ? {tag[idx_of(maddr)], idx_of(maddr)} : maddr[31:OB];
    for (int w = 0; w < WPL; w++) l1_wdata[32*w +: 32] = data[idx_of(maddr)][w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RUN;
      done       <= '0;
      hit_count  <= '0;
      miss_count <= '0;
      for (int p = 0; p < NPORT; p++) rdata_q[p] <= '0;
      for (int i = 0; i < NLINES; i++) begin
        valid[i] <= 1'b0;
        dirty[i] <= 1'b0;
        tag[i]   <= '0;
        for (int w = 0; w < WPL; w++) data[i][w] <= '0;
      end
    end else begin
      case (state)
        S_RUN: begin
          // complete every pending access that hits
          hit_count <= hit_count + 32'($countones(hit));
          for (int p = 0; p < NPORT; p++)
            if (hit[p]) begin
              rdata_q[p] <= data[idx_of(addr[p])][addr[p][OB-1:2]];
              if (we[p]) begin
                data[idx_of(addr[p])][addr[p][OB-1:2]] <= wdata[p];
                dirty[idx_of(addr[p])] <= 1'b1;
              end
            end
          if (any_miss) begin
            done <= done | hit;
            miss_count <= miss_count + 1;
            state <= vdirty ? S_WB : S_FILL_REQ;
          end else begin
            done <= '0;
          end
        end
        S_WB:       if (l1_gnt) state <= S_FILL_REQ;
        S_FILL_REQ: if (l1_gnt) state <= S_FILL_WAIT;
        default: if (l1_rvalid) begin
          for (int w = 0; w < WPL; w++) data[idx_of(maddr)][w] <= l1_rdata[32*w +: 32];
          tag[idx_of(maddr)]   <= tag_of(maddr);
          valid[idx_of(maddr)] <= 1'b1;
          dirty[idx_of(maddr)] <= 1'b0;
          state <= S_RUN;
        end
      endcase
    end
  end

  // While stalled the SIMD array must hold its requests.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    stall |=> $stable(req) && $stable(we));

endmodule
