// ce_lsu: load/store unit of a Convolution Engine slice.
//
// The host core computes the byte address; the LSU moves the data between the
// data memory and the CE registers. Accesses are 32, 64, 128 or 256 bits
// (4..32 one-byte pixels) at any byte address. The memory side is one
// 256-bit line per beat, so an access that crosses a 32-byte line boundary
// takes two memory transactions; the LSU funnel-shifts the two lines into
// place (loads) or splits data and byte enables over two lines (stores).
// Memory protocol: a request is held until mem_gnt; read data returns later
// with mem_rvalid, one transaction outstanding at a time. Load bytes are
// widened to 10-bit elements, sign- or zero-extended. `done` pulses for one
// cycle when the access is complete: with a memory that grants at once and
// answers in one cycle, a load is done 2 cycles after start (4 when it
// crosses a line) and a store 1 cycle after start (2 when it crosses); for a
// load, rdata then holds the data,
// element 0 being the byte at `addr`. The widths and unaligned support follow
// the engine; the memory handshake is this design's choice.
module ce_lsu
  import ce_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // command
  input  logic         start,
  input  logic         store,
  input  logic [31:0]  addr,
  input  width_e       width,
  input  logic         sext,
  input  elem_t        wdata [MEM_BYTES],
  output logic         busy,
  output logic         done,
  output elem_t        rdata [MEM_BYTES],
  // memory
  output logic         mem_req,
  output logic         mem_we,
  output logic [26:0]  mem_line,
  output logic [255:0] mem_wdata,
  output logic [31:0]  mem_be,
  input  logic         mem_gnt,
  input  logic         mem_rvalid,
  input  logic [255:0] mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_REQ0, S_WAIT0, S_REQ1, S_WAIT1, S_DONE} state_e;

  state_e       state;
  logic         st_q, sext_q, cross_q;
  logic [26:0]  line_q;
  logic [4:0]   off_q;
  logic [5:0]   nb_q;
  logic [7:0]   wbytes [MEM_BYTES];
  logic [7:0]   lo     [MEM_BYTES];
  logic [7:0]   hi     [MEM_BYTES];

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      st_q    <= 1'b0;
      sext_q  <= 1'b0;
      cross_q <= 1'b0;
      line_q  <= '0;
      off_q   <= '0;
      nb_q    <= '0;
      for (int i = 0; i < MEM_BYTES; i++) begin
        wbytes[i] <= '0;
        lo[i]     <= '0;
        hi[i]     <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          st_q    <= store;
          sext_q  <= sext;
          line_q  <= addr[31:5];
          off_q   <= addr[4:0];
          nb_q    <= 6'(width_bytes(width));
          cross_q <= (int'(addr[4:0]) + int'(width_bytes(width))) > MEM_BYTES;
          for (int i = 0; i < MEM_BYTES; i++) wbytes[i] <= wdata[i][7:0];
          state   <= S_REQ0;
        end
        S_REQ0: if (mem_gnt) state <= st_q ? (cross_q ? S_REQ1 : S_DONE) : S_WAIT0;
        S_WAIT0: if (mem_rvalid) begin
          for (int i = 0; i < MEM_BYTES; i++) lo[i] <= mem_rdata[8*i +: 8];
          state <= cross_q ? S_REQ1 : S_DONE;
        end
        S_REQ1: if (mem_gnt) state <= st_q ? S_DONE : S_WAIT1;
        S_WAIT1: if (mem_rvalid) begin
          for (int i = 0; i < MEM_BYTES; i++) hi[i] <= mem_rdata[8*i +: 8];
          state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done = (state == S_DONE);

  // memory request
  always_comb begin
    int p;
    mem_req   = (state == S_REQ0) || (state == S_REQ1);
    mem_we    = st_q;
    mem_line  = (state == S_REQ1) ? line_q + 27'd1 : line_q;
    mem_wdata = '0;
    mem_be    = '0;
    for (int j = 0; j < MEM_BYTES; j++) begin
      p = int'(off_q) + j;
      if (j < int'(nb_q)) begin
        if (state == S_REQ1) begin
          if (p >= MEM_BYTES) begin
            mem_wdata[8*(p-MEM_BYTES) +: 8] = wbytes[j];
            mem_be[p-MEM_BYTES] = 1'b1;
          end
        end else if (p < MEM_BYTES) begin
          mem_wdata[8*p +: 8] = wbytes[j];
          mem_be[p] = 1'b1;
        end
      end
    end
  end

  // load data: funnel shift of the two lines, then widen to elements
  always_comb begin
    int p;
    logic [7:0] by;
    for (int j = 0; j < MEM_BYTES; j++) begin
      p  = int'(off_q) + j;
      by = (p < MEM_BYTES) ? lo[p] : hi[p - MEM_BYTES];
      if (j >= int'(nb_q)) by = '0;
      rdata[j] = sext_q ? elem_t'($signed(by)) : elem_t'({2'b00, by});
    end
  end

endmodule
