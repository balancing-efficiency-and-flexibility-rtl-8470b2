// tb_ce_lsu: self-checking test of the load/store unit.
// Random loads and stores of every width at random byte addresses (aligned,
// unaligned, line-crossing) against a behavioural memory. Loads are checked
// element by element (with sign or zero extension), stores by reading the
// memory back byte by byte, and every access's latency is checked: from
// start to done a load takes three cycles (five when it crosses into the next
// line), a store two (three), with a memory without wait states.
module tb_ce_lsu;
  import ce_pkg::*;

  logic clk = 0, rst_n = 1;
  logic start = 0, store = 0, sext = 0;
  logic [31:0] addr = 0;
  width_e width = W32;
  elem_t wdata [MEM_BYTES];
  logic busy, done;
  elem_t rdata [MEM_BYTES];
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [26:0] mem_line;
  logic [255:0] mem_wdata, mem_rdata;
  logic [31:0] mem_be;
  int checks = 0, failures = 0;
  byte unsigned shadow [8192];

  ce_lsu dut (.*);
  tb_mem_model #(.NLINES(256)) u_mem (
    .clk, .req (mem_req), .we (mem_we), .line (mem_line), .wdata (mem_wdata),
    .be (mem_be), .gnt (mem_gnt), .rvalid (mem_rvalid), .rdata (mem_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, cycles, exp_cycles, a;
    for (int i = 0; i < 8192; i++) begin
      shadow[i] = 8'($urandom);
      u_mem.mem[i / 32][8 * (i % 32) +: 8] = shadow[i];
    end
    for (int j = 0; j < MEM_BYTES; j++) wdata[j] = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int it = 0; it < 400; it++) begin
      width = width_e'($urandom_range(0, 3));
      nb = 4 << int'(width);
      a = $urandom_range(0, 8192 - 64);
      if (it % 5 == 0) a = a & ~31;
      addr = 32'(a);
      store = $urandom;
      sext = $urandom;
      for (int j = 0; j < MEM_BYTES; j++) wdata[j] = elem_t'($urandom);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      exp_cycles = store ? (((a % 32) + nb > 32) ? 3 : 2) : (((a % 32) + nb > 32) ? 5 : 3);
      checks++;
      if (cycles != exp_cycles) begin
        failures++;
        $display("FAIL latency addr=%0d nb=%0d: %0d cycles, expected %0d", a, nb, cycles, exp_cycles);
      end
      if (store) begin
        for (int j = 0; j < nb; j++) shadow[a + j] = wdata[j][7:0];
      end else begin
        for (int j = 0; j < MEM_BYTES; j++) begin
          int e;
          e = (j < nb) ? (sext ? int'($signed(shadow[a + j])) : int'(shadow[a + j])) : 0;
          checks++;
          if (int'(rdata[j]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL load addr=%0d j=%0d got %0d exp %0d", a, j, rdata[j], e);
          end
        end
      end
      @(negedge clk);
    end
    for (int i = 0; i < 8192; i++) begin
      checks++;
      if (u_mem.mem[i / 32][8 * (i % 32) +: 8] != shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL memory byte %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
