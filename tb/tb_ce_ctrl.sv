// tb_ce_ctrl: self-checking test of the slice controller.
// Sends a random instruction stream; the testbench plays the load/store unit
// and answers each start with `done` after a random 1..4 cycles. It checks
// that configuration instructions update the configuration, that
// convolution/SIMD strobes fire in the accepting cycle, that loads and
// stores hold cmd_ready low until done, that the register write strobe of a
// load fires exactly on the done cycle with the held instruction on `ex`,
// and that a command is accepted every cycle when only single-cycle
// instructions are sent.
module tb_ce_ctrl;
  import ce_pkg::*;

  logic clk = 0, rst_n = 1;
  logic cmd_valid = 0;
  ce_instr_t cmd;
  logic cmd_ready;
  ce_cfg_t cfg;
  ce_instr_t ex;
  logic lsu_start, lsu_done = 0;
  logic ld1d_we, ld2d_we, ldcf_we, conv_we, simd_we;
  int checks = 0, failures = 0;

  ce_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce_cfg_t exp_cfg;
    int lat, accepted, cycles;
    cmd = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    exp_cfg = cfg;
    for (int it = 0; it < 300; it++) begin
      cmd = ce_instr_t'({$urandom, $urandom, $urandom, $urandom});
      cmd.op = opcode_e'($urandom_range(0, 10));
      cmd_valid = 1;
      #1;
      check(cmd_ready, "ready when idle");
      check(lsu_start == (cmd.op inside {OP_LD_COEFF, OP_LD_1D, OP_LD_2D, OP_ST_OUT}), "lsu_start");
      check(conv_we == (cmd.op inside {OP_CONV_HOR, OP_CONV_VER, OP_CONV_2D}), "conv_we");
      check(simd_we == (cmd.op == OP_SIMD), "simd_we");
      check(ex == cmd, "ex follows cmd when idle");
      if (cmd.op == OP_SET_OPS) begin exp_cfg.map_op = cmd.map_op; exp_cfg.red_op = cmd.red_op; end
      if (cmd.op == OP_SET_SIZE) begin
        exp_cfg.ksize = cmd.ksize; exp_cfg.mask = cmd.imm; exp_cfg.norm = cmd.norm; exp_cfg.sat_u8 = cmd.sat_u8;
      end
      @(negedge clk);
      check(cfg == exp_cfg, "configuration");
      if (cmd.op inside {OP_LD_COEFF, OP_LD_1D, OP_LD_2D, OP_ST_OUT}) begin
        ce_instr_t held;
        held = cmd;
        cmd = ce_instr_t'({$urandom, $urandom, $urandom, $urandom});   // bus garbage after accept
        cmd_valid = 0;
        lat = $urandom_range(1, 4);
        repeat (lat - 1) begin
          #1;
          check(!cmd_ready, "busy while memory access runs");
          check(!(ld1d_we || ld2d_we || ldcf_we), "no early load write");
          check(ex == held, "ex holds the memory instruction");
          @(negedge clk);
        end
        lsu_done = 1;
        #1;
        check(ld1d_we == (held.op == OP_LD_1D) && ld2d_we == (held.op == OP_LD_2D) &&
              ldcf_we == (held.op == OP_LD_COEFF), "load write on done");
        @(negedge clk);
        lsu_done = 0;
        #1;
        check(cmd_ready, "ready after done");
      end
      cmd_valid = 0;
      @(negedge clk);
    end
    // back-to-back single-cycle instructions: one per cycle
    accepted = 0;
    cycles = 0;
    cmd = '0;
    cmd.op = OP_CONV_2D;
    cmd_valid = 1;
    repeat (20) begin
      #1;
      if (cmd_valid && cmd_ready) accepted++;
      cycles++;
      @(negedge clk);
    end
    cmd_valid = 0;
    check(accepted == cycles, "one convolution per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
