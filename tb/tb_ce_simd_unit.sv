// tb_ce_simd_unit: self-checking test of the 16-lane SIMD unit: every
// operation on random rows and constants, compared with an integer reference
// including saturation to the signed 10-bit range.
module tb_ce_simd_unit;
  import ce_pkg::*;

  simd_op_e    op;
  elem_t       va [SIMD_N];
  elem_t       vb [SIMD_N];
  logic [15:0] imm;
  elem_t       vy [SIMD_N];
  int checks = 0, failures = 0;

  ce_simd_unit dut (.op, .va, .vb, .imm, .vy);

  function automatic int sat(int v);
    return (v > 511) ? 511 : (v < -512) ? -512 : v;
  endfunction

  function automatic int ref_simd(simd_op_e f, int x, int z, int c);
    case (f)
      SIMD_ADD:  return sat(x + z);
      SIMD_SUB:  return sat(x - z);
      SIMD_ADDC: return sat(x + c);
      SIMD_SUBC: return sat(x - c);
      SIMD_MAX:  return (x > z) ? x : z;
      SIMD_MIN:  return (x < z) ? x : z;
      SIMD_THRC: return (x >= c) ? x : 0;
      default:   return z;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 100; it++) begin
      for (int o = 0; o < 8; o++) begin
        op = simd_op_e'(o);
        imm = 16'($urandom_range(0, 600)) - 16'd300;
        for (int i = 0; i < SIMD_N; i++) begin
          va[i] = elem_t'($urandom);
          vb[i] = elem_t'($urandom);
        end
        #1;
        for (int i = 0; i < SIMD_N; i++) begin
          checks++;
          if (int'(vy[i]) != ref_simd(op, int'(va[i]), int'(vb[i]), int'($signed(imm)))) begin
            failures++;
            if (failures < 10) $display("FAIL op=%0d a=%0d b=%0d imm=%0d y=%0d", o, va[i], vb[i], $signed(imm), vy[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
