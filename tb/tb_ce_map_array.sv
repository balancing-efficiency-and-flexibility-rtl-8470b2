// tb_ce_map_array: self-checking test of the 64-lane map ALU array.
// Drives random signed 10-bit operands for every map operation and compares
// each lane with a reference computed in plain integer arithmetic.
module tb_ce_map_array;
  import ce_pkg::*;

  map_op_e op;
  elem_t   a [NLANE];
  elem_t   b [NLANE];
  map_t    y [NLANE];
  int checks = 0, failures = 0;

  ce_map_array dut (.op, .a, .b, .y);

  function automatic int ref_alu(map_op_e f, int x, int z);
    case (f)
      MAP_MUL:     return x * z;
      MAP_ABSDIFF: return (x > z) ? x - z : z - x;
      MAP_ADD:     return x + z;
      MAP_SUB:     return x - z;
      MAP_CMPGT:   return (x > z) ? 1 : 0;
      MAP_CMPLT:   return (x < z) ? 1 : 0;
      MAP_AVG:     return (x + z + 1) >>> 1;
      default:     return x;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 40; it++) begin
      for (int o = 0; o < 8; o++) begin
        op = map_op_e'(o);
        for (int l = 0; l < NLANE; l++) begin
          a[l] = elem_t'($urandom);
          b[l] = elem_t'($urandom);
        end
        if (it == 0) begin a[0] = -512; b[0] = -512; a[1] = 511; b[1] = -512; end
        #1;
        for (int l = 0; l < NLANE; l++) begin
          checks++;
          if (int'(y[l]) != ref_alu(op, int'(a[l]), int'(b[l]))) begin
            failures++;
            if (failures < 10) $display("FAIL op=%0d lane=%0d a=%0d b=%0d y=%0d", o, l, a[l], b[l], y[l]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
