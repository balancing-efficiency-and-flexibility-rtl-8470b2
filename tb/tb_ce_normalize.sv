// tb_ce_normalize: self-checking test of the normalise step (rounded right
// shift and clamp) against an integer reference, over random and corner
// inputs, every shift amount and both clamp modes.
module tb_ce_normalize;
  import ce_pkg::*;

  acc_t       x;
  logic [4:0] shift;
  logic       sat_u8;
  elem_t      y;
  int checks = 0, failures = 0;

  ce_normalize dut (.x, .shift, .sat_u8, .y);

  function automatic int ref_norm(longint v, int s, bit u8);
    longint r;
    r = (s == 0) ? v : ((v + (longint'(1) << (s - 1))) >>> s);
    if (u8) begin
      if (r < 0) r = 0;
      if (r > 255) r = 255;
    end else begin
      if (r < -512) r = -512;
      if (r > 511) r = 511;
    end
    return int'(r);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      x = acc_t'($urandom);
      if (it % 4 == 1) x = acc_t'($urandom_range(0, 2000)) - acc_t'(1000);
      if (it == 2) x = {1'b1, {(AW-1){1'b0}}};
      shift = 5'($urandom_range(0, 12));
      sat_u8 = it[0];
      #1;
      checks++;
      if (int'(y) != ref_norm(longint'(x), int'(shift), sat_u8)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d s=%0d u8=%0d y=%0d", x, shift, sat_u8, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
