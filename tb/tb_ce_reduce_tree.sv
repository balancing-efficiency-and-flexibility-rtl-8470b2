// tb_ce_reduce_tree: self-checking test of the reduction tree.
// For every reduce operation and every tap (no reduction, 4:1 .. 64:1) it
// drives random map results and lane enables and compares each output with a
// sequential reduction of the same group computed in the testbench.
module tb_ce_reduce_tree;
  import ce_pkg::*;

  red_op_e          op;
  logic [2:0]       glog;
  map_t             x [NLANE];
  logic [NLANE-1:0] lane_en;
  acc_t             y [NLANE];
  int checks = 0, failures = 0;

  ce_reduce_tree dut (.op, .glog, .x, .lane_en, .y);

  function automatic longint ref_group(red_op_e f, int first, int n);
    longint acc;
    bit any_en;
    acc = (f == RED_AND) ? 1 : 0;
    any_en = 0;
    for (int i = first; i < first + n; i++) begin
      if (!lane_en[i]) continue;
      case (f)
        RED_ADD: acc += longint'(x[i]);
        RED_AND: acc = (acc != 0 && x[i] != 0) ? 1 : 0;
        RED_OR:  acc = (acc != 0 || x[i] != 0) ? 1 : 0;
        RED_MAX: acc = (!any_en || longint'(x[i]) > acc) ? longint'(x[i]) : acc;
        RED_MIN: acc = (!any_en || longint'(x[i]) < acc) ? longint'(x[i]) : acc;
        default: ;
      endcase
      any_en = 1;
    end
    if (!any_en && f == RED_MAX) acc = -(longint'(1) << (AW - 1));
    if (!any_en && f == RED_MIN) acc = (longint'(1) << (AW - 1)) - 1;
    return acc;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int taps [6] = '{0, 2, 3, 4, 5, 6};
    for (int it = 0; it < 30; it++) begin
      for (int o = 0; o < 5; o++) begin
        for (int t = 0; t < 6; t++) begin
          op = red_op_e'(o);
          glog = 3'(taps[t]);
          for (int l = 0; l < NLANE; l++) begin
            x[l] = map_t'($urandom);
            if (it % 3 == 0) x[l] = map_t'($urandom_range(0, 1));
            if (it == 1) x[l] = map_t'(2 ** (MW - 1) - 1);
          end
          lane_en = {$urandom, $urandom};
          if (it < 2) lane_en = '1;
          #1;
          if (glog == 0) begin
            for (int l = 0; l < NLANE; l++) begin
              checks++;
              if (longint'(y[l]) != longint'(x[l])) failures++;
            end
          end else begin
            for (int j = 0; j < (NLANE >> glog); j++) begin
              checks++;
              if (longint'(y[j]) != ref_group(op, j << glog, 1 << glog)) begin
                failures++;
                if (failures < 10) $display("FAIL op=%0d glog=%0d j=%0d y=%0d exp=%0d", o, glog, j, y[j], ref_group(op, j << glog, 1 << glog));
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
