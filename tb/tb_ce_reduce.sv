// tb_ce_reduce: checks the tapped reduction tree (add, AND, max, min at
// 4:1 .. 64:1), the lane mask and normalisation against a software model.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_reduce;
  import ce_pkg::*;
  import tb_ce_util_pkg::*;
  int checks = 0, failures = 0;
  red_op_e op;
  tap_e    tap;
  logic [4:0] sh;
  logic [NALU-1:0] en;
  alu_t  y [NALU];
  data_t res [NOUTMAX];
  red_t  raw [NOUTMAX];
  logic [4:0] nres;

  ce_reduce dut (.op(op), .tap(tap), .norm_shift(sh), .lane_en(en), .y(y),
                 .res(res), .raw(raw), .nres(nres));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      int g, n;
      op  = red_op_e'(it % 4);
      tap = tap_e'((it / 4) % 5);
      sh  = 5'($urandom_range(0, 8));
      en  = {$urandom, $urandom};
      if (it % 3 == 0) en = '1;
      for (int i = 0; i < NALU; i++)
        y[i] = (it % 2) ? alu_t'($urandom_range(0, 2)) : alu_t'($urandom);
      #1;
      g = 4 << int'(tap);
      n = NALU / g;
      checks++;
      if (int'(nres) != n) failures++;
      for (int j = 0; j < n; j++) begin
        longint acc, e;
        bit first;
        first = 1;
        acc = 0;
        for (int t = 0; t < g; t++) begin
          longint v;
          if (!en[j*g+t]) continue;
          v = longint'(y[j*g+t]);
          if (op == RED_AND) v = (v != 0);
          if (first) acc = v;
          else case (op)
            RED_ADD: acc = acc + v;
            RED_AND: acc = acc & v;
            RED_MAX: acc = (v > acc) ? v : acc;
            default: acc = (v < acc) ? v : acc;
          endcase
          first = 0;
        end
        if (first) case (op)          // no lane enabled: identity
          RED_ADD: acc = 0;
          RED_AND: acc = 1;
          RED_MAX: acc = -(longint'(1) << (RW-1));
          default: acc = (longint'(1) << (RW-1)) - 1;
        endcase
        e = sat10(acc >>> sh);
        checks++;
        if (longint'(res[j]) != e || longint'(raw[j]) != acc) begin
          failures++;
          if (failures < 10) $display("op %s tap %s j=%0d raw=%0d/%0d res=%0d/%0d",
                                      op.name(), tap.name(), j, raw[j], acc, res[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
