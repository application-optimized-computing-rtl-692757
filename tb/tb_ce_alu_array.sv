// tb_ce_alu_array: checks every map operation of the 64-ALU array on random
// and corner operands against a software model.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_alu_array;
  import ce_pkg::*;
  import tb_ce_util_pkg::*;
  int checks = 0, failures = 0;
  map_op_e op;
  data_t a [NALU];
  data_t b [NALU];
  alu_t  y [NALU];

  ce_alu_array dut (.op(op), .a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 40; it++) begin
      for (int o = 0; o < 8; o++) begin
        op = map_op_e'(o);
        for (int i = 0; i < NALU; i++) begin
          a[i] = (it == 0) ? data_t'(i % 2 ? 511 : -512) : data_t'($urandom);
          b[i] = (it == 0) ? data_t'(i % 3 ? -512 : 511) : data_t'($urandom);
        end
        #1;
        for (int i = 0; i < NALU; i++) begin
          longint e;
          e = map_f(op, longint'(a[i]), longint'(b[i]));
          checks++;
          if (longint'(y[i]) != e) begin
            failures++;
            if (failures < 10) $display("op %s lane %0d a=%0d b=%0d y=%0d exp=%0d",
                                        op.name(), i, a[i], b[i], y[i], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
