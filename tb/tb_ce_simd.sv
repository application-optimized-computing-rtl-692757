// tb_ce_simd: checks the 16-lane SIMD operations on output-register rows.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_simd;
  import ce_pkg::*;
  import tb_ce_util_pkg::*;
  int checks = 0, failures = 0;
  simd_op_e op;
  logic [3:0] ra, rb;
  logic [DW-1:0] imm;
  data_t rout [ROWS2D][COLS2D];
  data_t y [NLANE];

  ce_simd dut (.op(op), .row_a(ra), .row_b(rb), .imm(imm), .rout(rout), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      op = simd_op_e'(it % 8);
      ra = 4'($urandom); rb = 4'($urandom);
      imm = (op == SIMD_SHR) ? DW'($urandom_range(0, 9)) : DW'($urandom);
      for (int r = 0; r < ROWS2D; r++)
        for (int c = 0; c < COLS2D; c++) rout[r][c] = data_t'($urandom);
      #1;
      for (int l = 0; l < NLANE; l++) begin
        longint a, b, k, e;
        a = rout[ra][l]; b = rout[rb][l]; k = longint'(signed'(imm));
        case (op)
          SIMD_ADD:  e = a + b;
          SIMD_SUB:  e = a - b;
          SIMD_ADDC: e = a + k;
          SIMD_AVG:  e = (a + b + 1) >>> 1;
          SIMD_SHR:  e = a >>> imm[3:0];
          SIMD_MAX:  e = (a > b) ? a : b;
          SIMD_MIN:  e = (a < b) ? a : b;
          default:   e = a;
        endcase
        e = sat10(e);
        checks++;
        if (longint'(y[l]) != e) begin
          failures++;
          if (failures < 10) $display("op %s lane %0d y=%0d exp=%0d", op.name(), l, y[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
