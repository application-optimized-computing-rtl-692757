// tb_ce_regfiles: drives every write path of the CE register files (1D
// shift loads, 2D row loads with shift-down, coefficient rows, output
// register loads, compute results, SIMD and CGFU rows) and compares all
// registers with a model after each cycle.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_regfiles;
  import ce_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld1d_we, ld1d_shift, ld2d_we, ld2d_shift, ldco_we, ldout_we, ldout_shift;
  logic [5:0] ld1d_ne, ld2d_ne, ldco_ne, ldout_ne;
  logic [4:0] ld2d_col, ldout_col, res_col, res_n;
  logic [3:0] ldco_row, simd_row;
  data_t ld1d_data [MAXLD], ld2d_data [MAXLD], ldco_data [MAXLD], ldout_data [MAXLD];
  logic res_we, res_to_in2d, res_shift, simd_we, fus_we;
  data_t res_data [NOUTMAX], simd_data [NLANE], fus_a [NLANE], fus_b [NLANE];
  data_t r1d [W1D], r2d [ROWS2D][COLS2D], rco [CROWS][CCOLS], rout [ROWS2D][COLS2D];
  data_t m1d [W1D], m2d [ROWS2D][COLS2D], mco [CROWS][CCOLS], mout [ROWS2D][COLS2D];

  ce_regfiles dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    {ld1d_we, ld2d_we, ldco_we, ldout_we, res_we, simd_we, fus_we} = '0;
  endtask

  task automatic compare();
    for (int c = 0; c < W1D; c++) begin checks++; if (r1d[c] != m1d[c]) failures++; end
    for (int r = 0; r < ROWS2D; r++)
      for (int c = 0; c < COLS2D; c++) begin
        checks += 2;
        if (r2d[r][c] != m2d[r][c]) failures++;
        if (rout[r][c] != mout[r][c]) failures++;
      end
    for (int r = 0; r < CROWS; r++)
      for (int c = 0; c < CCOLS; c++) begin checks++; if (rco[r][c] != mco[r][c]) failures++; end
  endtask

  initial begin
    idle();
    {ld1d_shift, ld2d_shift, ldout_shift, res_to_in2d, res_shift} = '0;
    for (int c = 0; c < W1D; c++) m1d[c] = '0;
    for (int r = 0; r < ROWS2D; r++)
      for (int c = 0; c < COLS2D; c++) begin m2d[r][c] = '0; mout[r][c] = '0; end
    for (int r = 0; r < CROWS; r++) for (int c = 0; c < CCOLS; c++) mco[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int kind;
      @(negedge clk);
      idle();
      kind = $urandom_range(0, 6);
      for (int i = 0; i < MAXLD; i++) begin
        ld1d_data[i] = data_t'($urandom); ld2d_data[i] = data_t'($urandom);
        ldco_data[i] = data_t'($urandom); ldout_data[i] = data_t'($urandom);
      end
      for (int i = 0; i < NOUTMAX; i++) res_data[i] = data_t'($urandom);
      for (int i = 0; i < NLANE; i++) begin
        simd_data[i] = data_t'($urandom); fus_a[i] = data_t'($urandom); fus_b[i] = data_t'($urandom);
      end
      case (kind)
        0: begin
          ld1d_we = 1; ld1d_shift = $urandom; ld1d_ne = 6'(8 << $urandom_range(0, 2));
          begin
            data_t n [W1D];
            for (int c = 0; c < W1D; c++)
              if (c >= W1D - ld1d_ne) n[c] = ld1d_data[c - (W1D - ld1d_ne)];
              else n[c] = ld1d_shift ? m1d[c + ld1d_ne] : m1d[c];
            m1d = n;
          end
        end
        1, 2: begin
          bit to_out;
          to_out = (kind == 2);
          if (!to_out) begin
            ld2d_we = 1; ld2d_shift = $urandom; ld2d_col = 5'($urandom_range(0, 4));
            ld2d_ne = 6'(8 << $urandom_range(0, 1));
          end else begin
            ldout_we = 1; ldout_shift = $urandom; ldout_col = 5'($urandom_range(0, 4));
            ldout_ne = 6'(8 << $urandom_range(0, 1));
          end
          for (int r = ROWS2D - 1; r >= 1; r--)
            if (!to_out && ld2d_shift) m2d[r] = m2d[r-1];
            else if (to_out && ldout_shift) mout[r] = mout[r-1];
          for (int i = 0; i < 16; i++) begin
            if (!to_out && i < ld2d_ne && ld2d_col + i < COLS2D) m2d[0][ld2d_col + i] = ld2d_data[i];
            if (to_out && i < ldout_ne && ldout_col + i < COLS2D) mout[0][ldout_col + i] = ldout_data[i];
          end
        end
        3: begin
          ldco_we = 1; ldco_row = 4'($urandom); ldco_ne = 6'(8 << $urandom_range(0, 1));
          for (int i = 0; i < ldco_ne; i++) mco[ldco_row][i] = ldco_data[i];
        end
        4: begin
          res_we = 1; res_to_in2d = $urandom; res_shift = $urandom;
          res_col = 5'($urandom_range(0, 8)); res_n = 5'(1 << $urandom_range(0, 4));
          for (int r = ROWS2D - 1; r >= 1; r--)
            if (res_shift) begin
              if (res_to_in2d) m2d[r] = m2d[r-1]; else mout[r] = mout[r-1];
            end
          for (int i = 0; i < res_n; i++)
            if (res_col + i < COLS2D) begin
              if (res_to_in2d) m2d[0][res_col + i] = res_data[i];
              else mout[0][res_col + i] = res_data[i];
            end
        end
        5: begin
          simd_we = 1; simd_row = 4'($urandom);
          for (int i = 0; i < NLANE; i++) mout[simd_row][i] = simd_data[i];
        end
        default: begin
          fus_we = 1;
          for (int i = 0; i < NLANE; i++) begin mout[0][i] = fus_a[i]; mout[1][i] = fus_b[i]; end
        end
      endcase
      @(posedge clk);
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
