// tb_ime_sad_array: checks the IME SAD array. A 16x32 reference window and
// a 16x16 current block are loaded through the half-row/row ports; then a
// random walk of shifts in all four directions (with occasional reloads of
// single half rows) moves the window, and after every step a SAD is
// requested. sad16 and all sixteen 4x4 partial SADs are compared, one
// cycle later, with SADs computed from a model of the reference register.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ime_sad_array;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld_we, ld_half, sh_en, cur_we, sad_en, sad_valid;
  logic [3:0] ld_row, cur_row;
  logic [127:0] ld_data, cur_data;
  logic [1:0] sh_dir;
  logic [15:0] sad16;
  logic [11:0] sad4 [4][4];
  ime_sad_array dut (.*);
  int rf [16][32], cb [16][16];

  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic load_half(int r, bit h);
    @(negedge clk);
    ld_we = 1; ld_row = 4'(r); ld_half = h;
    for (int c = 0; c < 16; c++) begin
      rf[r][h * 16 + c] = $urandom_range(0, 255);
      ld_data[8*c +: 8] = 8'(rf[r][h * 16 + c]);
    end
    @(posedge clk); #1 ld_we = 0;
  endtask

  initial begin
    int dirs [4] = '{0, 0, 0, 0};
    {ld_we, ld_half, sh_en, cur_we, sad_en} = '0;
    ld_row = 0; cur_row = 0; ld_data = '0; cur_data = '0; sh_dir = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int r = 0; r < 16; r++) begin
        load_half(r, 0);
        load_half(r, 1);
        @(negedge clk);
        cur_we = 1; cur_row = 4'(r);
        for (int c = 0; c < 16; c++) begin
          cb[r][c] = (rep == 3 && c < 8) ? rf[r][c] : $urandom_range(0, 255);  // a zero-SAD quadrant
          cur_data[8*c +: 8] = 8'(cb[r][c]);
        end
        @(posedge clk); #1 cur_we = 0;
      end
      for (int st = 0; st < 200; st++) begin
        int d;
        if ($urandom_range(0, 9) == 0) load_half($urandom_range(0, 15), $urandom_range(0, 1));
        @(negedge clk);
        d = $urandom_range(0, 3);
        if (st == 0) d = -1;
        if (d >= 0) begin
          int nr [16][32];
          sh_en = 1; sh_dir = 2'(d); dirs[d]++;
          for (int r = 0; r < 16; r++) for (int c = 0; c < 32; c++)
            case (d)
              0: nr[r][c] = (c < 31) ? rf[r][c+1] : 0;
              1: nr[r][c] = (c > 0) ? rf[r][c-1] : 0;
              2: nr[r][c] = (r < 15) ? rf[r+1][c] : 0;
              default: nr[r][c] = (r > 0) ? rf[r-1][c] : 0;
            endcase
          rf = nr;
          @(posedge clk); #1 sh_en = 0;
          @(negedge clk);
        end
        sad_en = 1;
        @(posedge clk); #1 sad_en = 0;
        begin
          int s4 [4][4];
          int s;
          s = 0;
          s4 = '{default: 0};
          for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
            int ad;
            ad = rf[r][c] > cb[r][c] ? rf[r][c] - cb[r][c] : cb[r][c] - rf[r][c];
            s4[r/4][c/4] += ad; s += ad;
          end
          checks++;
          if (!sad_valid || sad16 != 16'(s)) begin failures++; if (failures < 5) $display("FAIL sad16 %0d exp %0d", sad16, s); end
          for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
            checks++;
            if (sad4[i][j] != 12'(s4[i][j])) failures++;
          end
        end
      end
    end
    for (int d = 0; d < 4; d++) begin checks++; if (dirs[d] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
