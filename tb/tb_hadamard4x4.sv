// tb_hadamard4x4: checks the 4x4 Hadamard / SATD unit against a direct
// matrix product H*D*H (H the 4x4 Hadamard matrix in natural order) and the
// sum of absolute coefficients, for random signed residual blocks given on
// random cycles. Output must appear exactly one cycle after in_valid.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_hadamard4x4;
  import ce_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  data_t d [4][4];
  logic [17:0] satd;
  logic signed [15:0] coef [4][4];
  hadamard4x4 dut (.*);

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int hm(int i, int j);   // natural-order Hadamard entry
    return ($countones(i & j) % 2) ? -1 : 1;
  endfunction

  initial begin
    int exp_c [4][4];
    int exp_s;
    bit pend;
    in_valid = 0; d = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    pend = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (!out_valid || satd != 18'(exp_s)) begin failures++; $display("FAIL satd %0d exp %0d", satd, exp_s); end
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(coef[r][c]) != exp_c[r][c]) failures++;
        end
      end else begin
        checks++;
        if (out_valid) failures++;
      end
      in_valid = ($urandom_range(0, 3) != 0);
      pend = in_valid;
      if (in_valid) begin
        int lim;
        lim = (it % 3 == 0) ? 511 : 255;
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
          d[r][c] = data_t'($urandom_range(0, 2 * lim) - lim);
        exp_s = 0;
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
          int s;
          s = 0;
          for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
            s += hm(r, i) * int'(d[i][j]) * hm(j, c);
          exp_c[r][c] = s;
          exp_s += (s < 0) ? -s : s;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
