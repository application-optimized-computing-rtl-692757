// tb_mv_cost: checks the motion-vector cost unit. The LUT is loaded with
// random bit counts through the write port, then random vector/predictor
// pairs (including differences beyond the LUT range, which clamp to the
// last entry) are compared, one cycle later, against
// lambda * (LUT[|mvx-px|] + LUT[|mvy-py|]).
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_mv_cost;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic lut_we, in_valid, out_valid;
  logic [5:0] lut_addr;
  logic [7:0] lut_wdata, lambda;
  logic signed [11:0] mv_x, mv_y, pred_x, pred_y;
  logic [16:0] cost;
  mv_cost dut (.*);
  int lut [64];

  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int ix(int a, int b);
    int m;
    m = (a > b) ? a - b : b - a;
    return (m > 63) ? 63 : m;
  endfunction

  initial begin
    int exp;
    bit pend;
    {lut_we, in_valid} = '0; lut_addr = 0; lut_wdata = 0; lambda = 0;
    mv_x = 0; mv_y = 0; pred_x = 0; pred_y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = 6'(i); lut_wdata = 8'($urandom_range(1, 40));
      lut[i] = lut_wdata;
    end
    @(negedge clk); lut_we = 0;
    pend = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (!out_valid || cost != 17'(exp)) begin failures++; if (failures < 5) $display("FAIL %0d exp %0d", cost, exp); end
      end
      in_valid = $urandom_range(0, 1);
      pend = in_valid;
      begin
        int r;
        r = (it % 4 == 0) ? 2047 : 40;
        mv_x = 12'($urandom_range(0, 2 * r) - r); pred_x = 12'($urandom_range(0, 2 * r) - r);
        mv_y = 12'($urandom_range(0, 2 * r) - r); pred_y = 12'($urandom_range(0, 2 * r) - r);
        lambda = 8'($urandom_range(0, 255));
        exp = int'(lambda) * (lut[ix(mv_x, pred_x)] + lut[ix(mv_y, pred_y)]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
