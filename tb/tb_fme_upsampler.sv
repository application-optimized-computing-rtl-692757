// tb_fme_upsampler: feeds rows of a random 8-bit image (ten pixels per row,
// with random idle cycles between rows) and checks, whenever six rows have
// entered, all fifteen outputs against direct 6-tap (1,-5,20,20,-5,1)
// filtering of the image: horizontal half-pixels of window row 2, vertical
// half-pixels of the five integer columns and the centre half-pixels
// (filtered horizontally then vertically at full precision), with H.264
// rounding and clipping. out_valid must be low before the sixth row.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_fme_upsampler;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [7:0] p [10];
  logic [7:0] h_row [5], v_int [5], v_half [5];
  fme_upsampler dut (.*);
  int img [$][10];

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int f6(int a, int b, int c, int d, int e, int f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction
  function automatic int clip(int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction

  initial begin
    int n_sat = 0;
    in_valid = 0; p = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rw = 0; rw < 3000; rw++) begin
      int row [10];
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      for (int c = 0; c < 10; c++) begin
        // smooth rows, sharp edges now and then (to reach the clipping)
        row[c] = (rw % 5 == 0) ? (($urandom_range(0, 1)) ? 255 : 0) : $urandom_range(0, 255);
        p[c] = 8'(row[c]);
      end
      img.push_back(row);
      in_valid = 1;
      @(posedge clk); #1 in_valid = 0;
      checks++;
      if (out_valid != (img.size() >= 6)) failures++;
      if (img.size() >= 6) begin
        int b;
        b = img.size() - 6;    // oldest row of the window
        for (int k = 0; k < 5; k++) begin
          int hs [6];
          int eh, ev, ec;
          eh = clip((f6(img[b+2][k], img[b+2][k+1], img[b+2][k+2], img[b+2][k+3], img[b+2][k+4], img[b+2][k+5]) + 16) >>> 5);
          ev = clip((f6(img[b][k+2], img[b+1][k+2], img[b+2][k+2], img[b+3][k+2], img[b+4][k+2], img[b+5][k+2]) + 16) >>> 5);
          for (int r = 0; r < 6; r++)
            hs[r] = f6(img[b+r][k], img[b+r][k+1], img[b+r][k+2], img[b+r][k+3], img[b+r][k+4], img[b+r][k+5]);
          ec = clip((f6(hs[0], hs[1], hs[2], hs[3], hs[4], hs[5]) + 512) >>> 10);
          if (ec == 0 || ec == 255) n_sat++;
          checks += 3;
          if (h_row[k] != 8'(eh)) begin failures++; if (failures < 5) $display("FAIL h %0d %0d", h_row[k], eh); end
          if (v_int[k] != 8'(ev)) begin failures++; if (failures < 5) $display("FAIL v %0d %0d", v_int[k], ev); end
          if (v_half[k] != 8'(ec)) begin failures++; if (failures < 5) $display("FAIL c %0d %0d", v_half[k], ec); end
        end
        if (img.size() > 8) img.pop_front();
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
