// ce_regfiles: the register files of a Convolution Engine slice.
//
//   1D shift register     1 x W1D (40) elements. A load writes ne new
//                         elements at the right end; with shift_en the
//                         register first shifts left by ne elements, so the
//                         stencil slides along an image row.
//   2D input register     ROWS2D x COLS2D (16 x 18). A load or a compute
//                         result writes row 0 from column col on; with
//                         shift_en all rows first move down by one, so the
//                         stencil slides down the image.
//   Coefficient register  CROWS x CCOLS (16 x 16). A load writes one row.
//                         Holds data that stays fixed while the stencil moves
//                         (filter taps, the current block for SAD, centre
//                         pixels for min/max).
//   Output register       ROWS2D x COLS2D (16 x 18). Compute results are
//                         written to row 0 (optionally shifting rows down
//                         first); it is also the vector register file of the
//                         SIMD unit (row-wise access) and receives the two
//                         fusion-array result rows of the CGFU.
//
// All elements are read in parallel by the interface units. Writes take
// effect at the clock edge; the slice never issues two writes to the same
// register in one cycle, but if it did the later statement below wins.
// Sizes and the shift behaviour follow the CE description; which end of
// the 1D register receives data, the column-offset write and the reset to
// zero are choices of this design. Reset is asynchronous, active low.
module ce_regfiles
  import ce_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // loads from the load/store unit
  input  logic        ld1d_we,
  input  logic        ld1d_shift,
  input  logic [5:0]  ld1d_ne,
  input  data_t       ld1d_data [MAXLD],
  input  logic        ld2d_we,
  input  logic        ld2d_shift,
  input  logic [4:0]  ld2d_col,
  input  logic [5:0]  ld2d_ne,
  input  data_t       ld2d_data [MAXLD],
  input  logic        ldco_we,
  input  logic [3:0]  ldco_row,
  input  logic [5:0]  ldco_ne,
  input  data_t       ldco_data [MAXLD],
  input  logic        ldout_we,
  input  logic        ldout_shift,
  input  logic [4:0]  ldout_col,
  input  logic [5:0]  ldout_ne,
  input  data_t       ldout_data [MAXLD],
  // compute results (reduction tree)
  input  logic        res_we,
  input  logic        res_to_in2d,
  input  logic        res_shift,
  input  logic [4:0]  res_col,
  input  logic [4:0]  res_n,
  input  data_t       res_data [NOUTMAX],
  // SIMD row write
  input  logic        simd_we,
  input  logic [3:0]  simd_row,
  input  data_t       simd_data [NLANE],
  // CGFU result pair (rows 0 and 1 of the output register)
  input  logic        fus_we,
  input  data_t       fus_a [NLANE],
  input  data_t       fus_b [NLANE],
  // parallel read
  output data_t       r1d  [W1D],
  output data_t       r2d  [ROWS2D][COLS2D],
  output data_t       rco  [CROWS][CCOLS],
  output data_t       rout [ROWS2D][COLS2D]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < W1D; c++) r1d[c] <= '0;
      for (int r = 0; r < ROWS2D; r++)
        for (int c = 0; c < COLS2D; c++) begin
          r2d[r][c]  <= '0;
          rout[r][c] <= '0;
        end
      for (int r = 0; r < CROWS; r++)
        for (int c = 0; c < CCOLS; c++) rco[r][c] <= '0;
    end else begin
      // ---------------- 1D shift register
      if (ld1d_we) begin
        for (int c = 0; c < W1D; c++) begin
          int src;
          src = c + int'(ld1d_ne);
          if (c >= W1D - int'(ld1d_ne))
            r1d[c] <= ld1d_data[c - (W1D - int'(ld1d_ne))];
          else if (ld1d_shift)
            r1d[c] <= r1d[src];
        end
      end
      // ---------------- 2D input register (load or compute result)
      if (ld2d_we || (res_we && res_to_in2d)) begin
        if (ld2d_we ? ld2d_shift : res_shift)
          for (int r = 1; r < ROWS2D; r++) r2d[r] <= r2d[r-1];
        for (int c = 0; c < COLS2D; c++) begin
          if (ld2d_we) begin
            if (c >= int'(ld2d_col) && c < int'(ld2d_col) + int'(ld2d_ne))
              r2d[0][c] <= ld2d_data[c - int'(ld2d_col)];
          end else begin
            if (c >= int'(res_col) && c < int'(res_col) + int'(res_n))
              r2d[0][c] <= res_data[c - int'(res_col)];
          end
        end
      end
      // ---------------- coefficient register
      if (ldco_we)
        for (int c = 0; c < CCOLS; c++)
          if (c < int'(ldco_ne)) rco[ldco_row][c] <= ldco_data[c];
      // ---------------- output register
      if (ldout_we || (res_we && !res_to_in2d)) begin
        if (ldout_we ? ldout_shift : res_shift)
          for (int r = 1; r < ROWS2D; r++) rout[r] <= rout[r-1];
        for (int c = 0; c < COLS2D; c++) begin
          if (ldout_we) begin
            if (c >= int'(ldout_col) && c < int'(ldout_col) + int'(ldout_ne))
              rout[0][c] <= ldout_data[c - int'(ldout_col)];
          end else begin
            if (c >= int'(res_col) && c < int'(res_col) + int'(res_n))
              rout[0][c] <= res_data[c - int'(res_col)];
          end
        end
      end
      if (simd_we)
        for (int c = 0; c < NLANE; c++) rout[simd_row][c] <= simd_data[c];
      if (fus_we)
        for (int c = 0; c < NLANE; c++) begin
          rout[0][c] <= fus_a[c];
          rout[1][c] <= fus_b[c];
        end
    end
  end

endmodule
