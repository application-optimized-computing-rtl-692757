// fme_upsampler: half-pixel up-sampling unit for H.264 fractional motion
// estimation (FME).
//
// Half-pixel samples are made with the separable 6-tap filter
// (1, -5, 20, 20, -5, 1). Each cycle one row of ten integer pixels
// p[0..9] enters (in_valid). Five row filters (RFIR) produce the five
// horizontal half-pixel values h[k] between p[k+2] and p[k+3] from
// p[k..k+5]. The unrounded h[k] and the integer pixels p[2..6] are pushed
// into ten column shift registers of six entries each (a new row shifts
// every column by one). Ten column filters (CFIR) read all six entries of
// every column at once and give, for the row position between window rows
// 2 and 3: the vertical half-pixels of the five integer columns (v_int)
// and the centre half-pixels of the five half columns (v_half). The
// horizontal half-pixels of window row 2 are given as h_row. One such
// output row is produced per input row once six rows are in (out_valid).
//
// Rounding: integer-column and horizontal results are (x + 16) >> 5, the
// centre samples, filtered twice, are (x + 512) >> 10; all are clipped to
// 0..255. Outputs are combinational from the column registers.
//
// The 6-tap filter, the 6-entry shift registers, the ten-pixel row input,
// RFIR row filters and CFIR column filters over six shift registers
// follow the FME description; the exact column assignment, the rounding
// (the H.264 rule) and the output alignment are choices of this design.
// Quarter-pixel samples are averages of neighbouring samples and are left
// to the averaging operations of the datapath that consumes these outputs.
// Reset is asynchronous, active low.
module fme_upsampler (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  p     [10],
  output logic        out_valid,
  output logic [7:0]  h_row [5],
  output logic [7:0]  v_int [5],
  output logic [7:0]  v_half[5]
);

  typedef logic signed [15:0] h_t;   // row-filter result
  typedef logic signed [21:0] v_t;   // column-filter result

  function automatic v_t fir6(input v_t x0, input v_t x1, input v_t x2,
                              input v_t x3, input v_t x4, input v_t x5);
    return x0 - 5 * x1 + 20 * x2 + 20 * x3 - 5 * x4 + x5;
  endfunction

  function automatic logic [7:0] clip8(input v_t x);
    return (x < 0) ? 8'd0 : (x > 255) ? 8'd255 : 8'(x);
  endfunction

  h_t hnew [5];
  always_comb
    for (int k = 0; k < 5; k++)
      hnew[k] = h_t'(fir6(v_t'(p[k]), v_t'(p[k+1]), v_t'(p[k+2]),
                          v_t'(p[k+3]), v_t'(p[k+4]), v_t'(p[k+5])));

  // column shift registers: entry 0 is the oldest row
  h_t          hcol [5][6];
  logic [7:0]  icol [5][6];
  logic [2:0]  fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 5; k++)
        for (int e = 0; e < 6; e++) begin
          hcol[k][e] <= '0;
          icol[k][e] <= '0;
        end
      fill <= '0;
    end else if (in_valid) begin
      for (int k = 0; k < 5; k++) begin
        for (int e = 0; e < 5; e++) begin
          hcol[k][e] <= hcol[k][e+1];
          icol[k][e] <= icol[k][e+1];
        end
        hcol[k][5] <= hnew[k];
        icol[k][5] <= p[k+2];
      end
      if (fill != 3'd6) fill <= fill + 3'd1;
    end
  end

  assign out_valid = (fill == 3'd6);

  always_comb
    for (int k = 0; k < 5; k++) begin
      h_row[k]  = clip8((v_t'(hcol[k][2]) + 16) >>> 5);
      v_int[k]  = clip8((fir6(v_t'(icol[k][0]), v_t'(icol[k][1]), v_t'(icol[k][2]),
                              v_t'(icol[k][3]), v_t'(icol[k][4]), v_t'(icol[k][5])) + 16) >>> 5);
      v_half[k] = clip8((fir6(v_t'(hcol[k][0]), v_t'(hcol[k][1]), v_t'(hcol[k][2]),
                              v_t'(hcol[k][3]), v_t'(hcol[k][4]), v_t'(hcol[k][5])) + 512) >>> 10);
    end

endmodule
