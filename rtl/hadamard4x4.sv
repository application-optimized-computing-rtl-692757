// hadamard4x4: fixed-function SATD block for fractional motion estimation.
//
// FME scores candidate positions with the sum of absolute transformed
// differences: the 4x4 block of residues (current minus up-sampled
// reference) is transformed with the 4x4 Hadamard matrix H, T = H * D * H,
// and the absolute values of the 16 coefficients are summed. The
// residues are read from rows 0..3, columns 0..3 of a slice's output
// register, where the CE leaves them.
//
// Both 1D passes are butterflies (adds and subtracts only). in_valid
// starts a transform; satd and coef are registered and valid one cycle
// later with out_valid. The output is the plain sum of |T|; any final
// scaling (such as halving) is left to software.
//
// That FME uses a Hadamard transform on the residues, built as a
// fixed-function block next to the CE, follows the CE/FME description; the
// butterfly structure, widths and timing are choices of this design.
// Reset is asynchronous, active low.
module hadamard4x4
  import ce_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  data_t              d     [4][4],
  output logic               out_valid,
  output logic [17:0]        satd,
  output logic signed [15:0] coef  [4][4]
);

  typedef logic signed [15:0] hv_t;

  function automatic void h4(input hv_t x0, input hv_t x1, input hv_t x2, input hv_t x3,
                             output hv_t y0, output hv_t y1, output hv_t y2, output hv_t y3);
    hv_t s0, s1, d0, d1;
    s0 = x0 + x1;  d0 = x0 - x1;
    s1 = x2 + x3;  d1 = x2 - x3;
    y0 = s0 + s1;  y1 = d0 + d1;
    y2 = s0 - s1;  y3 = d0 - d1;
  endfunction

  hv_t t [4][4];
  hv_t u [4][4];
  logic [17:0] sum;

  always_comb begin
    for (int r = 0; r < 4; r++)
      h4(hv_t'(d[r][0]), hv_t'(d[r][1]), hv_t'(d[r][2]), hv_t'(d[r][3]),
         t[r][0], t[r][1], t[r][2], t[r][3]);
    for (int c = 0; c < 4; c++)
      h4(t[0][c], t[1][c], t[2][c], t[3][c], u[0][c], u[1][c], u[2][c], u[3][c]);
    sum = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        sum = sum + 18'(hv_t'((u[r][c] < 0) ? -u[r][c] : u[r][c]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      satd      <= '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) coef[r][c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        satd <= sum;
        coef <= u;
      end
    end
  end

endmodule
