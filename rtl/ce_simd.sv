// ce_simd: the lightweight 16-lane SIMD unit of a Convolution Engine slice.
//
// It treats the 2D output register as a vector register file: one
// instruction reads rows row_a and row_b (columns 0..15), applies the same
// operation in all 16 lanes and writes the result row row_d. Only cheap
// operations are provided (add, subtract, add constant, rounded average,
// arithmetic shift right, max, min, move); there is no multiplier. Results
// saturate to the signed DW-bit register format.
//
// The 16-lane width, the use of the output register and the restriction to
// add/subtract-class operations follow the CE description; the exact
// operation list and saturation are choices of this design. Combinational:
// the slice writes the result row at the next clock edge.
module ce_simd
  import ce_pkg::*;
(
  input  simd_op_e      op,
  input  logic [3:0]    row_a,
  input  logic [3:0]    row_b,
  input  logic [DW-1:0] imm,
  input  data_t         rout [ROWS2D][COLS2D],
  output data_t         y    [NLANE]
);

  for (genvar l = 0; l < NLANE; l++) begin : g_lane
    red_t va, vb, vi;
    assign va = red_t'(rout[row_a][l]);
    assign vb = red_t'(rout[row_b][l]);
    assign vi = red_t'(signed'(imm));
    always_comb begin
      unique case (op)
        SIMD_ADD:  y[l] = sat_dw(va + vb);
        SIMD_SUB:  y[l] = sat_dw(va - vb);
        SIMD_ADDC: y[l] = sat_dw(va + vi);
        SIMD_AVG:  y[l] = sat_dw((va + vb + red_t'(1)) >>> 1);
        SIMD_SHR:  y[l] = sat_dw(va >>> imm[3:0]);
        SIMD_MAX:  y[l] = sat_dw((va > vb) ? va : vb);
        SIMD_MIN:  y[l] = sat_dw((va < vb) ? va : vb);
        default:   y[l] = sat_dw(va);
      endcase
    end
  end

endmodule
