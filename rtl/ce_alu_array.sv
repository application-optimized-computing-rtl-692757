// ce_alu_array: the "map" functional units of a Convolution Engine slice.
//
// NALU (64) identical two-input fixed-point ALUs. Operand a comes from the
// data interface unit (1D / column / 2D shifted broadcast), operand b from
// the coefficient interface unit. All ALUs perform the same operation,
// selected by the map op set with SET_CE_OPS: multiply, absolute
// difference, add, subtract, compare (greater / less, giving 1 or 0),
// rounded average, or pass. Results are 2*DW bits wide so a 10x10 product
// is exact. The operation set follows the CE description (multipliers,
// absolute difference, add, subtract, compare; average for FME quarter-pel
// interpolation); the pass operation and the rounding of the average are
// choices of this design.
//
// Purely combinational; the slice registers the results (one cycle).
module ce_alu_array
  import ce_pkg::*;
(
  input  map_op_e op,
  input  data_t   a [NALU],
  input  data_t   b [NALU],
  output alu_t    y [NALU]
);

  for (genvar i = 0; i < NALU; i++) begin : g_alu
    alu_t sa, sb, diff;
    assign sa   = alu_t'(a[i]);
    assign sb   = alu_t'(b[i]);
    assign diff = sa - sb;
    always_comb begin
      unique case (op)
        MAP_MULT:    y[i] = sa * sb;
        MAP_ABSDIFF: y[i] = (diff < 0) ? -diff : diff;
        MAP_ADD:     y[i] = sa + sb;
        MAP_SUB:     y[i] = diff;
        MAP_CMPGT:   y[i] = (sa > sb) ? alu_t'(1) : alu_t'(0);
        MAP_CMPLT:   y[i] = (sa < sb) ? alu_t'(1) : alu_t'(0);
        MAP_AVG:     y[i] = (sa + sb + alu_t'(1)) >>> 1;
        default:     y[i] = sa;
      endcase
    end
  end

endmodule
