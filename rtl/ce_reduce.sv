// ce_reduce: reduction tree and normaliser of a Convolution Engine slice.
//
// The 64 ALU results are folded pairwise by a six-level tree whose nodes all
// perform the reduce operation set with SET_CE_OPS: summation, logical AND
// (a result is 1 when every input is non-zero), maximum or minimum. Outputs
// can be tapped after 4:1, 8:1, 16:1, 32:1 or 64:1 reduction, so a 4-tap
// kernel gives 16 results per instruction and a 4x4 or 16-tap kernel gives
// four. ALU lanes whose enable bit is clear (the tap mask of SET_CE_OPSIZE)
// are replaced by the identity of the reduce operation before the tree.
// Each tapped result is then normalised: arithmetic right shift by
// norm_shift and saturation to the signed DW-bit register format.
//
// The tapped tree and the supported tap points follow the CE description;
// the identity-masking, shift-then-saturate normalisation and the node
// widths are choices of this design. Combinational; the slice writes the
// results to the output register in the cycle after the ALU stage.
// A simulator that treats the level array lv as one signal may report it as
// circular logic; each level only reads the level before it, so there is
// no combinational loop.
module ce_reduce
  import ce_pkg::*;
(
  input  red_op_e     op,
  input  tap_e        tap,
  input  logic [4:0]  norm_shift,
  input  logic [NALU-1:0] lane_en,
  input  alu_t        y [NALU],
  output data_t       res [NOUTMAX],
  output red_t        raw [NOUTMAX],   // un-normalised tapped values
  output logic [4:0]  nres             // number of valid results
);

  localparam int unsigned LEVELS = $clog2(NALU);  // 6

  red_t lv [LEVELS+1][NALU];

  function automatic red_t node(input red_op_e o, input red_t x, input red_t z);
    unique case (o)
      RED_ADD: return x + z;
      RED_AND: return ((x != 0) && (z != 0)) ? red_t'(1) : red_t'(0);
      RED_MAX: return (x > z) ? x : z;
      default: return (x < z) ? x : z;
    endcase
  endfunction

  function automatic red_t ident(input red_op_e o);
    unique case (o)
      RED_ADD: return red_t'(0);
      RED_AND: return red_t'(1);
      RED_MAX: return {1'b1, {(RW-1){1'b0}}};
      default: return {1'b0, {(RW-1){1'b1}}};
    endcase
  endfunction

  // level 0: masked lanes carry the identity
  for (genvar i = 0; i < NALU; i++) begin : g_leaf
    assign lv[0][i] = lane_en[i] ? ((op == RED_AND) ? ((y[i] != 0) ? red_t'(1) : red_t'(0))
                                                    : red_t'(y[i]))
                                 : ident(op);
  end

  // levels 1..6: one node per pair, unused upper entries tied to zero
  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    for (genvar i = 0; i < NALU; i++) begin : g_node
      if (i < (NALU >> l)) begin : g_used
        assign lv[l][i] = node(op, lv[l-1][2*i], lv[l-1][2*i+1]);
      end else begin : g_unused
        assign lv[l][i] = '0;
      end
    end
  end

  // tap point select
  always_comb begin
    unique case (tap)
      TAP_4:   nres = 5'(NALU / 4  > NOUTMAX ? NOUTMAX : NALU / 4);
      TAP_8:   nres = 5'(NALU / 8  > NOUTMAX ? NOUTMAX : NALU / 8);
      TAP_16:  nres = 5'(NALU / 16);
      TAP_32:  nres = 5'(NALU / 32);
      default: nres = 5'(NALU / 64);
    endcase
    for (int j = 0; j < NOUTMAX; j++) begin
      unique case (tap)
        TAP_4:   raw[j] = lv[2][j];
        TAP_8:   raw[j] = (j < NALU / 8)  ? lv[3][j] : red_t'(0);
        TAP_16:  raw[j] = (j < NALU / 16) ? lv[4][j] : red_t'(0);
        TAP_32:  raw[j] = (j < NALU / 32) ? lv[5][j] : red_t'(0);
        default: raw[j] = (j < NALU / 64) ? lv[6][j] : red_t'(0);
      endcase
      res[j] = sat_dw(raw[j] >>> norm_shift);
    end
  end

endmodule
