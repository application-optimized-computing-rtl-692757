// ce_cgfu: complex graph fusion unit (CGFU) of Convolution Engine slices 0/1.
//
// The CGFU replaces a plain reduction with a small per-pixel program, so a
// kernel whose outputs combine inputs through a fixed graph of different
// operations (for example the gradient tests of demosaicing) runs as one
// fused instruction. It has two stages.
//
// Data shuffle (EXE_SHUFFLE). A shuffle network picks one of eight source
// rows (rows 0..3 of the 2D input register, rows 0..3 of the output
// register), an element shifter moves it by `shift` elements (optionally
// taking every second element, stride 2), and the 16 resulting elements are
// written to entry `dst` of the Data Shuffle Register (DSR, NDSR entries x
// 16 lanes). Several fused instructions can reuse what the DSR holds.
//
// Instruction graph fusion (EXE_FUSION). Two fusion arrays, A and B, run in
// every one of the 16 lanes. Each array is a chain of NFU (9) functional
// units. FU k takes its two operands from any DSR entry or from the result
// of an earlier FU of the same array (5-bit selects), applies add,
// subtract, absolute difference, min, max, rounded average or pass, and
// shifts the result right by 0..3. Each FU can be predicated on a bit of
// the lane's status register (A<B, A>B or A==B from the previous fusion);
// when the predicate is false the FU passes operand a. The last FU is the
// array's output. The comparator array compares the A and B outputs of
// every lane and loads the status register (when status_we is set, so a
// multi-step program can keep a decision), and both outputs go to the
// output register as a pair (A in row 0, B in row 1), saturated to DW bits.
// SET_FUSION writes one FU configuration word:
//   cfg[2:0] op, cfg[7:3] sel_a, cfg[12:8] sel_b, cfg[14:13] shift,
//   cfg[16:15] predicate (0 always, 1 if A<B, 2 if A>B, 3 if A==B).
//
// The two stages, the eight-row shuffle source, element shift, DSR, two
// fusion arrays, up to nine fused operations, predication and the
// comparator/status register follow the CE description. The chain-of-FUs
// topology with free operand selection, the DSR size, the operation set
// and the configuration encoding are this design's own, since the exact
// array structure is not specified. The fusion result is computed in one
// cycle (not pipelined). Reset is asynchronous, active low.
// A simulator that treats the per-lane pool array as one signal may report
// circular logic; FU k only reads pool entries below NDSR + k, so there is
// no combinational loop.
module ce_cgfu
  import ce_pkg::*;
#(
  parameter int unsigned NDSR = 16,  // data shuffle register entries
  parameter int unsigned NFU  = 9    // functional units per fusion array
) (
  input  logic        clk,
  input  logic        rst_n,
  // data shuffle stage
  input  logic        shuf_en,
  input  logic [2:0]  shuf_src,
  input  logic [4:0]  shuf_shift,
  input  logic        shuf_stride2,
  input  logic [3:0]  shuf_dst,
  input  data_t       in_rows  [4][COLS2D],
  input  data_t       out_rows [4][COLS2D],
  // configuration
  input  logic        cfg_we,
  input  logic        cfg_arr,
  input  logic [3:0]  cfg_fu,
  input  logic [16:0] cfg_word,
  // fusion stage
  input  logic        fuse_en,
  input  logic        status_we,   // let this fusion reload the status register
  output data_t       fus_a [NLANE],
  output data_t       fus_b [NLANE],
  output logic [2:0]  status [NLANE]   // {eq, gt, lt} per lane
);

  typedef enum logic [2:0] {
    FU_ADD = 3'd0, FU_SUB = 3'd1, FU_ABSDIFF = 3'd2, FU_MIN = 3'd3,
    FU_MAX = 3'd4, FU_AVG = 3'd5, FU_PASSA = 3'd6, FU_PASSB = 3'd7
  } fu_op_e;

  typedef struct packed {
    logic [1:0] pred;
    logic [1:0] shr;
    logic [4:0] sel_b;
    logic [4:0] sel_a;
    fu_op_e     op;
  } fu_cfg_t;

  typedef logic signed [15:0] fv_t;   // internal fusion width

  data_t   dsr [NDSR][NLANE];
  fu_cfg_t cfg [2][NFU];

  // ------------------------------------------------ shuffle network
  data_t shuf_row [NLANE];
  always_comb begin
    data_t src [COLS2D];
    int idx;
    src = shuf_src[2] ? out_rows[shuf_src[1:0]] : in_rows[shuf_src[1:0]];
    for (int l = 0; l < NLANE; l++) begin
      idx = int'(shuf_shift) + (shuf_stride2 ? 2 * l : l);
      shuf_row[l] = (idx < COLS2D) ? src[idx] : '0;
    end
  end

  // ------------------------------------------------ fusion arrays
  // The result and operand selections are written as AND-OR masks rather
  // than multiplexers: all operations of an FU are computed side by side
  // and exactly one is enabled, which is what the hardware does anyway and
  // keeps synthesis from searching for sharing between the 288 FUs.
  function automatic fv_t fu_eval(input fu_cfg_t c, input fv_t a, input fv_t b,
                                  input logic [2:0] st);
    fv_t s_add, s_sub, s_rsub, s_avg, r, mn, mx, ad;
    logic lt, en;
    s_add  = a + b;
    s_sub  = a - b;
    s_rsub = b - a;
    s_avg  = (s_add >>> 1) + fv_t'(s_add[0]);
    lt     = (a < b);
    mn     = ({16{lt}} & a) | ({16{!lt}} & b);
    mx     = ({16{lt}} & b) | ({16{!lt}} & a);
    ad     = ({16{lt}} & s_rsub) | ({16{!lt}} & s_sub);
    r = ({16{c.op == FU_ADD}}     & s_add)
      | ({16{c.op == FU_SUB}}     & s_sub)
      | ({16{c.op == FU_ABSDIFF}} & ad)
      | ({16{c.op == FU_MIN}}     & mn)
      | ({16{c.op == FU_MAX}}     & mx)
      | ({16{c.op == FU_AVG}}     & s_avg)
      | ({16{c.op == FU_PASSA}}   & a)
      | ({16{c.op == FU_PASSB}}   & b);
    r = r >>> c.shr;
    en = (c.pred == 2'd0) | ((c.pred == 2'd1) & st[0]) | ((c.pred == 2'd2) & st[1])
       | ((c.pred == 2'd3) & st[2]);
    return ({16{en}} & r) | ({16{!en}} & a);
  endfunction

  function automatic data_t sat16(input fv_t v);
    return sat_dw(red_t'(v));
  endfunction

  // Each FU's operand multiplexers only see the DSR and the FUs before it,
  // so the chain has no structural feedback.
  fv_t res [2][NLANE];
  for (genvar arr = 0; arr < 2; arr++) begin : g_arr
    for (genvar l = 0; l < NLANE; l++) begin : g_lane
      fv_t pool [NDSR + NFU];
      for (genvar e = 0; e < NDSR; e++) begin : g_dsr
        assign pool[e] = fv_t'(dsr[e][l]);
      end
      for (genvar k = 0; k < NFU; k++) begin : g_fu
        fv_t va, vb;
        always_comb begin
          va = '0;
          vb = '0;
          for (int e = 0; e < NDSR + k; e++) begin
            va = va | ({16{int'(cfg[arr][k].sel_a) == e}} & pool[e]);
            vb = vb | ({16{int'(cfg[arr][k].sel_b) == e}} & pool[e]);
          end
        end
        assign pool[NDSR + k] = fu_eval(cfg[arr][k], va, vb, status[l]);
      end
      assign res[arr][l] = pool[NDSR + NFU - 1];
    end
  end

  for (genvar l = 0; l < NLANE; l++) begin : g_out
    assign fus_a[l] = sat16(res[0][l]);
    assign fus_b[l] = sat16(res[1][l]);
  end

  // ------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NDSR; e++)
        for (int l = 0; l < NLANE; l++) dsr[e][l] <= '0;
      for (int a = 0; a < 2; a++)
        for (int k = 0; k < NFU; k++) cfg[a][k] <= '0;
      for (int l = 0; l < NLANE; l++) status[l] <= '0;
    end else begin
      if (shuf_en)
        for (int l = 0; l < NLANE; l++) dsr[shuf_dst][l] <= shuf_row[l];
      if (cfg_we && int'(cfg_fu) < NFU)
        cfg[cfg_arr][cfg_fu] <= fu_cfg_t'(cfg_word);
      if (fuse_en && status_we)
        for (int l = 0; l < NLANE; l++)
          status[l] <= {res[0][l] == res[1][l], res[0][l] > res[1][l], res[0][l] < res[1][l]};
    end
  end

endmodule
