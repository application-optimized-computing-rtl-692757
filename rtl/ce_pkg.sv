// ce_pkg: types and constants shared by the Convolution Engine (CE) blocks.
//
// The CE is a programmable "map and reduce" datapath for convolution-like
// image kernels. A slice has 64 short (10-bit) ALUs fed from shift-register
// files through interface units, followed by a tapped reduction tree. The
// sizes below are the slice sizes of the reference configuration: a 1x40
// 1D shift register, 16x18 2D input and output registers, a 16x16
// coefficient register and 64 ALUs. Data in the registers is signed 10-bit.
//
// The instruction word (ce_instr_t) is this design's own encoding of the
// CE instruction classes: configuration (SET_CE_OPS, SET_CE_OPSIZE),
// memory (LD_COEFF_REG, LD_1D_REG, LD_2D_REG, ST_OUT_REG), compute
// (CONVOLVE_1D_HOR, CONVOLVE_1D_VER, CONVOLVE_2D, SIMD) and permutation /
// fusion (EXE_SHUFFLE, EXE_FUSION). Field widths and codes are choices of
// this design; the instruction names and their meaning follow the CE ISA.
package ce_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DW      = 10;  // register / ALU data width
  localparam int unsigned NALU    = 64;  // ALUs per slice
  localparam int unsigned W1D     = 40;  // 1D shift register length
  localparam int unsigned ROWS2D  = 16;  // 2D input / output register rows
  localparam int unsigned COLS2D  = 18;  // 2D input / output register columns
  localparam int unsigned CROWS   = 16;  // coefficient register rows
  localparam int unsigned CCOLS   = 16;  // coefficient register columns
  localparam int unsigned MEMW    = 256; // widest memory access, bits
  localparam int unsigned MAXLD   = MEMW / 8; // most elements in one load
  localparam int unsigned AW      = 2 * DW;   // ALU result width
  localparam int unsigned RW      = AW + 6;   // reduction width (64:1 sum)
  localparam int unsigned NOUTMAX = 16;       // most results per compute
  localparam int unsigned NLANE   = 16;       // lightweight SIMD lanes

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [AW-1:0] alu_t;
  typedef logic signed [RW-1:0] red_t;

  // ----------------------------------------------------- map (ALU) operations
  typedef enum logic [2:0] {
    MAP_MULT    = 3'd0,  // a * b
    MAP_ABSDIFF = 3'd1,  // |a - b|
    MAP_ADD     = 3'd2,  // a + b
    MAP_SUB     = 3'd3,  // a - b
    MAP_CMPGT   = 3'd4,  // a > b  (1 / 0)
    MAP_CMPLT   = 3'd5,  // a < b  (1 / 0)
    MAP_AVG     = 3'd6,  // (a + b + 1) >> 1
    MAP_PASS    = 3'd7   // a
  } map_op_e;

  // ------------------------------------------------------ reduce operations
  typedef enum logic [1:0] {
    RED_ADD = 2'd0,  // summation
    RED_AND = 2'd1,  // logical AND (all non-zero)
    RED_MAX = 2'd2,
    RED_MIN = 2'd3
  } red_op_e;

  // reduction tap: how many ALU results fold into one output
  typedef enum logic [2:0] {
    TAP_4  = 3'd0,  // 4:1  -> 16 outputs
    TAP_8  = 3'd1,  // 8:1  ->  8 outputs
    TAP_16 = 3'd2,  // 16:1 ->  4 outputs
    TAP_32 = 3'd3,  // 32:1 ->  2 outputs
    TAP_64 = 3'd4   // 64:1 ->  1 output
  } tap_e;

  // convolution (stencil) size for the interface units
  typedef enum logic [1:0] {
    KS_4  = 2'd0,  // 1D: 4 taps,  2D: 4x4
    KS_8  = 2'd1,  // 1D: 8 taps,  2D: 8x8
    KS_16 = 2'd2   // 1D: 16 taps, 2D: not available on one slice
  } ksize_e;

  // interface-unit flow
  typedef enum logic [1:0] {
    FLOW_1D_HOR = 2'd0,
    FLOW_1D_VER = 2'd1,
    FLOW_2D     = 2'd2
  } flow_e;

  // memory access width
  typedef enum logic [1:0] {
    MW_64  = 2'd0,
    MW_128 = 2'd1,
    MW_256 = 2'd2
  } mwidth_e;

  // lightweight SIMD operations on output-register rows
  typedef enum logic [2:0] {
    SIMD_ADD   = 3'd0,  // dst = a + b
    SIMD_SUB   = 3'd1,  // dst = a - b
    SIMD_ADDC  = 3'd2,  // dst = a + imm
    SIMD_AVG   = 3'd3,  // dst = (a + b + 1) >> 1
    SIMD_SHR   = 3'd4,  // dst = a >>> imm
    SIMD_MAX   = 3'd5,
    SIMD_MIN   = 3'd6,
    SIMD_MOV   = 3'd7   // dst = a
  } simd_op_e;

  // instruction opcodes
  typedef enum logic [3:0] {
    OP_NOP         = 4'd0,
    OP_SET_OPS     = 4'd1,   // map op, reduce op, normalisation shift
    OP_SET_OPSIZE  = 4'd2,   // kernel size and tap mask
    OP_LD_COEFF    = 4'd3,   // load a row of the coefficient register
    OP_LD_1D       = 4'd4,   // load (and shift) the 1D shift register
    OP_LD_2D       = 4'd5,   // load top row (and shift down) the 2D register
    OP_ST_OUT      = 4'd6,   // store top row of the output register
    OP_CONV_1D_HOR = 4'd7,
    OP_CONV_1D_VER = 4'd8,
    OP_CONV_2D     = 4'd9,
    OP_SIMD        = 4'd10,
    OP_EXE_SHUFFLE = 4'd11,  // CGFU data shuffle stage
    OP_EXE_FUSION  = 4'd12,  // CGFU instruction graph fusion stage
    OP_SET_FUSION  = 4'd13   // write one CGFU fusion-array configuration
  } ce_op_e;

  typedef struct packed {
    ce_op_e      op;
    logic [1:0]  slice;      // target slice in the CMP
    // configuration
    map_op_e     map_op;
    red_op_e     red_op;
    logic [4:0]  norm_shift; // right shift applied by the normaliser
    ksize_e      ksize;
    logic [15:0] mask;       // per-tap enable (1 = tap used)
    // memory
    logic [31:0] addr;       // byte address (generated by the processor)
    mwidth_e     width;
    logic        elem16;     // 1: 16-bit elements in memory, 0: 8-bit
    logic        sext;       // sign-extend 8-bit elements on load
    logic        interleave; // split even/odd elements into two registers
    logic        shift_en;   // shift register while writing
    logic [3:0]  row;        // coefficient row / SIMD row a / CGFU select
    // compute
    logic [5:0]  in_off;     // horizontal offset into the source register
    logic [3:0]  v_off;      // vertical (row) offset into the 2D register
    logic [4:0]  out_off;    // column where results are written
    logic        dst_in2d;   // write results to the 2D input register
    simd_op_e    simd_op;
    logic [3:0]  row_b;      // SIMD row b / CGFU destination
    logic [3:0]  row_d;      // SIMD destination row
    logic [DW-1:0] imm;      // SIMD constant / CGFU element shift
    logic [63:0] cfg;        // CGFU fusion-array configuration word
  } ce_instr_t;

  // ------------------------------------------------------------ helpers
  function automatic data_t sat_dw(input red_t v);
    localparam red_t MAXV = red_t'((1 << (DW-1)) - 1);
    localparam red_t MINV = -red_t'(1 << (DW-1));
    if (v > MAXV)      return data_t'(MAXV);
    else if (v < MINV) return data_t'(MINV);
    else               return data_t'(v);
  endfunction

  function automatic int unsigned ksize_taps(input ksize_e k);
    case (k)
      KS_4:    return 4;
      KS_8:    return 8;
      default: return 16;
    endcase
  endfunction

endpackage
