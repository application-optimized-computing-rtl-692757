// tb_ce_util_pkg: helpers shared by the Convolution Engine testbenches:
// builders for CE instruction words and a software model of the
// convolution flows used to compute expected results.
//
// This is a test helper of this design, not part of the described hardware.
package tb_ce_util_pkg;
  import ce_pkg::*;

  function automatic ce_instr_t i_nop();
    ce_instr_t i;
    i = '0;
    i.op = OP_NOP;
    i.mask = '1;
    return i;
  endfunction

  function automatic ce_instr_t i_set_ops(map_op_e m, red_op_e r, int sh, int sl = 0);
    ce_instr_t i = i_nop();
    i.op = OP_SET_OPS; i.map_op = m; i.red_op = r; i.norm_shift = 5'(sh); i.slice = 2'(sl);
    return i;
  endfunction

  function automatic ce_instr_t i_set_size(ksize_e k, logic [15:0] mask, int sl = 0);
    ce_instr_t i = i_nop();
    i.op = OP_SET_OPSIZE; i.ksize = k; i.mask = mask; i.slice = 2'(sl);
    return i;
  endfunction

  function automatic ce_instr_t i_mem(ce_op_e op, logic [31:0] addr, mwidth_e w,
                                      bit e16 = 0, bit sx = 0, bit shift = 0,
                                      int row = 0, int col = 0, bit il = 0, int sl = 0);
    ce_instr_t i = i_nop();
    i.op = op; i.addr = addr; i.width = w; i.elem16 = e16; i.sext = sx;
    i.shift_en = shift; i.row = 4'(row); i.in_off = 6'(col); i.interleave = il;
    i.slice = 2'(sl);
    return i;
  endfunction

  function automatic ce_instr_t i_conv(ce_op_e op, int in_off, int v_off, int out_off,
                                       bit shift = 0, bit to2d = 0, int crow = 0, int sl = 0);
    ce_instr_t i = i_nop();
    i.op = op; i.in_off = 6'(in_off); i.v_off = 4'(v_off); i.out_off = 5'(out_off);
    i.shift_en = shift; i.dst_in2d = to2d; i.row = 4'(crow); i.slice = 2'(sl);
    return i;
  endfunction

  function automatic ce_instr_t i_simd(simd_op_e op, int ra, int rb, int rd, int imm, int sl = 0);
    ce_instr_t i = i_nop();
    i.op = OP_SIMD; i.simd_op = op; i.row = 4'(ra); i.row_b = 4'(rb); i.row_d = 4'(rd);
    i.imm = DW'(imm); i.slice = 2'(sl);
    return i;
  endfunction

  function automatic ce_instr_t i_shuffle(int src, int shift, int dst, bit stride2 = 0, int sl = 0);
    ce_instr_t i = i_nop();
    i.op = OP_EXE_SHUFFLE; i.row = 4'(src); i.imm = DW'(shift); i.row_b = 4'(dst);
    i.interleave = stride2; i.slice = 2'(sl);
    return i;
  endfunction

  // FU configuration word: op, sel_a, sel_b, shift, predicate
  function automatic logic [16:0] fu_word(int op, int sa, int sb, int shr = 0, int pred = 0);
    return {2'(pred), 2'(shr), 5'(sb), 5'(sa), 3'(op)};
  endfunction

  function automatic ce_instr_t i_set_fusion(int arr, int fu, logic [16:0] w, int sl = 0);
    ce_instr_t i = i_nop();
    i.op = OP_SET_FUSION; i.row_b = 4'(arr); i.row = 4'(fu); i.cfg = 64'(w); i.slice = 2'(sl);
    return i;
  endfunction

  function automatic ce_instr_t i_fusion(bit upd_status = 1, int sl = 0);
    ce_instr_t i = i_nop();
    i.op = OP_EXE_FUSION; i.shift_en = upd_status; i.slice = 2'(sl);
    return i;
  endfunction

  // software map and reduce
  function automatic longint map_f(map_op_e m, longint a, longint b);
    case (m)
      MAP_MULT:    return a * b;
      MAP_ABSDIFF: return (a > b) ? a - b : b - a;
      MAP_ADD:     return a + b;
      MAP_SUB:     return a - b;
      MAP_CMPGT:   return (a > b) ? 1 : 0;
      MAP_CMPLT:   return (a < b) ? 1 : 0;
      MAP_AVG:     return (a + b + 1) >>> 1;
      default:     return a;
    endcase
  endfunction

  function automatic longint sat10(longint v);
    if (v > 511) return 511;
    if (v < -512) return -512;
    return v;
  endfunction

endpackage
