// tb_ce_slice: self-checking test of one Convolution Engine slice.
//
// A shadow model of the four register files and the data memory applies
// every instruction in program order when it is accepted (the slice's
// interlocks must make the pipelined hardware equivalent to that). The
// memory is tb_mem_model with random grant stalls and 1..3 cycle read
// latency. Parts:
//   1. A sliding 16-tap horizontal filter over an image row, written in the
//      style of a CE filter loop (load 256 bits, convolve four outputs per
//      instruction while shifting them into the output register, slide the
//      1D register by 128 bits), compared with a direct convolution.
//   2. Throughput and latency: 16 back-to-back convolutions must issue on
//      16 consecutive cycles, and a result must appear in the output
//      register exactly two clocks next_v its instruction is accepted.
//   3. Random programs: random map/reduce ops, kernel sizes, masks,
//      horizontal/vertical/2D convolutions, unaligned, interleaved, 8/16-bit
//      loads and stores, SIMD row operations. Register files are compared
//      with the model next_v each drain, memory at the end.
//   4. CGFU: shuffle rows into the DSR and run one fusion; rows 0 and 1 of
//      the output register are compared.
// Counters check that stalls, two-line accesses and interleaved loads
// were really exercised.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_slice;
  import ce_pkg::*;
  import tb_ce_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic instr_valid, instr_ready;
  ce_instr_t instr;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr;
  logic [255:0] mem_wdata, mem_rdata;
  logic [31:0] mem_wstrb;
  data_t out_reg [ROWS2D][COLS2D];

  ce_slice #(.HAS_CGFU(1'b1)) dut (.*);
  tb_mem_model #(.BYTES(4096), .STALLS(1'b1)) mem (
    .clk(clk), .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .wstrb(mem_wstrb), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  // ---------------------------------------------------------------- model
  longint m1d [W1D], m2d [ROWS2D][COLS2D], mco [CROWS][CCOLS], mout [ROWS2D][COLS2D];
  byte unsigned mb [4096];
  map_op_e m_map = MAP_MULT;
  red_op_e m_red = RED_ADD;
  int m_sh = 0;
  ksize_e m_ks = KS_4;
  logic [15:0] m_mask = '1;
  int stalls = 0, two_line = 0, n_il = 0, cyc = 0;

  always @(posedge clk) cyc++;

  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic int nbytes_of(mwidth_e w);
    return (w == MW_64) ? 8 : (w == MW_128) ? 16 : 32;
  endfunction

  function automatic void m_load(ce_instr_t i, output longint ea [32], output longint eb [32], output int ne);
    longint el [32];
    int nb;
    nb = nbytes_of(i.width);
    ne = i.elem16 ? nb / 2 : nb;
    for (int k = 0; k < 32; k++) begin
      el[k] = 0; ea[k] = 0; eb[k] = 0;
      if (k < ne) begin
        if (i.elem16) begin
          int v;
          v = mb[(i.addr + 2*k) % 4096] | (int'(mb[(i.addr + 2*k + 1) % 4096]) << 8);
          v = v & 1023;
          el[k] = (v >= 512) ? v - 1024 : v;
        end else begin
          el[k] = mb[(i.addr + k) % 4096];
          if (i.sext && el[k] >= 128) el[k] -= 256;
        end
      end
    end
    if (i.interleave) begin
      for (int k = 0; k < 16; k++) begin ea[k] = el[2*k]; eb[k] = el[2*k+1]; end
      ne = ne / 2;
    end else ea = el;
  endfunction

  function automatic void shift_down(ref longint r [ROWS2D][COLS2D]);
    for (int rr = ROWS2D - 1; rr > 0; rr--) r[rr] = r[rr-1];
  endfunction

  function automatic longint red_f(red_op_e o, longint x, longint z);
    case (o)
      RED_ADD: return x + z;
      RED_AND: return (x != 0 && z != 0) ? 1 : 0;
      RED_MAX: return x > z ? x : z;
      default: return x < z ? x : z;
    endcase
  endfunction

  task automatic m_apply(ce_instr_t i);
    case (i.op)
      OP_SET_OPS: begin m_map = i.map_op; m_red = i.red_op; m_sh = i.norm_shift; end
      OP_SET_OPSIZE: begin m_ks = i.ksize; m_mask = i.mask; end
      OP_LD_1D, OP_LD_2D, OP_LD_COEFF: begin
        longint ea [32], eb [32];
        int ne;
        m_load(i, ea, eb, ne);
        if (i.op == OP_LD_1D) begin
          longint n [W1D];
          for (int c = 0; c < W1D; c++)
            n[c] = (c >= W1D - ne) ? ea[c - (W1D - ne)] : (i.shift_en ? m1d[c + ne] : m1d[c]);
          m1d = n;
        end else if (i.op == OP_LD_COEFF) begin
          for (int c = 0; c < CCOLS; c++) if (c < ne) mco[i.row][c] = ea[c];
        end else begin
          if (i.shift_en) shift_down(m2d);
          for (int c = 0; c < COLS2D; c++)
            if (c >= i.in_off[4:0] && c < i.in_off[4:0] + ne) m2d[0][c] = ea[c - i.in_off[4:0]];
          if (i.interleave) begin
            if (i.shift_en) shift_down(mout);
            for (int c = 0; c < COLS2D; c++)
              if (c >= i.in_off[4:0] && c < i.in_off[4:0] + ne) mout[0][c] = eb[c - i.in_off[4:0]];
          end
        end
      end
      OP_ST_OUT: begin
        int nb, ne;
        nb = nbytes_of(i.width);
        ne = i.elem16 ? nb / 2 : nb;
        if (ne > COLS2D) ne = COLS2D;
        for (int k = 0; k < ne; k++) begin
          longint v;
          v = mout[0][k];
          if (i.elem16) begin
            mb[(i.addr + 2*k) % 4096]     = v[7:0];
            mb[(i.addr + 2*k + 1) % 4096] = v[15:8];
          end else if (i.sext)
            mb[(i.addr + k) % 4096] = (v > 127) ? 8'h7f : (v < -128) ? 8'h80 : v[7:0];
          else
            mb[(i.addr + k) % 4096] = (v > 255) ? 8'hff : (v < 0) ? 8'h00 : v[7:0];
        end
      end
      OP_CONV_1D_HOR, OP_CONV_1D_VER, OP_CONV_2D: begin
        int k, nout;
        longint val [16];
        k = ksize_taps(m_ks);
        if (i.op == OP_CONV_2D && k == 16) return;   // not available on one slice
        nout = (i.op != OP_CONV_2D) ? 64 / k : (k == 4 ? 4 : 1);
        for (int j = 0; j < nout; j++) begin
          longint acc;
          bit first;
          acc = (m_red == RED_ADD) ? 0 : 1;
          first = 1;
          for (int r = 0; r < ((i.op == OP_CONV_2D) ? k : 1); r++)
            for (int t = 0; t < k; t++) begin
              longint a, b, y;
              int row, col;
              bit en;
              if (i.op == OP_CONV_1D_HOR) begin
                col = i.in_off + j + t;
                a = (col < W1D) ? m1d[col] : 0;
                b = mco[i.row][t];
                en = m_mask[t];
              end else if (i.op == OP_CONV_1D_VER) begin
                row = i.v_off + t; col = i.in_off + j;
                a = (row < ROWS2D && col < COLS2D) ? m2d[row][col] : 0;
                b = mco[i.row][t];
                en = m_mask[t];
              end else begin
                row = i.v_off + r; col = i.in_off + j + t;
                a = (row < ROWS2D && col < COLS2D) ? m2d[row][col] : 0;
                b = mco[r][t];
                en = (k == 4) ? m_mask[r*4+t] : 1;
              end
              if (!en) continue;
              y = map_f(m_map, a, b);
              if (m_red == RED_AND) y = (y != 0);
              acc = first ? y : red_f(m_red, acc, y);
              first = 0;
            end
          val[j] = sat10(acc >>> m_sh);
        end
        if (i.dst_in2d) begin
          if (i.shift_en) shift_down(m2d);
          for (int j = 0; j < nout; j++) if (i.out_off + j < COLS2D) m2d[0][i.out_off + j] = val[j];
        end else begin
          if (i.shift_en) shift_down(mout);
          for (int j = 0; j < nout; j++) if (i.out_off + j < COLS2D) mout[0][i.out_off + j] = val[j];
        end
      end
      OP_SIMD: begin
        longint y [16];
        for (int l = 0; l < 16; l++) begin
          longint a, b, c;
          a = mout[i.row][l]; b = mout[i.row_b][l]; c = longint'(signed'(i.imm));
          case (i.simd_op)
            SIMD_ADD:  y[l] = a + b;
            SIMD_SUB:  y[l] = a - b;
            SIMD_ADDC: y[l] = a + c;
            SIMD_AVG:  y[l] = (a + b + 1) >>> 1;
            SIMD_SHR:  y[l] = a >>> i.imm[3:0];
            SIMD_MAX:  y[l] = a > b ? a : b;
            SIMD_MIN:  y[l] = a < b ? a : b;
            default:   y[l] = a;
          endcase
        end
        for (int l = 0; l < 16; l++) mout[i.row_d][l] = sat10(y[l]);
      end
      default: ;
    endcase
  endtask

  // ---------------------------------------------------------------- driver
  int last_fire = 0;
  task automatic issue(ce_instr_t i);
    @(negedge clk);
    instr_valid = 1; instr = i;
    #1;
    while (!instr_ready) begin
      stalls++;
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    last_fire = cyc;
    m_apply(i);
    #1 instr_valid = 0;
  endtask

  task automatic drain();
    issue(i_nop());
    repeat (3) @(posedge clk);
  endtask

  task automatic compare_regs(string tag);
    int bad;
    bad = 0;
    for (int c = 0; c < W1D; c++) if (longint'(dut.r1d[c]) != m1d[c]) begin bad++; if (failures < 3) $display("  r1d[%0d]", c); end
    for (int r = 0; r < ROWS2D; r++) for (int c = 0; c < COLS2D; c++) begin
      if (longint'(dut.r2d[r][c]) != m2d[r][c]) begin
        bad++;
        if (failures < 3 && bad < 4) $display("  r2d[%0d][%0d] %0d exp %0d", r, c, dut.r2d[r][c], m2d[r][c]);
      end
      if (longint'(out_reg[r][c]) != mout[r][c]) begin
        bad++;
        if (failures < 3 && bad < 4) $display("  out[%0d][%0d] %0d exp %0d", r, c, out_reg[r][c], mout[r][c]);
      end
    end
    for (int r = 0; r < CROWS; r++) for (int c = 0; c < CCOLS; c++)
      if (longint'(dut.rco[r][c]) != mco[r][c]) begin bad++; if (failures < 3) $display("  rco[%0d][%0d]", r, c); end
    chk(bad == 0, $sformatf("%s: %0d register elements differ", tag, bad));
  endtask

  // ---------------------------------------------------------------- tests
  initial begin
    instr_valid = 0; instr = i_nop();
    for (int c = 0; c < W1D; c++) m1d[c] = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 18; c++) begin m2d[r][c] = 0; mout[r][c] = 0; end
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) mco[r][c] = 0;
    #1;
    for (int a = 0; a < 4096; a++) mem.bytes[a] = 8'($urandom);
    repeat (2) @(posedge clk);
    // the memory array is the reference from here on
    for (int a = 0; a < 4096; a++) mb[a] = mem.bytes[a];
    rst_n = 1;

    // ---------------- 1. sliding 16-tap horizontal filter
    begin
      int coef [16], img [64];
      for (int t = 0; t < 16; t++) coef[t] = signed'(mb[1024 + t]);
      for (int x = 0; x < 64; x++) img[x] = mb[x];
      issue(i_set_ops(MAP_MULT, RED_ADD, 6));
      issue(i_set_size(KS_16, '1));
      issue(i_mem(OP_LD_COEFF, 1024, MW_128, 0, 1, 0, 0));           // signed taps into row 0
      issue(i_mem(OP_LD_1D, 0, MW_256));                               // img[0..31] -> r1d[8..39]
      for (int blk = 0; blk < 2; blk++) begin
        for (int g = 0; g < 4; g++) issue(i_conv(OP_CONV_1D_HOR, 8 + 4 * g, 0, 0, 1));
        drain();
        for (int g = 0; g < 4; g++)
          for (int j = 0; j < 4; j++) begin
            int x;
            longint s;
            x = 16 * blk + 4 * g + j;
            s = 0;
            for (int t = 0; t < 16; t++) s += coef[t] * img[x + t];
            chk(longint'(out_reg[3 - g][j]) == sat10(s >>> 6), $sformatf("filter output %0d", x));
          end
        issue(i_mem(OP_LD_1D, 32 + 16 * blk, MW_128, 0, 0, 1));        // slide by 16 pixels
      end
      drain();
      compare_regs("filter");
    end

    // ---------------- 2. throughput and latency
    begin
      int f0;
      issue(i_set_ops(MAP_ADD, RED_MAX, 0));
      issue(i_set_size(KS_4, '1));
      drain();
      issue(i_conv(OP_CONV_1D_HOR, 0, 0, 0, 1));
      f0 = last_fire;
      for (int k = 1; k < 16; k++) issue(i_conv(OP_CONV_1D_HOR, k, 0, 0, 1));
      chk(last_fire - f0 == 15, $sformatf("16 computes in %0d cycles", last_fire - f0 + 1));
      drain();
      compare_regs("throughput");
      // latency: row 0 column 0 changes two clocks next_v acceptance
      issue(i_simd(SIMD_ADDC, 5, 5, 0, 100));   // make row 0 differ from the next result
      drain();
      begin
        longint prev_v, next_v;
        prev_v = mout[0][0];
        issue(i_conv(OP_CONV_1D_HOR, 3, 0, 0, 0));
        next_v = mout[0][0];
        #1 chk(longint'(out_reg[0][0]) == prev_v, "no result after one clock");
        @(posedge clk); #1 chk(longint'(out_reg[0][0]) == next_v, "result after two clocks");
        chk(prev_v != next_v, "latency probe distinguishes");
      end
      drain();
    end

    // ---------------- 3. random programs
    for (int prog = 0; prog < 150; prog++) begin
      int hist [$];
      for (int n = 0; n < 25; n++) begin
        ce_instr_t i;
        int kind;
        kind = $urandom_range(0, 11);
        case (kind)
          0: i = i_set_ops(map_op_e'($urandom_range(0, 7)), red_op_e'($urandom_range(0, 3)), $urandom_range(0, 8));
          1: i = i_set_size(ksize_e'($urandom_range(0, 2)), 16'($urandom) | 16'h1);
          2, 3, 4: begin
            ce_op_e op;
            op = (kind == 2) ? OP_LD_1D : (kind == 3) ? OP_LD_2D : OP_LD_COEFF;
            i = i_mem(op, $urandom_range(0, 4000), mwidth_e'($urandom_range(0, 2)), $urandom_range(0, 1),
                      $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 15),
                      $urandom_range(0, 17), $urandom_range(0, 3) == 0);
            if ((i.addr % 32) + nbytes_of(i.width) > 32) two_line++;
            if (i.interleave && op == OP_LD_2D) n_il++;
          end
          5: i = i_mem(OP_ST_OUT, $urandom_range(2048, 4000), mwidth_e'($urandom_range(0, 2)),
                       $urandom_range(0, 1), $urandom_range(0, 1));
          6, 7, 8, 9: begin
            ce_op_e op;
            op = (kind == 6 || kind == 7) ? OP_CONV_1D_HOR : (kind == 8) ? OP_CONV_1D_VER : OP_CONV_2D;
            i = i_conv(op, $urandom_range(0, 30), $urandom_range(0, 15), $urandom_range(0, 17),
                       $urandom_range(0, 1), $urandom_range(0, 3) == 0, $urandom_range(0, 15));
          end
          default: i = i_simd(simd_op_e'($urandom_range(0, 7)), $urandom_range(0, 15), $urandom_range(0, 15),
                              $urandom_range(0, 15), $urandom_range(0, 1023));
        endcase
        issue(i);
      end
      drain();
      compare_regs($sformatf("program %0d", prog));
      begin
        int bm;
        bm = 0;
        for (int a = 0; a < 4096; a++) if (mem.bytes[a] != mb[a]) begin
          bm++;
          if (bm < 4 && failures < 3) $display("  mem[%0d] %0d exp %0d", a, mem.bytes[a], mb[a]);
        end
        chk(bm == 0, $sformatf("program %0d memory", prog));
      end
    end

    // ---------------- 4. CGFU shuffle and fusion
    begin
      longint d0 [16], d1 [16];
      issue(i_shuffle(0, 1, 0));          // 2D input row 0, shifted by one element
      issue(i_shuffle(6, 0, 1, 1));       // output row 2, every second element
      for (int l = 0; l < 16; l++) begin
        d0[l] = m2d[0][l + 1];
        d1[l] = (2 * l < COLS2D) ? mout[2][2 * l] : 0;
      end
      for (int k = 0; k < 8; k++) begin
        issue(i_set_fusion(0, k, fu_word(6, 0, 0)));
        issue(i_set_fusion(1, k, fu_word(6, 0, 0)));
      end
      issue(i_set_fusion(0, 8, fu_word(0, 0, 1)));          // A = d0 + d1
      issue(i_set_fusion(1, 8, fu_word(2, 0, 1)));          // B = |d0 - d1|
      issue(i_fusion(1));
      drain();
      for (int l = 0; l < 16; l++) begin
        mout[0][l] = sat10(d0[l] + d1[l]);
        mout[1][l] = d0[l] > d1[l] ? d0[l] - d1[l] : d1[l] - d0[l];
      end
      compare_regs("fusion");
    end

    for (int a = 0; a < 4096; a++) chk(mem.bytes[a] == mb[a], $sformatf("memory byte %0d", a));
    chk(stalls > 0, "stalls exercised");
    chk(two_line > 0, "two-line accesses exercised");
    chk(n_il > 0, "interleaved loads exercised");
    $display("stalls=%0d two_line=%0d interleaved=%0d", stalls, two_line, n_il);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
