// tb_ce_cmp: end-to-end test of the Convolution Engine CMP at its default
// size (four slices, two processor ports), with one memory model per
// slice (random grant stalls, 1..3 cycle read latency).
//
// Two processor threads run at the same time:
//   core 0, slice 1: residual + SATD. Four image rows are loaded from an
//     unaligned address with interleave (even pixels to the 2D input
//     register, odd pixels to the output register); vertical 1-tap
//     convolutions copy the even rows into the output register; SIMD
//     subtracts give a 4x4 residual, which the Hadamard block turns into a
//     SATD. Checked against a direct computation.
//   core 0, slice 0: data shuffle and instruction-graph fusion
//     (|a-b| and max(a,b) of two image rows), stored and checked.
//   core 1, slice 2: 8-tap horizontal filter of an image row, stored and
//     checked against a direct convolution.
//   core 1, slice 3: 4x4 SAD of a block at four candidate positions
//     (2D absolute-difference/add), stored and checked.
//   core 1 also sends NOPs to slice 1 while core 0 uses it, so the slice
//     arbiter sees conflicts.
// Meanwhile the fixed-function and H.264 units get one directed use each:
// MV cost, IME SAD array, FME up-sampler, CABAC LIFO and binarizer.
// Mechanism counters (stall, arbitration conflict, two-line access,
// interleaved load, fusion, SIMD, Hadamard, ...) must all be non-zero.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_cmp;
  import ce_pkg::*;
  import tb_ce_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic core_valid [2], core_ready [2];
  ce_instr_t core_instr [2];
  logic mem_req [4], mem_we [4], mem_gnt [4], mem_rvalid [4];
  logic [31:0] mem_addr [4];
  logic [255:0] mem_wdata [4], mem_rdata [4];
  logic [31:0] mem_wstrb [4];
  logic had_start, had_valid;
  logic [17:0] had_satd;
  logic mvc_lut_we, mvc_valid, mvc_out_valid;
  logic [5:0] mvc_lut_addr;
  logic [7:0] mvc_lut_wdata, mvc_lambda;
  logic signed [11:0] mvc_mv_x, mvc_mv_y, mvc_pred_x, mvc_pred_y;
  logic [16:0] mvc_cost;
  logic ime_ld_we, ime_ld_half, ime_sh_en, ime_cur_we, ime_sad_en, ime_sad_valid;
  logic [3:0] ime_ld_row, ime_cur_row;
  logic [127:0] ime_ld_data, ime_cur_data;
  logic [1:0] ime_sh_dir;
  logic [15:0] ime_sad16;
  logic [11:0] ime_sad4 [4][4];
  logic fme_in_valid, fme_out_valid;
  logic [7:0] fme_p [10], fme_h_row [5], fme_v_int [5], fme_v_half [5];
  logic lifo_push, lifo_pop, lifo_top_zero, lifo_rest_zero, lifo_empty, lifo_full;
  logic signed [15:0] lifo_push_data, lifo_top;
  logic [4:0] lifo_count;
  logic bin_in_valid, bin_out_valid, bin_len_ovf;
  logic [1:0] bin_mode;
  logic [15:0] bin_value;
  logic [5:0] bin_cmax;
  logic [3:0] bin_k;
  logic [63:0] bin_str;
  logic [6:0] bin_len;

  ce_cmp dut (.*);

  for (genvar s = 0; s < 4; s++) begin : g_mem
    tb_mem_model #(.BYTES(4096), .STALLS(1'b1)) mem (
      .clk(clk), .req(mem_req[s]), .we(mem_we[s]), .addr(mem_addr[s]), .wdata(mem_wdata[s]),
      .wstrb(mem_wstrb[s]), .gnt(mem_gnt[s]), .rvalid(mem_rvalid[s]), .rdata(mem_rdata[s]));
  end

  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // ---------------------------------------------------------- mechanism counters
  int n_stall = 0, n_conflict = 0, n_two_line = 0, n_il = 0, n_fusion = 0, n_shuffle = 0;
  int n_simd = 0, n_conv = 0, n_had = 0, n_mvc = 0, n_ime = 0, n_fme = 0, n_lifo = 0, n_bin = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) if (core_valid[c] && !core_ready[c]) n_stall++;
    if (core_valid[0] && core_valid[1] && core_instr[0].slice == core_instr[1].slice) n_conflict++;
    for (int c = 0; c < 2; c++) if (core_valid[c] && core_ready[c]) begin
      if (core_instr[c].op == OP_LD_2D && core_instr[c].interleave) n_il++;
      if (core_instr[c].op == OP_EXE_FUSION) n_fusion++;
      if (core_instr[c].op == OP_EXE_SHUFFLE) n_shuffle++;
      if (core_instr[c].op == OP_SIMD) n_simd++;
      if (core_instr[c].op inside {OP_CONV_1D_HOR, OP_CONV_1D_VER, OP_CONV_2D}) n_conv++;
    end
    for (int s = 0; s < 4; s++)
      if (mem_req[s] && mem_gnt[s] && mem_addr[s][4:0] == 0 &&
          (s == 0 ? dut.g_slice[0].u_slice.u_ldst.state : s == 1 ? dut.g_slice[1].u_slice.u_ldst.state :
           s == 2 ? dut.g_slice[2].u_slice.u_ldst.state : dut.g_slice[3].u_slice.u_ldst.state) == 3'd3)
        n_two_line++;   // grant of the second line of an access
    if (had_valid) n_had++;
    if (mvc_out_valid) n_mvc++;
    if (ime_sad_valid) n_ime++;
    if (fme_out_valid) n_fme++;
    if (lifo_push || lifo_pop) n_lifo++;
    if (bin_out_valid) n_bin++;
  end

  // ---------------------------------------------------------- processor ports
  task automatic issue(int c, ce_instr_t i);
    @(negedge clk);
    core_valid[c] = 1; core_instr[c] = i;
    #1;
    while (!core_ready[c]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 core_valid[c] = 0;
  endtask

  task automatic drain(int c, int sl);
    issue(c, i_set_ops(MAP_MULT, RED_ADD, 0, sl));   // waits for the load/store unit
    issue(c, i_nop());
    repeat (4) @(posedge clk);
  endtask

  byte unsigned img [4][4096];

  function automatic int mrd(int s, int a);
    case (s)
      0: return g_mem[0].mem.bytes[a];
      1: return g_mem[1].mem.bytes[a];
      2: return g_mem[2].mem.bytes[a];
      default: return g_mem[3].mem.bytes[a];
    endcase
  endfunction

  function automatic int hm(int i, int j);
    return ($countones(i & j) % 2) ? -1 : 1;
  endfunction

  // ---------------------------------------------------------- core 0
  task automatic core0();
    // slice 1: residual + SATD
    issue(0, i_set_ops(MAP_PASS, RED_ADD, 0, 1));
    issue(0, i_set_size(KS_4, 16'h0001, 1));
    for (int r = 0; r < 4; r++)
      issue(0, i_mem(OP_LD_2D, 100 + 40 * r + 5, MW_256, 0, 0, 1, 0, 0, 1, 1));
    for (int v = 3; v >= 0; v--) issue(0, i_conv(OP_CONV_1D_VER, 0, v, 0, 1, 0, 0, 1));
    for (int r = 0; r < 4; r++) issue(0, i_simd(SIMD_SUB, r, r + 4, r, 0, 1));
    drain(0, 1);
    begin
      int d [4][4];
      int satd;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        int base;
        base = 100 + 40 * (3 - r) + 5;
        d[r][c] = img[1][base + 2 * c] - img[1][base + 2 * c + 1];
      end
      satd = 0;
      for (int u = 0; u < 4; u++) for (int v = 0; v < 4; v++) begin
        int s;
        s = 0;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) s += hm(u, i) * d[i][j] * hm(j, v);
        satd += (s < 0) ? -s : s;
      end
      @(negedge clk) had_start = 1;
      @(negedge clk) had_start = 0;
      chk(had_valid && had_satd == 18'(satd), $sformatf("SATD %0d exp %0d", had_satd, satd));
    end
    // slice 0: shuffle + fusion
    issue(0, i_mem(OP_LD_2D, 600, MW_128, 0, 0, 1, 0, 0, 0, 0));   // row b (ends in row 1)
    issue(0, i_mem(OP_LD_2D, 700, MW_128, 0, 0, 1, 0, 0, 0, 0));   // row a (row 0)
    issue(0, i_shuffle(0, 0, 0, 0, 0));
    issue(0, i_shuffle(1, 0, 1, 0, 0));
    for (int k = 0; k < 8; k++) begin
      issue(0, i_set_fusion(0, k, fu_word(6, 0, 0), 0));
      issue(0, i_set_fusion(1, k, fu_word(6, 0, 0), 0));
    end
    issue(0, i_set_fusion(0, 8, fu_word(2, 0, 1), 0));
    issue(0, i_set_fusion(1, 8, fu_word(4, 0, 1), 0));
    issue(0, i_fusion(1, 0));
    issue(0, i_mem(OP_ST_OUT, 2000 + 3, MW_128, 1, 0, 0, 0, 0, 0, 0));   // 8 x 16-bit
    drain(0, 0);
    for (int l = 0; l < 8; l++) begin
      int a, b, got;
      a = img[0][700 + l]; b = img[0][600 + l];
      got = mrd(0, 2003 + 2 * l) | (mrd(0, 2004 + 2 * l) << 8);
      chk(got == ((a > b) ? a - b : b - a), $sformatf("fusion lane %0d", l));
    end
  endtask

  // ---------------------------------------------------------- core 1
  int c1_done = 0;
  task automatic core1();
    // slice 2: 8-tap filter, 8 outputs per instruction, 16 outputs
    issue(1, i_set_ops(MAP_MULT, RED_ADD, 4, 2));
    issue(1, i_set_size(KS_8, 16'h00ff, 2));
    issue(1, i_mem(OP_LD_COEFF, 50, MW_64, 0, 1, 0, 0, 0, 0, 2));
    issue(1, i_mem(OP_LD_1D, 300 + 7, MW_256, 0, 0, 1, 0, 0, 0, 2));   // row -> r1d[8..39]
    issue(1, i_conv(OP_CONV_1D_HOR, 8, 0, 0, 1, 0, 0, 2));
    issue(1, i_conv(OP_CONV_1D_HOR, 16, 0, 8, 0, 0, 0, 2));
    issue(1, i_mem(OP_ST_OUT, 3000, MW_256, 1, 0, 0, 0, 0, 0, 2));      // 16 x 16-bit
    // slice 3: 4x4 SAD at four positions
    issue(1, i_set_ops(MAP_ABSDIFF, RED_ADD, 0, 3));
    issue(1, i_set_size(KS_4, 16'hffff, 3));
    for (int r = 0; r < 4; r++) issue(1, i_mem(OP_LD_COEFF, 800 + 16 * r, MW_64, 0, 0, 0, r, 0, 0, 3));
    for (int r = 3; r >= 0; r--) issue(1, i_mem(OP_LD_2D, 900 + 32 * r + 9, MW_64, 0, 0, 1, 0, 0, 0, 3));
    issue(1, i_conv(OP_CONV_2D, 0, 0, 0, 0, 0, 0, 3));
    issue(1, i_mem(OP_ST_OUT, 3100, MW_64, 1, 0, 0, 0, 0, 0, 3));
    drain(1, 2);
    drain(1, 3);
    // slice 2 check
    for (int x = 0; x < 16; x++) begin
      longint s;
      int got;
      s = 0;
      for (int t = 0; t < 8; t++) s += longint'(signed'(img[2][50 + t])) * img[2][307 + x + t];
      got = mrd(2, 3000 + 2 * x) | (mrd(2, 3001 + 2 * x) << 8);
      chk(16'(got) == 16'(sat10(s >>> 4)), $sformatf("filter output %0d", x));
    end
    // slice 3 check
    for (int p = 0; p < 4; p++) begin
      int s, got;
      s = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        int a, b;
        a = img[3][900 + 32 * r + 9 + p + c];
        b = img[3][800 + 16 * r + c];
        s += (a > b) ? a - b : b - a;
      end
      got = mrd(3, 3100 + 2 * p) | (mrd(3, 3101 + 2 * p) << 8);
      chk(got == ((s > 511) ? 511 : s), $sformatf("SAD position %0d", p));
    end
    c1_done = 1;
  endtask

  task automatic core1_conflicts();
    for (int k = 0; k < 12; k++) issue(1, i_set_size(KS_4, 16'h0001, 1));  // same setting as core 0
  endtask

  // ---------------------------------------------------------- other units
  task automatic units();
    // MV cost
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      mvc_lut_we = 1; mvc_lut_addr = 6'(i); mvc_lut_wdata = 8'(1 + 2 * i);
      @(negedge clk);
    end
    mvc_lut_we = 0;
    mvc_valid = 1; mvc_mv_x = 12'(5); mvc_pred_x = -12'(2); mvc_mv_y = 12'(3); mvc_pred_y = 12'(3); mvc_lambda = 8'd4;
    @(negedge clk) mvc_valid = 0;
    chk(mvc_out_valid && mvc_cost == 17'(4 * (15 + 1)), "MV cost");
    // IME: current block = reference + 1; one left shift of the window matches it
    for (int r = 0; r < 16; r++) begin
      for (int c = 0; c < 16; c++) begin
        ime_ld_data[8*c +: 8] = 8'(r * 16 + c);
        ime_cur_data[8*c +: 8] = 8'(r * 16 + c + 1);
      end
      ime_ld_we = 1; ime_ld_row = 4'(r); ime_ld_half = 0;
      ime_cur_we = 1; ime_cur_row = 4'(r);
      @(negedge clk);
      for (int c = 0; c < 16; c++) ime_ld_data[8*c +: 8] = 8'(r * 16 + c + 16);
      ime_cur_we = 0; ime_ld_half = 1;
      @(negedge clk);
    end
    ime_ld_we = 0;
    ime_sad_en = 1;
    @(negedge clk) ime_sad_en = 0;
    chk(ime_sad_valid && ime_sad16 == 16'd510, "IME SAD before shift");
    ime_sh_en = 1; ime_sh_dir = 0;
    @(negedge clk) ime_sh_en = 0; ime_sad_en = 1;
    @(negedge clk) ime_sad_en = 0;
    chk(ime_sad_valid && ime_sad16 == 16'd0, $sformatf("IME SAD after shift %0d", ime_sad16));
    // FME: constant image gives constant half pixels
    for (int r = 0; r < 6; r++) begin
      fme_in_valid = 1;
      for (int c = 0; c < 10; c++) fme_p[c] = 8'd77;
      @(negedge clk);
    end
    fme_in_valid = 0;
    chk(fme_out_valid && fme_h_row[2] == 77 && fme_v_int[0] == 77 && fme_v_half[4] == 77, "FME flat image");
    // CABAC: push levels, pop in reverse, binarize each
    begin
      int lv [5] = '{3, 0, -1, 0, 20};
      for (int i = 0; i < 5; i++) begin
        lifo_push = 1; lifo_push_data = 16'(lv[i]);
        @(negedge clk);
      end
      lifo_push = 0;
      chk(lifo_count == 5 && lifo_top == 20 && !lifo_rest_zero, "LIFO fill");
      for (int i = 4; i >= 0; i--) begin
        int a;
        chk(lifo_top == 16'(lv[i]), "LIFO order");
        a = (lv[i] < 0) ? -lv[i] : lv[i];
        bin_in_valid = 1; bin_mode = 2'd3; bin_value = 16'(a); bin_cmax = 6'd14; bin_k = 4'd0;
        lifo_pop = 1;
        @(negedge clk);
        lifo_pop = 0; bin_in_valid = 0;
        if (a == 20) chk(bin_out_valid && bin_len == 7'(14 + 5) && bin_str[18:0] == 19'b11_0_11_11111111111111,
                         $sformatf("UEG0 of 20: len %0d bins %b", bin_len, bin_str[18:0]));
        else chk(bin_out_valid && bin_len == 7'(a + 1), "TU prefix length");
      end
      chk(lifo_empty, "LIFO empty");
    end
  endtask

  // ---------------------------------------------------------- main
  initial begin
    core_valid = '{0, 0}; core_instr = '{default: '0};
    {had_start, mvc_lut_we, mvc_valid, ime_ld_we, ime_ld_half, ime_sh_en, ime_cur_we, ime_sad_en} = '0;
    mvc_lut_addr = 0; mvc_lut_wdata = 0; mvc_lambda = 0;
    mvc_mv_x = 0; mvc_mv_y = 0; mvc_pred_x = 0; mvc_pred_y = 0;
    ime_ld_row = 0; ime_cur_row = 0; ime_ld_data = '0; ime_cur_data = '0; ime_sh_dir = 0;
    fme_in_valid = 0; fme_p = '{default: '0};
    {lifo_push, lifo_pop} = '0; lifo_push_data = 0;
    bin_in_valid = 0; bin_mode = 0; bin_value = 0; bin_cmax = 0; bin_k = 0;
    #1;
    for (int a = 0; a < 4096; a++) begin
      g_mem[0].mem.bytes[a] = 8'($urandom);
      g_mem[1].mem.bytes[a] = 8'($urandom);
      g_mem[2].mem.bytes[a] = 8'($urandom);
      g_mem[3].mem.bytes[a] = 8'($urandom);
    end
    repeat (2) @(posedge clk);
    for (int s = 0; s < 4; s++) for (int a = 0; a < 4096; a++) img[s][a] = 8'(mrd(s, a));
    rst_n = 1;
    fork
      core0();
      begin core1_conflicts(); core1(); end
      units();
    join
    chk(n_stall > 0, "stall");
    chk(n_conflict > 0, "arbitration conflict");
    chk(n_two_line > 0, "unaligned two-line access");
    chk(n_il > 0, "interleaved load");
    chk(n_shuffle > 0 && n_fusion > 0, "shuffle and fusion");
    chk(n_simd > 0, "SIMD");
    chk(n_conv > 0, "convolution");
    chk(n_had > 0 && n_mvc > 0 && n_ime > 0 && n_fme > 0 && n_lifo > 0 && n_bin > 0, "fixed-function units");
    $display("stall=%0d conflict=%0d two_line=%0d interleave=%0d fusion=%0d shuffle=%0d simd=%0d conv=%0d had=%0d mvc=%0d ime=%0d fme=%0d lifo=%0d bin=%0d",
             n_stall, n_conflict, n_two_line, n_il, n_fusion, n_shuffle, n_simd, n_conv, n_had, n_mvc, n_ime, n_fme, n_lifo, n_bin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
