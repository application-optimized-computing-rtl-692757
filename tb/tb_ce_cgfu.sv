// tb_ce_cgfu: checks the complex graph fusion unit.
//  1. Random shuffles (row select, element shift, stride 2) are checked
//     against the expected Data Shuffle Register contents, and random FU
//     programs for both fusion arrays against a software model of the
//     operand-select chain, predication and comparator/status update.
//  2. A demosaic green interpolation at chroma sites: fusion 1 computes the
//     horizontal and vertical gradient metrics
//        |GR-GL| + |2CC-CR-CL|/2   and   |GU-GD| + |2CC-CU-CD|/2
//     and sets the status; fusions 2 and 3 use the status as predicates to
//     produce (GL+GR)/2, (GU+GD)/2 or the four-way average with the
//     chroma correction, as the interpolation rule prescribes.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_cgfu;
  import ce_pkg::*;
  import tb_ce_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic shuf_en, shuf_stride2, cfg_we, cfg_arr, fuse_en, status_we;
  logic [2:0] shuf_src;
  logic [4:0] shuf_shift;
  logic [3:0] shuf_dst, cfg_fu;
  logic [16:0] cfg_word;
  data_t in_rows [4][COLS2D], out_rows [4][COLS2D];
  data_t fus_a [NLANE], fus_b [NLANE];
  logic [2:0] status [NLANE];

  ce_cgfu dut (.*);

  // model state
  longint mdsr [16][NLANE];
  logic [16:0] mcfg [2][9];
  logic [2:0] mst [NLANE];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic longint fu_model(logic [16:0] w, longint a, longint b, logic [2:0] st);
    longint r;
    case (w[2:0])
      0: r = a + b;
      1: r = a - b;
      2: r = (a > b) ? a - b : b - a;
      3: r = (a < b) ? a : b;
      4: r = (a > b) ? a : b;
      5: r = (a + b + 1) >>> 1;
      6: r = a;
      default: r = b;
    endcase
    r = r >>> w[14:13];
    case (w[16:15])
      0: return r;
      1: return st[0] ? r : a;
      2: return st[1] ? r : a;
      default: return st[2] ? r : a;
    endcase
  endfunction

  task automatic model_fuse(output longint ra [NLANE], output longint rb [NLANE]);
    for (int l = 0; l < NLANE; l++)
      for (int arr = 0; arr < 2; arr++) begin
        longint pool [25];
        for (int e = 0; e < 16; e++) pool[e] = mdsr[e][l];
        for (int k = 0; k < 9; k++) begin
          int sa, sb;
          longint va, vb;
          sa = mcfg[arr][k][7:3];
          sb = mcfg[arr][k][12:8];
          va = (sa < 16 + k) ? pool[sa] : 0;
          vb = (sb < 16 + k) ? pool[sb] : 0;
          pool[16 + k] = fu_model(mcfg[arr][k], va, vb, mst[l]);
        end
        if (arr == 0) ra[l] = pool[24]; else rb[l] = pool[24];
      end
  endtask

  task automatic do_shuffle(int src, int sh, int dst, bit s2);
    @(negedge clk);
    shuf_en = 1; shuf_src = 3'(src); shuf_shift = 5'(sh); shuf_dst = 4'(dst); shuf_stride2 = s2;
    for (int l = 0; l < NLANE; l++) begin
      int idx;
      idx = sh + (s2 ? 2 * l : l);
      mdsr[dst][l] = (idx < COLS2D) ? longint'(src >= 4 ? out_rows[src-4][idx] : in_rows[src][idx]) : 0;
    end
    @(posedge clk);
    #1 shuf_en = 0;
  endtask

  task automatic set_fu(int arr, int fu, logic [16:0] w);
    @(negedge clk);
    cfg_we = 1; cfg_arr = arr[0]; cfg_fu = 4'(fu); cfg_word = w;
    mcfg[arr][fu] = w;
    @(posedge clk);
    #1 cfg_we = 0;
  endtask

  task automatic fuse_check(bit upd, output longint ra [NLANE], output longint rb [NLANE]);
    @(negedge clk);
    fuse_en = 1; status_we = upd;
    model_fuse(ra, rb);
    #1;
    for (int l = 0; l < NLANE; l++) begin
      chk(longint'(fus_a[l]) == sat10(ra[l]), $sformatf("array A lane %0d: %0d vs %0d", l, fus_a[l], sat10(ra[l])));
      chk(longint'(fus_b[l]) == sat10(rb[l]), $sformatf("array B lane %0d", l));
    end
    @(posedge clk);
    #1 fuse_en = 0;
    if (upd)
      for (int l = 0; l < NLANE; l++)
        mst[l] = {ra[l] == rb[l], ra[l] > rb[l], ra[l] < rb[l]};
    for (int l = 0; l < NLANE; l++) chk(status[l] == mst[l], "status register");
  endtask

  initial begin
    longint ra [NLANE], rb [NLANE];
    {shuf_en, cfg_we, fuse_en, status_we, shuf_stride2} = '0;
    shuf_src = 0; shuf_shift = 0; shuf_dst = 0; cfg_fu = 0; cfg_arr = 0; cfg_word = 0;
    for (int e = 0; e < 16; e++) for (int l = 0; l < NLANE; l++) mdsr[e][l] = 0;
    for (int a = 0; a < 2; a++) for (int k = 0; k < 9; k++) mcfg[a][k] = '0;
    for (int l = 0; l < NLANE; l++) mst[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ------------------------------------------------ 1. random programs
    for (int it = 0; it < 60; it++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < COLS2D; c++) begin
          in_rows[r][c]  = data_t'($urandom_range(0, 255));
          out_rows[r][c] = data_t'($urandom_range(0, 255));
        end
      for (int s = 0; s < 4; s++)
        do_shuffle($urandom_range(0, 7), $urandom_range(0, 3), $urandom_range(0, 15), $urandom);
      for (int e = 0; e < 16; e++)
        for (int l = 0; l < NLANE; l++)
          chk(longint'(dut.dsr[e][l]) == mdsr[e][l], "DSR contents");
      for (int k = 0; k < 3; k++)
        set_fu($urandom_range(0, 1), $urandom_range(0, 8),
               fu_word($urandom_range(0, 7), $urandom_range(0, 24), $urandom_range(0, 24),
                       $urandom_range(0, 3), $urandom_range(0, 3)));
      fuse_check($urandom_range(0, 3) != 0, ra, rb);
    end
    // ------------------------------------------------ 2. demosaic green
    // DSR 0..8 = GL GR GU GD CC CL CR CU CD for 16 chroma sites
    begin
      longint px [9][NLANE];
      longint gc [NLANE];
      int n_h = 0, n_v = 0, n_e = 0;
      for (int l = 0; l < NLANE; l++) begin
        for (int e = 0; e < 9; e++) px[e][l] = $urandom_range(0, 255);
        if (l % 4 == 3) begin   // force equal gradients now and then
          px[1][l] = px[0][l]; px[3][l] = px[2][l];
          px[6][l] = px[4][l]; px[5][l] = px[4][l]; px[7][l] = px[4][l]; px[8][l] = px[4][l];
        end
      end
      for (int e = 0; e < 9; e++) begin
        for (int l = 0; l < NLANE; l++) in_rows[0][l] = data_t'(px[e][l]);
        do_shuffle(0, 0, e, 0);
      end
      // fusion 1: A = horizontal metric, B = vertical metric
      for (int arr = 0; arr < 2; arr++) begin
        int g1, g2, c1, c2;
        g1 = arr ? 2 : 0; g2 = arr ? 3 : 1; c1 = arr ? 7 : 5; c2 = arr ? 8 : 6;
        set_fu(arr, 0, fu_word(2, g2, g1));           // 16: |G2-G1|
        set_fu(arr, 1, fu_word(0, 4, 4));             // 17: 2CC
        set_fu(arr, 2, fu_word(0, c1, c2));           // 18: C1+C2
        set_fu(arr, 3, fu_word(2, 17, 18, 1));        // 19: |2CC-C1-C2|/2
        set_fu(arr, 4, fu_word(6, 16, 0));            // 20: pass
        set_fu(arr, 5, fu_word(6, 20, 0));
        set_fu(arr, 6, fu_word(6, 21, 0));
        set_fu(arr, 7, fu_word(6, 22, 0));
        set_fu(arr, 8, fu_word(0, 23, 19));           // 24: metric
      end
      fuse_check(1, ra, rb);
      for (int l = 0; l < NLANE; l++) begin
        longint h, v;
        h = (px[1][l] > px[0][l] ? px[1][l] - px[0][l] : px[0][l] - px[1][l]);
        v = 2 * px[4][l] - px[5][l] - px[6][l];
        h += (v < 0 ? -v : v) >>> 1;
        v = (px[3][l] > px[2][l] ? px[3][l] - px[2][l] : px[2][l] - px[3][l]);
        begin longint t; t = 2 * px[4][l] - px[7][l] - px[8][l]; v += (t < 0 ? -t : t) >>> 1; end
        chk(ra[l] == h && rb[l] == v, "gradient metrics");
        if (h < v) begin gc[l] = (px[0][l] + px[1][l]) >>> 1; n_h++; end
        else if (v < h) begin gc[l] = (px[2][l] + px[3][l]) >>> 1; n_v++; end
        else begin
          gc[l] = ((px[0][l] + px[1][l] + px[2][l] + px[3][l]) >>> 2)
                + ((px[4][l] - ((px[7][l] + px[8][l] + px[5][l] + px[6][l]) >>> 2)) >>> 1);
          n_e++;
        end
      end
      chk(n_h > 0 && n_v > 0 && n_e > 0, "all three interpolation directions occur");
      // fusion 2 (status kept): A = lt ? hor : four-way, B = gt ? ver : four-way
      for (int arr = 0; arr < 2; arr++) begin
        set_fu(arr, 0, fu_word(0, 0, 1));             // 16: GL+GR
        set_fu(arr, 1, fu_word(0, 2, 3));             // 17: GU+GD
        set_fu(arr, 2, fu_word(0, 7, 8));             // 18: CU+CD
        set_fu(arr, 3, fu_word(0, 5, 6));             // 19: CL+CR
        set_fu(arr, 4, fu_word(0, 18, 19, 2));        // 20: CAVG
        set_fu(arr, 5, fu_word(1, 4, 20, 1));         // 21: (CC-CAVG)/2
        set_fu(arr, 6, fu_word(0, 16, 17, 2));        // 22: G average
        set_fu(arr, 7, fu_word(0, 22, 21));           // 23: four-way result
        set_fu(arr, 8, arr ? fu_word(7, 23, 17, 1, 2) // 24: gt ? (GU+GD)/2
                           : fu_word(7, 23, 16, 1, 1)); //     lt ? (GL+GR)/2
      end
      fuse_check(0, ra, rb);
      // fusion 3: bring both rows back and pick B where the vertical won
      out_rows[0] = '{default: '0};
      out_rows[1] = '{default: '0};
      for (int l = 0; l < NLANE; l++) begin
        out_rows[0][l] = data_t'(ra[l]);
        out_rows[1][l] = data_t'(rb[l]);
      end
      do_shuffle(4, 0, 9, 0);
      do_shuffle(5, 0, 10, 0);
      for (int k = 0; k < 8; k++) set_fu(0, k, fu_word(6, 9, 0));
      set_fu(0, 8, fu_word(7, 9, 10, 0, 2));          // gt ? B : A
      fuse_check(0, ra, rb);
      for (int l = 0; l < NLANE; l++)
        chk(ra[l] == gc[l], $sformatf("demosaic green lane %0d: %0d vs %0d", l, ra[l], gc[l]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
