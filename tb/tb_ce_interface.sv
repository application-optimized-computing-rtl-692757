// tb_ce_interface: checks the operand patterns of the horizontal, column
// and 2D interface units (all kernel sizes, offsets, masks) by computing,
// for every output position and tap, which register element and which
// coefficient must reach the ALUs.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_interface;
  import ce_pkg::*;
  int checks = 0, failures = 0;
  flow_e flow;
  ksize_e ks;
  logic [5:0] in_off;
  logic [3:0] v_off, crow;
  logic [15:0] mask;
  data_t r1d [W1D];
  data_t r2d [ROWS2D][COLS2D];
  data_t rco [CROWS][CCOLS];
  data_t a [NALU];
  data_t b [NALU];
  logic [NALU-1:0] en;
  tap_e tap;
  logic ok;

  ce_interface dut (.flow(flow), .ksize(ks), .in_off(in_off), .v_off(v_off), .crow(crow),
                    .mask(mask), .r1d(r1d), .r2d(r2d), .rco(rco), .a(a), .b(b),
                    .lane_en(en), .tap(tap), .cfg_ok(ok));

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("mismatch: %s flow=%s ks=%s off=%0d/%0d", what,
                                  flow.name(), ks.name(), in_off, v_off);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // distinct values so that any wrong index is visible
    for (int c = 0; c < W1D; c++) r1d[c] = data_t'(c + 1);
    for (int r = 0; r < ROWS2D; r++)
      for (int c = 0; c < COLS2D; c++) r2d[r][c] = data_t'(-(r * 20 + c + 1));
    for (int r = 0; r < CROWS; r++)
      for (int c = 0; c < CCOLS; c++) rco[r][c] = data_t'(r * 16 + c + 100);
    for (int it = 0; it < 120; it++) begin
      int k, nout;
      flow = flow_e'(it % 3);
      ks   = ksize_e'((it / 3) % 3);
      mask = 16'($urandom);
      crow = 4'($urandom);
      k    = (ks == KS_4) ? 4 : (ks == KS_8) ? 8 : 16;
      if (flow == FLOW_1D_HOR) begin
        nout = 64 / k;
        in_off = 6'($urandom_range(0, W1D - (nout + k - 1)));
        v_off = 0;
      end else if (flow == FLOW_1D_VER) begin
        nout = 64 / k;
        in_off = 6'($urandom_range(0, (COLS2D - nout) > 0 ? COLS2D - nout : 0));
        v_off = 4'($urandom_range(0, ROWS2D - k));
      end else begin
        nout = (k == 16) ? 0 : 64 / (k * k);
        in_off = 6'($urandom_range(0, COLS2D - (nout + k - 1) > 0 ? COLS2D - (nout + k - 1) : 0));
        v_off = 4'($urandom_range(0, ROWS2D - k));
      end
      #1;
      if (flow == FLOW_2D && k == 16) begin
        chk(!ok, "16x16 must be rejected on one slice");
        continue;
      end
      chk(ok, "cfg_ok");
      if (flow == FLOW_2D)
        chk(tap == ((k == 4) ? TAP_16 : TAP_64), "tap");
      else
        chk(tap == ((k == 4) ? TAP_4 : (k == 8) ? TAP_8 : TAP_16), "tap");
      for (int j = 0; j < nout; j++) begin
        if (flow != FLOW_2D) begin
          for (int t = 0; t < k; t++) begin
            data_t ea;
            if (flow == FLOW_1D_HOR) ea = r1d[in_off + j + t];
            else                     ea = (in_off + j < COLS2D) ? r2d[v_off + t][in_off + j] : '0;
            chk(a[j*k+t] == ea, "data operand");
            chk(b[j*k+t] == rco[crow][t], "coefficient");
            chk(en[j*k+t] == mask[t], "mask");
          end
        end else begin
          for (int r = 0; r < k; r++)
            for (int c = 0; c < k; c++) begin
              int lane;
              lane = j*k*k + r*k + c;
              chk(a[lane] == r2d[v_off + r][in_off + j + c], "2D data");
              chk(b[lane] == rco[r][c], "2D coefficient");
              chk(en[lane] == ((k == 4) ? mask[r*4+c] : 1'b1), "2D mask");
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
