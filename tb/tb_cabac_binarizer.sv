// tb_cabac_binarizer: checks unary, truncated-unary, k-th order Exp-Golomb
// and UEGk binarization against a bit-queue model written from the coding
// rules (unary: v ones then a zero; TU: the zero is dropped at cmax; EGk:
// while v >= 2^k emit 1, subtract 2^k, k++; then a 0 and k suffix bits,
// MSB first; UEGk: TU prefix with cutoff cmax, then EGk of v - cmax when the
// prefix is all ones). Random values, modes and parameters; strings longer
// than MAXBINS must raise len_ovf. Result one cycle after in_valid.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_cabac_binarizer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid, len_ovf;
  logic [1:0] mode;
  logic [15:0] value;
  logic [5:0] cmax;
  logic [3:0] k;
  logic [63:0] bin_str;
  logic [6:0] len;
  cabac_binarizer dut (.*);

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic void model(int md, int v, int cm, int kk, ref bit q[$]);
    q.delete();
    if (md == 0) begin
      repeat (v) q.push_back(1);
      q.push_back(0);
      return;
    end
    if (md == 1 || md == 3) begin
      int p;
      p = (v > cm) ? cm : v;
      repeat (p) q.push_back(1);
      if (p < cm) q.push_back(0);
      if (md == 1 || v < cm) return;
      v -= cm;
    end
    forever begin
      if (v >= (1 << kk)) begin
        q.push_back(1);
        v -= (1 << kk);
        kk++;
      end else begin
        q.push_back(0);
        while (kk-- > 0) q.push_back((v >> kk) & 1);
        break;
      end
    end
  endfunction

  initial begin
    bit q[$];
    bit pend;
    int n_ovf = 0;
    in_valid = 0; mode = 0; value = 0; cmax = 0; k = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    pend = 0;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      if (pend) begin
        bit ok;
        int el;
        el = (q.size() > 64) ? 64 : q.size();
        ok = out_valid && (len == 7'(el)) && (len_ovf == (q.size() > 64));
        for (int i = 0; i < el; i++) if (bin_str[i] != q[i]) ok = 0;
        for (int i = el; i < 64; i++) if (bin_str[i]) ok = 0;
        checks++;
        if (q.size() > 64) n_ovf++;
        if (!ok) begin
          failures++;
          if (failures < 6) $display("FAIL mode %0d v %0d cmax %0d k %0d: len %0d exp %0d bins %b", mode, value, cmax, k, len, q.size(), bin_str);
        end
      end
      in_valid = $urandom_range(0, 3) != 0;
      pend = in_valid;
      mode = 2'($urandom_range(0, 3));
      case ($urandom_range(0, 3))
        0: value = 16'($urandom_range(0, 20));
        1: value = 16'($urandom_range(0, 100));
        2: value = 16'($urandom_range(0, 2000));
        default: value = 16'($urandom);
      endcase
      cmax = 6'($urandom_range(1, 63));
      if ($urandom_range(0, 1)) cmax = 14;   // the usual UEG0 cutoff for levels
      k = 4'($urandom_range(0, 4));
      if (in_valid) model(mode, value, cmax, k, q);
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow case seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
