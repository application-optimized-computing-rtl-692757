// cabac_binarizer: unary and Exp-Golomb binarization for CABAC.
//
// CABAC turns each non-binary syntax element into a string of binary
// decisions (bins) before context modelling and arithmetic coding. This
// block produces, in one cycle, the bin strings that are otherwise built
// bit by bit in a software loop:
//
//   MODE_UNARY   value v -> v ones then a zero.
//   MODE_TU      truncated unary with maximum cmax: as unary, but the
//                closing zero is left out when v == cmax.
//   MODE_EGK     k-th order Exp-Golomb: while v >= 2^k emit 1, subtract
//                2^k and increment k; emit 0; then the k low bits of what
//                is left, most significant first.
//   MODE_UEGK    truncated-unary prefix with cutoff ucoff (cmax), followed,
//                when v >= ucoff, by the k-th order Exp-Golomb suffix of
//                v - ucoff (the concatenation used for levels and motion
//                vector differences).
//
// bin_str[0] is the first bin, len the number of bins; strings longer than
// MAXBINS are cut (len_ovf set). in_valid starts a conversion; the result
// is registered and valid one cycle later with out_valid.
//
// That CABAC binarization uses unary and Exp-Golomb codes produced by
// dedicated logic follows the CABAC description; the code definitions are
// those of the H.264 standard, and the port encoding, MAXBINS and timing
// are choices of this design. Reset is asynchronous, active low.
module cabac_binarizer #(
  parameter int unsigned VW      = 16,
  parameter int unsigned MAXBINS = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [1:0]     mode,     // 0 unary, 1 TU, 2 EGk, 3 UEGk
  input  logic [VW-1:0]  value,
  input  logic [5:0]     cmax,     // TU maximum / UEGk cutoff
  input  logic [3:0]     k,
  output logic           out_valid,
  output logic [MAXBINS-1:0] bin_str,
  output logic [6:0]     len,
  output logic           len_ovf
);

  localparam logic [1:0] MODE_UNARY = 2'd0, MODE_TU = 2'd1, MODE_EGK = 2'd2, MODE_UEGK = 2'd3;

  logic [MAXBINS-1:0] b;
  logic [7:0]         n;
  logic               ovf;

  always_comb begin
    logic [VW:0]  v, pre;
    logic [4:0]   kk;
    logic         do_suffix;
    b = '0;
    n = '0;
    ovf = 1'b0;
    v = {1'b0, value};
    do_suffix = 1'b0;
    pre = '0;
    kk = '0;
    // ---------------- unary / truncated-unary prefix
    if (mode != MODE_EGK) begin
      if (mode == MODE_UNARY) pre = v;
      else pre = (v > (VW+1)'(cmax)) ? (VW+1)'(cmax) : v;
      for (int i = 0; i < MAXBINS; i++) b[i] = ((VW+1)'(i) < pre);
      if (pre > (VW+1)'(MAXBINS)) begin
        ovf = 1'b1;
        n   = 8'(MAXBINS);
      end else begin
        n = 8'(pre);
      end
      if (mode == MODE_UNARY || pre < (VW+1)'(cmax)) begin
        if (int'(n) < MAXBINS) b[$clog2(MAXBINS)'(n)] = 1'b0; else ovf = 1'b1;
        n = n + 8'd1;
      end
      if (mode == MODE_UEGK && v >= (VW+1)'(cmax)) begin
        do_suffix = 1'b1;
        v = v - (VW+1)'(cmax);
      end
    end else begin
      do_suffix = 1'b1;
    end
    // ---------------- Exp-Golomb (order k) part
    if (do_suffix) begin
      kk = 5'(k);
      for (int i = 0; i <= VW; i++) begin
        if (kk > 5'(VW) || v < ((VW+1)'(1) << kk)) break;
        if (int'(n) < MAXBINS) b[$clog2(MAXBINS)'(n)] = 1'b1; else ovf = 1'b1;
        n  = n + 8'd1;
        v  = v - ((VW+1)'(1) << kk);
        kk = kk + 5'd1;
      end
      if (int'(n) < MAXBINS) b[$clog2(MAXBINS)'(n)] = 1'b0; else ovf = 1'b1;
      n = n + 8'd1;
      for (int i = VW; i >= 0; i--) begin
        if (i < int'(kk)) begin
          if (int'(n) < MAXBINS) b[$clog2(MAXBINS)'(n)] = v[i]; else ovf = 1'b1;
          n = n + 8'd1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bin_str   <= '0;
      len       <= '0;
      len_ovf   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        bin_str <= b;
        len     <= (n > 8'(MAXBINS)) ? 7'(MAXBINS) : 7'(n);
        len_ovf <= ovf;
      end
    end
  end

endmodule
