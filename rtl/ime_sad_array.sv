// ime_sad_array: custom storage and SAD datapath for H.264 integer motion
// estimation (IME).
//
// IME slides the current 16x16 macroblock over a search window and scores
// each position with the sum of absolute differences (SAD). This block
// keeps both blocks in dedicated registers so one full 256-pixel SAD is
// produced per cycle without register-file or cache traffic:
//
//   reference register  N rows x 2N pixels, written one N-pixel (128-bit)
//                       half-row per load (ld_row, ld_half), and shifted as
//                       a whole by one pixel left/right or one row up/down
//                       in a single cycle. Pixels entering at an edge are 0;
//                       a load in the same cycle overrides its half-row.
//   current register    N x N pixels, one row per write (cur_we, cur_row).
//   SAD array           N row units of N absolute-difference units each
//                       compare the current block with reference columns
//                       0..N-1; row sums are reduced to the 16x16 SAD and to
//                       the sixteen 4x4 sub-block SADs, from which the larger
//                       H.264 partitions are formed.
//
// Timing: when sad_en is high the SAD of the registers as they are in that
// cycle appears on sad16/sad4 one cycle later with sad_valid; a shift or
// load in the same cycle only affects the next SAD. The register sizes,
// four-direction shift, 128-bit load and write ports, 256-operation SAD
// array and in-place reduction follow the IME datapath description; the
// 4x4 sub-SAD outputs, edge fill and control encoding are this design's.
// Pixels are unsigned 8-bit. Reset is asynchronous, active low.
module ime_sad_array #(
  parameter int unsigned N = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // reference register
  input  logic               ld_we,
  input  logic [$clog2(N)-1:0] ld_row,
  input  logic               ld_half,
  input  logic [8*N-1:0]     ld_data,
  input  logic               sh_en,
  input  logic [1:0]         sh_dir,    // 0 left, 1 right, 2 up, 3 down
  // current register
  input  logic               cur_we,
  input  logic [$clog2(N)-1:0] cur_row,
  input  logic [8*N-1:0]     cur_data,
  // SAD
  input  logic               sad_en,
  output logic               sad_valid,
  output logic [$clog2(N*N*255+1)-1:0] sad16,
  output logic [$clog2(16*255+1)-1:0]  sad4 [N/4][N/4]
);

  localparam int unsigned SW  = $clog2(N*N*255+1);
  localparam int unsigned S4W = $clog2(16*255+1);

  logic [7:0] refr [N][2*N];
  logic [7:0] cur  [N][N];

  // absolute differences, 4x4 partial sums
  logic [S4W-1:0] p4 [N/4][N/4];
  logic [SW-1:0]  total;
  always_comb begin
    for (int br = 0; br < N/4; br++)
      for (int bc = 0; bc < N/4; bc++) p4[br][bc] = '0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        // |a - b| as (d xor sign) + sign: one subtractor and one incrementer
        logic [8:0] d;
        d = {1'b0, refr[r][c]} - {1'b0, cur[r][c]};
        p4[r/4][c/4] = p4[r/4][c/4] + S4W'((d[7:0] ^ {8{d[8]}}) + {7'd0, d[8]});
      end
    total = '0;
    for (int br = 0; br < N/4; br++)
      for (int bc = 0; bc < N/4; bc++) total = total + SW'(p4[br][bc]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) begin
        for (int c = 0; c < 2*N; c++) refr[r][c] <= '0;
        for (int c = 0; c < N; c++)   cur[r][c]  <= '0;
      end
      sad_valid <= 1'b0;
      sad16     <= '0;
      for (int br = 0; br < N/4; br++)
        for (int bc = 0; bc < N/4; bc++) sad4[br][bc] <= '0;
    end else begin
      if (sh_en) begin
        for (int r = 0; r < N; r++)
          for (int c = 0; c < 2*N; c++)
            unique case (sh_dir)
              2'd0: refr[r][c] <= (c < 2*N-1) ? refr[r][c+1] : 8'd0;
              2'd1: refr[r][c] <= (c > 0)     ? refr[r][c-1] : 8'd0;
              2'd2: refr[r][c] <= (r < N-1)   ? refr[r+1][c] : 8'd0;
              default: refr[r][c] <= (r > 0)  ? refr[r-1][c] : 8'd0;
            endcase
      end
      if (ld_we)
        for (int c = 0; c < N; c++) refr[ld_row][ld_half ? N + c : c] <= ld_data[8*c +: 8];
      if (cur_we)
        for (int c = 0; c < N; c++) cur[cur_row][c] <= cur_data[8*c +: 8];
      sad_valid <= sad_en;
      if (sad_en) begin
        sad16 <= total;
        sad4  <= p4;
      end
    end
  end

endmodule
