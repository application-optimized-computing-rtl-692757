// ce_interface: interface units (IF) of a Convolution Engine slice.
//
// The interface units turn the register files into the 64 operand pairs of
// the ALU array, so that several stencil positions are computed in one
// instruction ("shifted broadcast"). Three data flows are supported:
//
//   1D horizontal  K = 4/8/16 taps, 64/K outputs. Lane j*K+t reads
//                  1D register element in_off+j+t (a shifted copy of the
//                  register per output position).
//   1D vertical    K = 4/8/16 taps, 64/K outputs. Lane j*K+t reads the 2D
//                  input register at row v_off+t, column in_off+j
//                  (column access).
//   2D             4x4 (4 outputs) or 8x8 (1 output). Lane j*K*K+r*K+c
//                  reads the 2D input register at row v_off+r, column
//                  in_off+j+c.
//
// The coefficient interface replicates the kernel for every output: for
// the 1D flows operand b of lane j*K+t is coefficient row crow, column t;
// for 2D it is coefficient row r, column c. The tap mask from
// SET_CE_OPSIZE enables tap t (1D) or element r*4+c (4x4); the 8x8 flow
// uses every tap. The chosen flow also selects the reduction tap point.
// A 16x16 2D stencil needs 256 ALUs, i.e. four concatenated slices, and is
// reported as not valid here. Reads outside a register return 0.
//
// The flows, kernel sizes and offsets follow the CE description; the lane
// ordering and mask mapping are choices of this design. Combinational.
//
// Implementation: the runtime offsets are applied once, by shifting the 1D
// register by in_off and the 2D register by v_off rows and in_off columns;
// after that every lane reads a fixed position of the shifted copies for
// each kernel size, and the kernel size only selects among those wirings.
// This keeps the operand routing to two barrel shifters and a 3:1 mux per
// lane instead of a full crossbar.
module ce_interface
  import ce_pkg::*;
(
  input  flow_e       flow,
  input  ksize_e      ksize,
  input  logic [5:0]  in_off,
  input  logic [3:0]  v_off,
  input  logic [3:0]  crow,
  input  logic [15:0] mask,
  input  data_t       r1d [W1D],
  input  data_t       r2d [ROWS2D][COLS2D],
  input  data_t       rco [CROWS][CCOLS],
  output data_t       a   [NALU],
  output data_t       b   [NALU],
  output logic [NALU-1:0] lane_en,
  output tap_e        tap,
  output logic        cfg_ok
);

  localparam int unsigned SH1 = 19;   // 1D positions used: j + t <= 18

  // ------------------------------------------------ offset shifters
  data_t sh1d [SH1];
  data_t sh2d [ROWS2D][COLS2D];
  always_comb begin
    data_t rs [ROWS2D][COLS2D];
    for (int c = 0; c < SH1; c++)
      sh1d[c] = (int'(in_off) + c < W1D) ? r1d[int'(in_off) + c] : '0;
    for (int r = 0; r < ROWS2D; r++)
      for (int c = 0; c < COLS2D; c++)
        rs[r][c] = (int'(v_off) + r < ROWS2D) ? r2d[int'(v_off) + r][c] : '0;
    for (int r = 0; r < ROWS2D; r++)
      for (int c = 0; c < COLS2D; c++)
        sh2d[r][c] = (int'(in_off) + c < COLS2D) ? rs[r][int'(in_off) + c] : '0;
  end

  // ------------------------------------------------ fixed wirings
  // index g: 0 -> K=4, 1 -> K=8, 2 -> K=16 (1D); 0 -> 4x4, 1 -> 8x8 (2D)
  data_t hor_a [3][NALU];
  data_t ver_a [3][NALU];
  data_t d1_b  [3][NALU];
  logic  d1_en [3][NALU];
  data_t d2_a  [2][NALU];
  data_t d2_b  [2][NALU];
  logic  d2_en [2][NALU];

  for (genvar g = 0; g < 3; g++) begin : g_1d
    localparam int K = 4 << g;
    for (genvar i = 0; i < NALU; i++) begin : g_lane
      localparam int J = i / K;
      localparam int T = i % K;
      assign hor_a[g][i] = sh1d[J + T];
      assign ver_a[g][i] = sh2d[T][J];
      assign d1_b[g][i]  = rco[crow][T];
      assign d1_en[g][i] = mask[T];
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_2d
    localparam int K  = 4 << g;
    localparam int KK = K * K;
    for (genvar i = 0; i < NALU; i++) begin : g_lane
      localparam int J = i / KK;
      localparam int R = (i % KK) / K;
      localparam int C = i % K;
      assign d2_a[g][i]  = sh2d[R][J + C];
      assign d2_b[g][i]  = rco[R][C];
      assign d2_en[g][i] = (K == 4) ? mask[R * 4 + C] : 1'b1;
    end
  end

  // ------------------------------------------------ flow / size select
  always_comb begin
    int g;
    g = (ksize == KS_4) ? 0 : (ksize == KS_8) ? 1 : 2;
    cfg_ok = 1'b1;
    tap    = TAP_16;
    for (int i = 0; i < NALU; i++) begin
      a[i] = '0;
      b[i] = '0;
      lane_en[i] = 1'b0;
    end
    unique case (flow)
      FLOW_1D_HOR, FLOW_1D_VER: begin
        tap = (g == 0) ? TAP_4 : (g == 1) ? TAP_8 : TAP_16;
        for (int i = 0; i < NALU; i++) begin
          a[i] = (flow == FLOW_1D_HOR) ? hor_a[g][i] : ver_a[g][i];
          b[i] = d1_b[g][i];
          lane_en[i] = d1_en[g][i];
        end
      end
      FLOW_2D: begin
        if (g == 2) begin
          cfg_ok = 1'b0;
          tap    = TAP_64;
        end else begin
          tap = (g == 0) ? TAP_16 : TAP_64;
          for (int i = 0; i < NALU; i++) begin
            a[i] = d2_a[g][i];
            b[i] = d2_b[g][i];
            lane_en[i] = d2_en[g][i];
          end
        end
      end
      default: cfg_ok = 1'b0;
    endcase
  end

endmodule
