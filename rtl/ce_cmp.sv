// ce_cmp: Convolution Engine chip multiprocessor, with the H.264 custom
// units beside it.
//
// The CE CMP pairs two processors with four CE slices. Each processor
// drives CE instructions through its own instruction port (core_*); every
// instruction names a target slice, and each slice has a control interface
// (ce_ctrl_arb) that multiplexes the two ports and arbitrates when both
// issue to it at once. Slices 0 and 1 carry the complex graph fusion unit;
// slices 2 and 3 do not. Every slice has its own 256-bit port to the data
// memory (cache), brought out as mem_* arrays; the processors, which also
// generate the addresses, and the caches are outside this module.
// Two fixed-function blocks work next to the slices: the Hadamard SATD
// block reads the 4x4 residues at rows 0..3, columns 0..3 of slice 1's
// output register (had_start starts it), and the motion-vector cost
// table block is driven directly from its own ports (mvc_*).
//
// The H.264 custom datapaths (IME SAD array, FME half-pixel up-sampler,
// CABAC coefficient LIFO and binarizer) are separate designs and stand
// beside the CMP with their own ports (ime_*, fme_*, lifo_*, bin_*).
//
// Four slices, two processor ports, CGFUs in slices 0 and 1, the muxed and
// arbitrated instruction ports and the fixed-function blocks follow the CE
// CMP description. Slice concatenation (joining the registers and ALUs of
// neighbouring slices into a wider slice) is not built: each slice works on
// its own. Reset is asynchronous, active low; rst_n also appears in the
// disable condition of assertions, which some tools report as a synchronous
// use. A simulator may report each slice's ready signal as circular logic:
// ready depends on the granted instruction and the grant depends only on the
// processors' valid and slice fields, never on ready, so there is no loop.
module ce_cmp
  import ce_pkg::*;
#(
  parameter int unsigned NSLICE = 4,
  parameter int unsigned NCORE  = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor instruction ports
  input  logic          core_valid [NCORE],
  input  ce_instr_t     core_instr [NCORE],
  output logic          core_ready [NCORE],
  // per-slice data memory ports
  output logic          mem_req    [NSLICE],
  output logic          mem_we     [NSLICE],
  output logic [31:0]   mem_addr   [NSLICE],
  output logic [MEMW-1:0]   mem_wdata [NSLICE],
  output logic [MEMW/8-1:0] mem_wstrb [NSLICE],
  input  logic          mem_gnt    [NSLICE],
  input  logic          mem_rvalid [NSLICE],
  input  logic [MEMW-1:0]   mem_rdata [NSLICE],
  // Hadamard / SATD block (reads slice 1 output register)
  input  logic          had_start,
  output logic          had_valid,
  output logic [17:0]   had_satd,
  // motion vector cost block
  input  logic          mvc_lut_we,
  input  logic [5:0]    mvc_lut_addr,
  input  logic [7:0]    mvc_lut_wdata,
  input  logic          mvc_valid,
  input  logic signed [11:0] mvc_mv_x,
  input  logic signed [11:0] mvc_mv_y,
  input  logic signed [11:0] mvc_pred_x,
  input  logic signed [11:0] mvc_pred_y,
  input  logic [7:0]    mvc_lambda,
  output logic          mvc_out_valid,
  output logic [16:0]   mvc_cost,
  // IME SAD array
  input  logic          ime_ld_we,
  input  logic [3:0]    ime_ld_row,
  input  logic          ime_ld_half,
  input  logic [127:0]  ime_ld_data,
  input  logic          ime_sh_en,
  input  logic [1:0]    ime_sh_dir,
  input  logic          ime_cur_we,
  input  logic [3:0]    ime_cur_row,
  input  logic [127:0]  ime_cur_data,
  input  logic          ime_sad_en,
  output logic          ime_sad_valid,
  output logic [15:0]   ime_sad16,
  output logic [11:0]   ime_sad4 [4][4],
  // FME up-sampler
  input  logic          fme_in_valid,
  input  logic [7:0]    fme_p [10],
  output logic          fme_out_valid,
  output logic [7:0]    fme_h_row [5],
  output logic [7:0]    fme_v_int [5],
  output logic [7:0]    fme_v_half [5],
  // CABAC coefficient LIFO
  input  logic          lifo_push,
  input  logic signed [15:0] lifo_push_data,
  input  logic          lifo_pop,
  output logic signed [15:0] lifo_top,
  output logic          lifo_top_zero,
  output logic          lifo_rest_zero,
  output logic          lifo_empty,
  output logic          lifo_full,
  output logic [4:0]    lifo_count,
  // CABAC binarizer
  input  logic          bin_in_valid,
  input  logic [1:0]    bin_mode,
  input  logic [15:0]   bin_value,
  input  logic [5:0]    bin_cmax,
  input  logic [3:0]    bin_k,
  output logic          bin_out_valid,
  output logic [63:0]   bin_str,
  output logic [6:0]    bin_len,
  output logic          bin_len_ovf
);

  // ------------------------------------------------ slices and arbiters
  logic   core_rdy [NSLICE][NCORE];
  data_t  out_reg  [NSLICE][ROWS2D][COLS2D];

  for (genvar s = 0; s < NSLICE; s++) begin : g_slice
    logic      rq_valid [NCORE];
    logic      rq_ready [NCORE];
    logic      sl_valid, sl_ready;
    ce_instr_t sl_instr;
    logic [$clog2(NCORE > 1 ? NCORE : 2)-1:0] grant;

    for (genvar c = 0; c < NCORE; c++) begin : g_core
      assign rq_valid[c]    = core_valid[c] && (int'(core_instr[c].slice) == s);
      assign core_rdy[s][c] = rq_ready[c];
    end

    ce_ctrl_arb #(.NCORE(NCORE)) u_arb (
      .clk(clk), .rst_n(rst_n),
      .req_valid(rq_valid), .req_instr(core_instr), .req_ready(rq_ready),
      .out_valid(sl_valid), .out_instr(sl_instr), .out_ready(sl_ready), .grant(grant)
    );

    ce_slice #(.HAS_CGFU(s < 2)) u_slice (
      .clk(clk), .rst_n(rst_n),
      .instr_valid(sl_valid), .instr(sl_instr), .instr_ready(sl_ready),
      .mem_req(mem_req[s]), .mem_we(mem_we[s]), .mem_addr(mem_addr[s]),
      .mem_wdata(mem_wdata[s]), .mem_wstrb(mem_wstrb[s]), .mem_gnt(mem_gnt[s]),
      .mem_rvalid(mem_rvalid[s]), .mem_rdata(mem_rdata[s]),
      .out_reg(out_reg[s])
    );
  end

  always_comb
    for (int c = 0; c < NCORE; c++) begin
      core_ready[c] = 1'b0;
      for (int s = 0; s < NSLICE; s++)
        if (core_instr[c].slice == 2'(s)) core_ready[c] = core_rdy[s][c];
    end

  // ------------------------------------------------ fixed-function blocks
  data_t had_in [4][4];
  for (genvar r = 0; r < 4; r++) begin : g_hr
    for (genvar c = 0; c < 4; c++) begin : g_hc
      assign had_in[r][c] = out_reg[(NSLICE > 1) ? 1 : 0][r][c];
    end
  end
  logic signed [15:0] had_coef [4][4];

  hadamard4x4 u_had (
    .clk(clk), .rst_n(rst_n), .in_valid(had_start), .d(had_in),
    .out_valid(had_valid), .satd(had_satd), .coef(had_coef)
  );

  mv_cost #(.NLUT(64), .MVW(12)) u_mvc (
    .clk(clk), .rst_n(rst_n), .lut_we(mvc_lut_we), .lut_addr(mvc_lut_addr),
    .lut_wdata(mvc_lut_wdata), .in_valid(mvc_valid), .mv_x(mvc_mv_x), .mv_y(mvc_mv_y),
    .pred_x(mvc_pred_x), .pred_y(mvc_pred_y), .lambda(mvc_lambda),
    .out_valid(mvc_out_valid), .cost(mvc_cost)
  );

  // ------------------------------------------------ H.264 custom units
  ime_sad_array #(.N(16)) u_ime (
    .clk(clk), .rst_n(rst_n), .ld_we(ime_ld_we), .ld_row(ime_ld_row), .ld_half(ime_ld_half),
    .ld_data(ime_ld_data), .sh_en(ime_sh_en), .sh_dir(ime_sh_dir), .cur_we(ime_cur_we),
    .cur_row(ime_cur_row), .cur_data(ime_cur_data), .sad_en(ime_sad_en),
    .sad_valid(ime_sad_valid), .sad16(ime_sad16), .sad4(ime_sad4)
  );

  fme_upsampler u_fme (
    .clk(clk), .rst_n(rst_n), .in_valid(fme_in_valid), .p(fme_p),
    .out_valid(fme_out_valid), .h_row(fme_h_row), .v_int(fme_v_int), .v_half(fme_v_half)
  );

  cabac_lifo #(.DEPTH(16), .CW(16)) u_lifo (
    .clk(clk), .rst_n(rst_n), .push(lifo_push), .push_data(lifo_push_data), .pop(lifo_pop),
    .top(lifo_top), .top_zero(lifo_top_zero), .rest_zero(lifo_rest_zero),
    .empty(lifo_empty), .full(lifo_full), .count(lifo_count)
  );

  cabac_binarizer #(.VW(16), .MAXBINS(64)) u_bin (
    .clk(clk), .rst_n(rst_n), .in_valid(bin_in_valid), .mode(bin_mode), .value(bin_value),
    .cmax(bin_cmax), .k(bin_k), .out_valid(bin_out_valid), .bin_str(bin_str),
    .len(bin_len), .len_ovf(bin_len_ovf)
  );

endmodule
