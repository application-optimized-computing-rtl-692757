// ce_slice: one Convolution Engine slice.
//
// A slice executes the CE instruction stream that a processor issues to it
// (one instruction per handshake on instr_valid/instr_ready). It holds the
// register files, the load/store unit, the interface units, 64 ALUs, the
// tapped reduction tree with normaliser, the 16-lane SIMD unit and, when
// HAS_CGFU is set, the complex graph fusion unit.
//
// Instruction classes:
//   SET_CE_OPS / SET_CE_OPSIZE   latch map op, reduce op, normalisation
//                                shift; kernel size and tap mask.
//   LD_COEFF / LD_1D / LD_2D     load/store unit reads memory, then the row
//                                is written (with optional shift). LD_2D with
//                                interleave puts even elements in the 2D
//                                input register and odd ones in the output
//                                register.
//   ST_OUT                       store the top row of the output register.
//   CONVOLVE_1D_HOR/_VER/_2D     interface units -> ALUs (cycle 1, results
//                                registered) -> reduction + normalise ->
//                                write row 0 of the output register, or of
//                                the 2D input register when dst_in2d is set
//                                (cycle 2); shift_en shifts rows down first.
//   SIMD                         output-register row operation, one cycle.
//   SET_FUSION / EXE_SHUFFLE /   CGFU configuration, shuffle and fusion,
//   EXE_FUSION                   one cycle each (slices with HAS_CGFU);
//                                EXE_FUSION reloads the CGFU status
//                                register only when shift_en is set.
//
// Timing: compute instructions issue back to back, one per cycle, with a
// two-cycle latency. instr_ready drops (a stall) while a load or store is
// in progress, when a memory, SIMD or CGFU instruction follows a compute
// whose result is not yet written, and when a vertical or 2D compute
// follows a compute that writes the 2D input register. Loads and stores
// take two cycles per memory line plus the memory latency.
//
// The block structure, register sizes and instruction set follow the CE
// description; the pipelining, interlocks and instruction encoding are
// choices of this design. Reset is asynchronous, active low.
module ce_slice
  import ce_pkg::*;
#(
  parameter bit HAS_CGFU = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          instr_valid,
  input  ce_instr_t     instr,
  output logic          instr_ready,
  // data memory port
  output logic          mem_req,
  output logic          mem_we,
  output logic [31:0]   mem_addr,
  output logic [MEMW-1:0]   mem_wdata,
  output logic [MEMW/8-1:0] mem_wstrb,
  input  logic          mem_gnt,
  input  logic          mem_rvalid,
  input  logic [MEMW-1:0]   mem_rdata,
  // output register, read by fixed-function blocks
  output data_t         out_reg [ROWS2D][COLS2D]
);

  // ------------------------------------------------------------ state
  map_op_e     map_q;
  red_op_e     red_q;
  logic [4:0]  norm_q;
  ksize_e      ks_q;
  logic [15:0] mask_q;

  // register files
  data_t r1d [W1D];
  data_t r2d [ROWS2D][COLS2D];
  data_t rco [CROWS][CCOLS];
  data_t rout[ROWS2D][COLS2D];
  assign out_reg = rout;

  // ------------------------------------------------------------ decode
  logic fire, is_comp, is_mem, is_local, reads_r2d;
  assign fire     = instr_valid && instr_ready;
  assign is_comp  = instr.op inside {OP_CONV_1D_HOR, OP_CONV_1D_VER, OP_CONV_2D};
  assign is_mem   = instr.op inside {OP_LD_COEFF, OP_LD_1D, OP_LD_2D, OP_ST_OUT};
  assign is_local = instr.op inside {OP_SIMD, OP_EXE_SHUFFLE, OP_EXE_FUSION};
  assign reads_r2d = instr.op inside {OP_CONV_1D_VER, OP_CONV_2D};

  // compute pipeline stage 2 registers
  logic        v2_q, ok2_q, in2d2_q, sh2_q;
  logic [4:0]  col2_q, norm2_q;
  red_op_e     red2_q;
  tap_e        tap2_q;
  logic [NALU-1:0] en2_q;
  alu_t        y2_q [NALU];

  // load/store bookkeeping
  logic        ld_busy, ld_done;
  ce_op_e      mop_q;
  logic        msh_q, mil_q;
  logic [3:0]  mrow_q;
  logic [4:0]  mcol_q;
  data_t       ld_a [MAXLD];
  data_t       ld_b [MAXLD];
  logic [5:0]  ld_ne;

  always_comb begin
    instr_ready = !ld_busy;
    if (v2_q && (is_mem || is_local)) instr_ready = 1'b0;
    if (v2_q && ok2_q && in2d2_q && reads_r2d) instr_ready = 1'b0;
  end

  // ------------------------------------------------------------ map stage
  flow_e  flow;
  data_t  opa [NALU];
  data_t  opb [NALU];
  logic [NALU-1:0] lane_en;
  tap_e   tap;
  logic   cfg_ok;
  alu_t   y [NALU];

  always_comb begin
    unique case (instr.op)
      OP_CONV_1D_VER: flow = FLOW_1D_VER;
      OP_CONV_2D:     flow = FLOW_2D;
      default:        flow = FLOW_1D_HOR;
    endcase
  end

  ce_interface u_if (
    .flow(flow), .ksize(ks_q), .in_off(instr.in_off), .v_off(instr.v_off),
    .crow(instr.row), .mask(mask_q), .r1d(r1d), .r2d(r2d), .rco(rco),
    .a(opa), .b(opb), .lane_en(lane_en), .tap(tap), .cfg_ok(cfg_ok)
  );

  ce_alu_array u_alu (.op(map_q), .a(opa), .b(opb), .y(y));

  // ------------------------------------------------------------ reduce stage
  data_t      res [NOUTMAX];
  red_t       res_raw [NOUTMAX];
  logic [4:0] nres;

  ce_reduce u_red (
    .op(red2_q), .tap(tap2_q), .norm_shift(norm2_q), .lane_en(en2_q), .y(y2_q),
    .res(res), .raw(res_raw), .nres(nres)
  );

  // ------------------------------------------------------------ SIMD
  data_t simd_y [NLANE];
  ce_simd u_simd (
    .op(instr.simd_op), .row_a(instr.row), .row_b(instr.row_b), .imm(instr.imm),
    .rout(rout), .y(simd_y)
  );

  // ------------------------------------------------------------ CGFU
  data_t fus_a [NLANE];
  data_t fus_b [NLANE];
  logic  fus_we;
  if (HAS_CGFU) begin : g_cgfu
    data_t in_rows  [4][COLS2D];
    data_t out_rows [4][COLS2D];
    logic [2:0] status [NLANE];
    for (genvar r = 0; r < 4; r++) begin : g_rows
      assign in_rows[r]  = r2d[r];
      assign out_rows[r] = rout[r];
    end
    ce_cgfu u_cgfu (
      .clk(clk), .rst_n(rst_n),
      .shuf_en(fire && instr.op == OP_EXE_SHUFFLE), .shuf_src(instr.row[2:0]),
      .shuf_shift(instr.imm[4:0]), .shuf_stride2(instr.interleave), .shuf_dst(instr.row_b),
      .in_rows(in_rows), .out_rows(out_rows),
      .cfg_we(fire && instr.op == OP_SET_FUSION), .cfg_arr(instr.row_b[0]),
      .cfg_fu(instr.row), .cfg_word(instr.cfg[16:0]),
      .fuse_en(fire && instr.op == OP_EXE_FUSION), .status_we(instr.shift_en),
      .fus_a(fus_a), .fus_b(fus_b), .status(status)
    );
    assign fus_we = fire && instr.op == OP_EXE_FUSION;
  end else begin : g_nocgfu
    for (genvar l = 0; l < NLANE; l++) begin : g_z
      assign fus_a[l] = '0;
      assign fus_b[l] = '0;
    end
    assign fus_we = 1'b0;
  end

  // ------------------------------------------------------------ load/store
  data_t st_row [COLS2D];
  assign st_row = rout[0];

  ce_ldst u_ldst (
    .clk(clk), .rst_n(rst_n),
    .start(fire && is_mem), .is_store(instr.op == OP_ST_OUT), .addr(instr.addr),
    .width(instr.width), .elem16(instr.elem16), .sext(instr.sext),
    .interleave(instr.interleave), .st_row(st_row),
    .busy(ld_busy), .done(ld_done), .ld_a(ld_a), .ld_b(ld_b), .ld_ne(ld_ne),
    .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_wstrb(mem_wstrb), .mem_gnt(mem_gnt), .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata)
  );

  logic ld_wr;
  assign ld_wr = ld_done && (mop_q != OP_ST_OUT);

  ce_regfiles u_rf (
    .clk(clk), .rst_n(rst_n),
    .ld1d_we(ld_wr && mop_q == OP_LD_1D), .ld1d_shift(msh_q), .ld1d_ne(ld_ne), .ld1d_data(ld_a),
    .ld2d_we(ld_wr && mop_q == OP_LD_2D), .ld2d_shift(msh_q), .ld2d_col(mcol_q),
    .ld2d_ne(ld_ne), .ld2d_data(ld_a),
    .ldco_we(ld_wr && mop_q == OP_LD_COEFF), .ldco_row(mrow_q), .ldco_ne(ld_ne), .ldco_data(ld_a),
    .ldout_we(ld_wr && mop_q == OP_LD_2D && mil_q), .ldout_shift(msh_q), .ldout_col(mcol_q),
    .ldout_ne(ld_ne), .ldout_data(ld_b),
    .res_we(v2_q && ok2_q), .res_to_in2d(in2d2_q), .res_shift(sh2_q), .res_col(col2_q),
    .res_n(nres), .res_data(res),
    .simd_we(fire && instr.op == OP_SIMD), .simd_row(instr.row_d), .simd_data(simd_y),
    .fus_we(fus_we), .fus_a(fus_a), .fus_b(fus_b),
    .r1d(r1d), .r2d(r2d), .rco(rco), .rout(rout)
  );

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_q   <= MAP_MULT;
      red_q   <= RED_ADD;
      norm_q  <= '0;
      ks_q    <= KS_4;
      mask_q  <= '1;
      v2_q    <= 1'b0;
      ok2_q   <= 1'b0;
      in2d2_q <= 1'b0;
      sh2_q   <= 1'b0;
      col2_q  <= '0;
      norm2_q <= '0;
      red2_q  <= RED_ADD;
      tap2_q  <= TAP_16;
      en2_q   <= '0;
      for (int i = 0; i < NALU; i++) y2_q[i] <= '0;
      mop_q   <= OP_NOP;
      msh_q   <= 1'b0;
      mil_q   <= 1'b0;
      mrow_q  <= '0;
      mcol_q  <= '0;
    end else begin
      v2_q <= fire && is_comp;
      if (fire) begin
        unique case (instr.op)
          OP_SET_OPS: begin
            map_q  <= instr.map_op;
            red_q  <= instr.red_op;
            norm_q <= instr.norm_shift;
          end
          OP_SET_OPSIZE: begin
            ks_q   <= instr.ksize;
            mask_q <= instr.mask;
          end
          default: ;
        endcase
        if (is_comp) begin
          ok2_q   <= cfg_ok;
          in2d2_q <= instr.dst_in2d;
          sh2_q   <= instr.shift_en;
          col2_q  <= instr.out_off;
          norm2_q <= norm_q;
          red2_q  <= red_q;
          tap2_q  <= tap;
          en2_q   <= lane_en;
          y2_q    <= y;
        end
        if (is_mem) begin
          mop_q  <= instr.op;
          msh_q  <= instr.shift_en;
          mil_q  <= instr.interleave;
          mrow_q <= instr.row;
          mcol_q <= instr.in_off[4:0];
        end
      end
    end
  end

  a_no_cgfu_op: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> HAS_CGFU || !(instr.op inside {OP_EXE_SHUFFLE, OP_EXE_FUSION, OP_SET_FUSION}));

endmodule
