// ce_ldst: load/store unit of a Convolution Engine slice.
//
// Moves data between the slice's register files and the data memory. The
// processor supplies the byte address; this unit turns it into one or two
// accesses of whole 256-bit memory lines, so any width (64, 128 or 256
// bits) can start at any byte address (unaligned access). Loads return a
// vector of 10-bit register elements unpacked from 8-bit (zero- or
// sign-extended) or 16-bit memory elements. With interleave set, the
// elements are split: even elements on ld_a, odd ones on ld_b, each half
// as many (used to separate colour channels of a Bayer image). Stores take
// a row of register elements, pack them as 8-bit (saturated) or 16-bit
// (sign-extended) elements, and write them with byte strobes, again one or
// two lines.
//
// Memory port: one request at a time. mem_req is held until mem_gnt; read
// data follows with mem_rvalid any number of cycles later. A load or store
// therefore takes two cycles per line plus the memory's own latency;
// `done` pulses for one cycle when the result (ld_a/ld_b/ld_ne) is valid
// or the store has been accepted. `start` is accepted only while !busy.
//
// The 256-bit maximum width, unaligned access and interleaved loads follow
// the CE description; the line-based protocol, element packing and
// saturation are choices of this design. Reset is asynchronous, active low.
module ce_ldst
  import ce_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          start,
  input  logic          is_store,
  input  logic [31:0]   addr,
  input  mwidth_e       width,
  input  logic          elem16,
  input  logic          sext,
  input  logic          interleave,
  input  data_t         st_row [COLS2D],
  output logic          busy,
  output logic          done,
  output data_t         ld_a [MAXLD],
  output data_t         ld_b [MAXLD],
  output logic [5:0]    ld_ne,
  // data memory port (256-bit lines)
  output logic          mem_req,
  output logic          mem_we,
  output logic [31:0]   mem_addr,
  output logic [MEMW-1:0]   mem_wdata,
  output logic [MEMW/8-1:0] mem_wstrb,
  input  logic          mem_gnt,
  input  logic          mem_rvalid,
  input  logic [MEMW-1:0]   mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_REQ0, S_WAIT0, S_REQ1, S_WAIT1, S_DONE} state_e;
  state_e state;

  localparam int unsigned LB = MEMW / 8;  // bytes per line

  logic          st_q, e16_q, sext_q, il_q, two_q;
  logic [31:0]   line0_q;
  logic [4:0]    off_q;
  logic [6:0]    nbytes_q;
  logic [MEMW-1:0] buf0_q, buf1_q;
  logic [2*MEMW-1:0]  sdata_q;
  logic [2*LB-1:0]    smask_q;

  // ---------------------------------------------------- command decode
  logic [6:0] nbytes;
  always_comb begin
    unique case (width)
      MW_64:   nbytes = 7'd8;
      MW_128:  nbytes = 7'd16;
      default: nbytes = 7'd32;
    endcase
  end

  // store packing: element i -> bytes, shifted to the byte offset
  logic [2*MEMW-1:0] spack;
  logic [2*LB-1:0]   smask;
  always_comb begin
    logic [MEMW-1:0] bytes;
    logic [LB-1:0]   bm;
    int ne;
    bytes = '0;
    bm    = '0;
    ne    = elem16 ? int'(nbytes) / 2 : int'(nbytes);
    if (ne > COLS2D) ne = COLS2D;
    for (int i = 0; i < COLS2D; i++) begin
      if (i < ne) begin
        if (elem16) begin
          bytes[16*i +: 16] = 16'(signed'(st_row[i]));
          bm[2*i +: 2]      = 2'b11;
        end else begin
          if (sext)
            bytes[8*i +: 8] = (st_row[i] > 127) ? 8'h7f :
                              (st_row[i] < -128) ? 8'h80 : 8'(st_row[i]);
          else
            bytes[8*i +: 8] = (st_row[i] > 255) ? 8'hff :
                              (st_row[i] < 0) ? 8'h00 : 8'(st_row[i]);
          bm[i] = 1'b1;
        end
      end
    end
    spack = {{MEMW{1'b0}}, bytes} << (8 * addr[4:0]);
    smask = {{LB{1'b0}}, bm} << addr[4:0];
  end

  // ---------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      st_q     <= 1'b0;
      e16_q    <= 1'b0;
      sext_q   <= 1'b0;
      il_q     <= 1'b0;
      two_q    <= 1'b0;
      line0_q  <= '0;
      off_q    <= '0;
      nbytes_q <= '0;
      buf0_q   <= '0;
      buf1_q   <= '0;
      sdata_q  <= '0;
      smask_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          st_q     <= is_store;
          e16_q    <= elem16;
          sext_q   <= sext;
          il_q     <= interleave;
          line0_q  <= {addr[31:5], 5'd0};
          off_q    <= addr[4:0];
          nbytes_q <= nbytes;
          two_q    <= (7'(addr[4:0]) + nbytes) > 7'(LB);
          sdata_q  <= spack;
          smask_q  <= smask;
          buf1_q   <= '0;
          state    <= S_REQ0;
        end
        S_REQ0: if (mem_gnt) state <= st_q ? (two_q ? S_REQ1 : S_DONE) : S_WAIT0;
        S_WAIT0: if (mem_rvalid) begin
          buf0_q <= mem_rdata;
          state  <= two_q ? S_REQ1 : S_DONE;
        end
        S_REQ1: if (mem_gnt) state <= st_q ? S_DONE : S_WAIT1;
        S_WAIT1: if (mem_rvalid) begin
          buf1_q <= mem_rdata;
          state  <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_comb begin
    mem_req   = (state == S_REQ0) || (state == S_REQ1);
    mem_we    = mem_req && st_q;
    mem_addr  = (state == S_REQ1) ? line0_q + 32'(LB) : line0_q;
    mem_wdata = (state == S_REQ1) ? sdata_q[2*MEMW-1:MEMW] : sdata_q[MEMW-1:0];
    mem_wstrb = (state == S_REQ1) ? smask_q[2*LB-1:LB] : smask_q[LB-1:0];
  end

  // ---------------------------------------------------- load unpacking
  always_comb begin
    logic [2*MEMW-1:0] win;
    data_t el [MAXLD];
    int ne;
    win = {buf1_q, buf0_q} >> (8 * off_q);
    ne  = e16_q ? int'(nbytes_q) / 2 : int'(nbytes_q);
    for (int i = 0; i < MAXLD; i++) begin
      if (i >= ne)      el[i] = '0;
      else if (e16_q)   el[i] = data_t'(win[16*i +: DW]);
      else if (sext_q)  el[i] = data_t'(signed'(win[8*i +: 8]));
      else              el[i] = data_t'({2'b00, win[8*i +: 8]});
    end
    for (int i = 0; i < MAXLD; i++) begin
      ld_a[i] = '0;
      ld_b[i] = '0;
    end
    if (il_q) begin
      for (int i = 0; i < MAXLD / 2; i++) begin
        ld_a[i] = el[2*i];
        ld_b[i] = el[2*i+1];
      end
      ld_ne = 6'(ne / 2);
    end else begin
      for (int i = 0; i < MAXLD; i++) ld_a[i] = el[i];
      ld_ne = 6'(ne);
    end
  end

  // ---------------------------------------------------- protocol checks
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 mem_req && !mem_gnt |=> mem_req && $stable(mem_addr));

endmodule
