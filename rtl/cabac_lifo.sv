// cabac_lifo: coefficient LIFO with zero flags for CABAC binarization.
//
// CABAC codes the quantised DCT coefficients of a block in reverse scan
// order, so the coefficients are pushed in scan order and popped last
// first. Each entry stores a coefficient and a one-bit flag that marks a
// zero coefficient. Because the flags are held apart, the block can answer
// in one cycle questions that otherwise take a loop over a register file:
// whether the top entry is zero (top_zero), and whether every other entry
// still stored is zero (rest_zero), which tells the significance-map coder
// that the top coefficient is the last significant one.
//
// push and pop take effect at the clock edge; pushing a full LIFO or
// popping an empty one is ignored (and flagged by an assertion). Pushing
// and popping in the same cycle replaces the top entry. top, top_zero,
// rest_zero and count reflect the stored state (no bypass).
//
// The 16-entry depth and per-entry zero flag follow the CABAC
// description; the coefficient width, rest_zero and the handshake are
// choices of this design. Reset is asynchronous, active low.
module cabac_lifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned CW    = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push,
  input  logic signed [CW-1:0]    push_data,
  input  logic                    pop,
  output logic signed [CW-1:0]    top,
  output logic                    top_zero,
  output logic                    rest_zero,
  output logic                    empty,
  output logic                    full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CNTW = $clog2(DEPTH+1);

  logic signed [CW-1:0] mem  [DEPTH];
  logic [DEPTH-1:0]     zflag;
  localparam int unsigned IW = $clog2(DEPTH);
  logic [IW-1:0] wr_i, top_i;        // next free entry, top entry
  assign wr_i  = IW'(count);
  assign top_i = IW'(count - 1'b1);

  assign empty = (count == '0);
  assign full  = (count == CNTW'(DEPTH));
  assign top      = empty ? '0 : mem[top_i];
  assign top_zero = empty ? 1'b0 : zflag[top_i];

  always_comb begin
    rest_zero = 1'b1;
    for (int i = 0; i < DEPTH; i++)
      if (i + 1 < int'(count) && !zflag[i]) rest_zero = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      zflag <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push && pop && !empty) begin
        mem[top_i]   <= push_data;
        zflag[top_i] <= (push_data == 0);
      end else if (push && !full) begin
        mem[wr_i]    <= push_data;
        zflag[wr_i]  <= (push_data == 0);
        count        <= count + 1'b1;
      end else if (pop && !empty) begin
        count <= count - 1'b1;
      end
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push && !pop |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
