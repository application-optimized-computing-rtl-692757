// mv_cost: fixed-function motion-vector cost block for IME / FME.
//
// The rate part of a motion-search cost grows with the number of bits
// needed to code the motion vector difference. This block looks the bit
// count of each component up in a table and scales it by lambda:
//   cost = lambda * (LUT[min(|mv_x - pred_x|, NLUT-1)]
//                  + LUT[min(|mv_y - pred_y|, NLUT-1)])
// The table (NLUT entries of 8 bits) is written by software through the
// lut_we port, so any bit-count model can be loaded. in_valid starts a
// lookup; cost is registered and valid one cycle later with out_valid.
//
// That MV cost is a lookup-table operation in a fixed-function block
// follows the CE description; the table size, clamping, the lambda
// multiply and the write port are choices of this design. Reset is
// asynchronous, active low; the table resets to zero.
module mv_cost #(
  parameter int unsigned NLUT = 64,
  parameter int unsigned MVW  = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    lut_we,
  input  logic [$clog2(NLUT)-1:0] lut_addr,
  input  logic [7:0]              lut_wdata,
  input  logic                    in_valid,
  input  logic signed [MVW-1:0]   mv_x,
  input  logic signed [MVW-1:0]   mv_y,
  input  logic signed [MVW-1:0]   pred_x,
  input  logic signed [MVW-1:0]   pred_y,
  input  logic [7:0]              lambda,
  output logic                    out_valid,
  output logic [16:0]             cost
);

  localparam int unsigned AW = $clog2(NLUT);
  logic [7:0] lut [NLUT];

  function automatic logic [AW-1:0] idx(input logic signed [MVW-1:0] a,
                                        input logic signed [MVW-1:0] b);
    logic signed [MVW:0] d;
    logic [MVW:0] m;
    d = {a[MVW-1], a} - {b[MVW-1], b};
    m = (d < 0) ? (MVW+1)'(-d) : (MVW+1)'(d);
    return (m > (MVW+1)'(NLUT - 1)) ? AW'(NLUT - 1) : AW'(m);
  endfunction

  logic [8:0] bits;
  assign bits = 9'(lut[idx(mv_x, pred_x)]) + 9'(lut[idx(mv_y, pred_y)]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLUT; i++) lut[i] <= '0;
      out_valid <= 1'b0;
      cost      <= '0;
    end else begin
      if (lut_we) lut[lut_addr] <= lut_wdata;
      out_valid <= in_valid;
      if (in_valid) cost <= 17'(bits) * 17'(lambda);
    end
  end

endmodule
