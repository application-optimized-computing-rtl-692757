// ce_ctrl_arb: control interface of a Convolution Engine slice.
//
// Several processors can drive the same slice; each has its own CE
// instruction port (valid / instruction / ready). This block multiplexes
// the NCORE ports onto the slice's single instruction port and arbitrates
// when more than one processor issues to the slice in the same cycle.
// Arbitration is round robin: the port that was served last has the lowest
// priority next time. A port must hold its instruction until it sees
// ready; the grant only moves after a completed handshake, so a stalled
// slice keeps serving the same port.
//
// That the ports are multiplexed and that the control interface arbitrates
// on conflicts follows the CE CMP description; round-robin priority and
// the valid/ready handshake are choices of this design. The path from
// request to the slice is combinational. Reset is asynchronous, active low.
module ce_ctrl_arb
  import ce_pkg::*;
#(
  parameter int unsigned NCORE = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid [NCORE],
  input  ce_instr_t  req_instr [NCORE],
  output logic       req_ready [NCORE],
  output logic       out_valid,
  output ce_instr_t  out_instr,
  input  logic       out_ready,
  output logic [$clog2(NCORE > 1 ? NCORE : 2)-1:0] grant
);

  localparam int unsigned GW = $clog2(NCORE > 1 ? NCORE : 2);
  logic [GW-1:0] prio_q;   // port with the highest priority

  always_comb begin
    int idx;
    grant = prio_q;
    for (int i = NCORE - 1; i >= 0; i--) begin
      idx = (int'(prio_q) + i) % NCORE;
      if (req_valid[idx]) grant = GW'(idx);
    end
    out_valid = req_valid[grant];
    out_instr = req_instr[grant];
    for (int i = 0; i < NCORE; i++)
      req_ready[i] = out_ready && (grant == GW'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prio_q <= '0;
    else if (out_valid && out_ready)
      prio_q <= (int'(grant) == NCORE - 1) ? '0 : grant + 1'b1;
  end

endmodule
