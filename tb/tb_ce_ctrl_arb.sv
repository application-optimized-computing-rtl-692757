// tb_ce_ctrl_arb: checks the per-slice arbiter between the two processor
// instruction ports. Random request patterns and random back-pressure
// (out_ready). Checks: the forwarded instruction is the granted port's;
// ready goes only to the granted port; a lone requester is always granted;
// under conflict the grant alternates (round robin: the port that was just
// served loses the next conflict); no port waits more than one other
// transfer. Counts conflicts so the test cannot pass without them.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_ctrl_arb;
  import ce_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid [2], req_ready [2];
  ce_instr_t req_instr [2], out_instr;
  logic out_valid, out_ready;
  logic [0:0] grant;
  ce_ctrl_arb dut (.*);

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 6) $display("FAIL %s", s); end
  endtask

  initial begin
    int last = 1;     // port served last (reset prefers port 0)
    int wait_n [2] = '{0, 0};
    int conflicts = 0;
    req_valid = '{0, 0}; req_instr = '{default: '0}; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      bit served [2];
      int g;
      @(negedge clk);
      for (int p = 0; p < 2; p++)
        if (!req_valid[p]) begin   // a requester keeps its request until served
          req_valid[p] = $urandom_range(0, 1);
          req_instr[p] = ce_instr_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        end
      out_ready = $urandom_range(0, 4) != 0;
      #1;
      chk(out_valid == (req_valid[0] || req_valid[1]), "out_valid");
      g = grant;
      if (out_valid) begin
        chk(req_valid[g], "grant to a requester");
        chk(out_instr == req_instr[g], "instruction mux");
        chk(req_ready[g] == out_ready && !req_ready[1 - g], "ready routing");
        if (req_valid[0] && req_valid[1]) begin
          conflicts++;
          chk(g != last, "round robin");
        end
      end
      for (int p = 0; p < 2; p++) served[p] = req_valid[p] && req_ready[p];
      @(posedge clk);
      #1;
      for (int p = 0; p < 2; p++) begin
        if (served[p]) begin
          last = p; wait_n[p] = 0; req_valid[p] = 0;
        end else if (req_valid[p] && (served[0] || served[1])) wait_n[p]++;
        chk(wait_n[p] <= 1, "starvation bound");
      end
    end
    chk(conflicts > 100, "conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
