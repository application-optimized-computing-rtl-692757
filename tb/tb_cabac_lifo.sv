// tb_cabac_lifo: checks the coefficient LIFO against a queue model. Random
// push, pop and push+pop (replace top) operations, kept legal (no push when
// full, no pop when empty); every cycle compares top, top_zero, rest_zero,
// empty, full and count. A directed part fills the stack to DEPTH and
// drains it, and builds runs of zeros so rest_zero is seen both ways.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_cabac_lifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, top_zero, rest_zero, empty, full;
  logic signed [15:0] push_data, top;
  logic [4:0] count;
  cabac_lifo dut (.*);
  int m[$];

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic compare();
    bit rz;
    rz = 1;
    for (int i = 0; i + 1 < m.size(); i++) if (m[i] != 0) rz = 0;
    checks++;
    if (count != 5'(m.size()) || empty != (m.size() == 0) || full != (m.size() == 16) ||
        (m.size() > 0 && (top != 16'(m[$]) || top_zero != (m[$] == 0))) ||
        (m.size() == 0 && top_zero) || rest_zero != rz) begin
      failures++;
      if (failures < 6) $display("FAIL size %0d count %0d top %0d", m.size(), count, top);
    end
  endtask

  task automatic step(bit pu, bit po, int v);
    @(negedge clk);
    push = pu; pop = po; push_data = 16'(v);
    @(posedge clk);
    if (pu && po) m[$] = v;
    else if (pu) m.push_back(v);
    else if (po) void'(m.pop_back());
    #1 push = 0; pop = 0;
    compare();
  endtask

  initial begin
    int n_rz1 = 0, n_rz0 = 0;
    push = 0; pop = 0; push_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare();
    for (int i = 0; i < 16; i++) step(1, 0, (i % 3 == 0) ? 0 : i - 8);
    for (int i = 0; i < 16; i++) step(0, 1, 0);
    for (int it = 0; it < 20000; it++) begin
      int r, v;
      r = $urandom_range(0, 9);
      v = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(0, 200) - 100;
      if (r < 4 && m.size() < 16) step(1, 0, v);
      else if (r < 7 && m.size() > 0) step(0, 1, 0);
      else if (r < 8 && m.size() > 0) step(1, 1, v);
      else step(0, 0, 0);
      if (m.size() > 1) begin if (rest_zero) n_rz1++; else n_rz0++; end
    end
    checks++;
    if (n_rz1 == 0 || n_rz0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
