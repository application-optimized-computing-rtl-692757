// tb_ce_ldst: random aligned and unaligned loads (8/16-bit elements, zero
// and sign extension, interleaved split) and stores (saturating packing,
// byte strobes) of 64/128/256 bits through the load/store unit, checked
// against the memory model. Also checks that an access that crosses a
// line takes two memory requests and an aligned one takes one.
//
// The stimulus, the reference models and the pass/fail criteria are this
// test's own; the expected behaviour is the one described in the opening
// comment of the unit under test, which says which parts follow the
// Convolution Engine / H.264 unit descriptions. Clock period 10 time units.
module tb_ce_ldst;
  import ce_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, is_store, elem16, sext, interleave, busy, done;
  logic [31:0] addr;
  mwidth_e width;
  data_t st_row [COLS2D];
  data_t ld_a [MAXLD], ld_b [MAXLD];
  logic [5:0] ld_ne;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr;
  logic [255:0] mem_wdata, mem_rdata;
  logic [31:0] mem_wstrb;

  ce_ldst dut (.*);
  tb_mem_model #(.BYTES(1024)) mem (.clk(clk), .req(mem_req), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .wstrb(mem_wstrb), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int nreq;
  always @(posedge clk) if (mem_req && mem_gnt) nreq++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    start = 0; is_store = 0; elem16 = 0; sext = 0; interleave = 0; addr = 0; width = MW_64;
    for (int i = 0; i < COLS2D; i++) st_row[i] = '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 1024; i++) mem.bytes[i] = 8'($urandom);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int nb, ne, base;
      logic [7:0] snap [1024];
      @(negedge clk);
      is_store = $urandom_range(0, 2) == 0;
      width = mwidth_e'($urandom_range(0, 2));
      elem16 = $urandom; sext = $urandom; interleave = !is_store && ($urandom_range(0, 3) == 0);
      addr = (it % 4 == 0) ? 32'($urandom_range(0, 28) * 32) : 32'($urandom_range(0, 960));
      for (int i = 0; i < COLS2D; i++) st_row[i] = data_t'($urandom);
      nb = 8 << int'(width);
      ne = elem16 ? nb / 2 : nb;
      base = addr;
      snap = mem.bytes;
      nreq = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      chk(nreq == (((addr % 32) + nb > 32) ? 2 : 1), "number of line requests");
      if (!is_store) begin
        int n_out;
        n_out = interleave ? ne / 2 : ne;
        chk(int'(ld_ne) == n_out, "element count");
        for (int e = 0; e < ne; e++) begin
          longint exp_v, got;
          if (elem16) exp_v = longint'(signed'(data_t'({mem.bytes[base + 2*e + 1], mem.bytes[base + 2*e]})));
          else if (sext) exp_v = longint'(signed'(mem.bytes[base + e]));
          else exp_v = longint'(mem.bytes[base + e]);
          if (interleave) got = (e % 2) ? ld_b[e/2] : ld_a[e/2];
          else got = ld_a[e];
          chk(got == exp_v, $sformatf("load element %0d addr %0d", e, addr));
        end
      end else begin
        @(negedge clk);
        @(negedge clk);
        for (int i = 0; i < 1024; i++) begin
          int rel;
          logic [7:0] eb;
          rel = i - base;
          eb = snap[i];
          if (rel >= 0 && rel < nb) begin
            int e;
            e = elem16 ? rel / 2 : rel;
            if (e < COLS2D) begin
              if (elem16) eb = 8'(16'(signed'(st_row[e])) >> (8 * (rel % 2)));
              else if (sext) eb = (st_row[e] > 127) ? 8'h7f : (st_row[e] < -128) ? 8'h80 : 8'(st_row[e]);
              else eb = (st_row[e] > 255) ? 8'hff : (st_row[e] < 0) ? 8'h00 : 8'(st_row[e]);
            end
          end
          if (rel >= -8 && rel < nb + 8) chk(mem.bytes[i] == eb, $sformatf("store byte %0d", i));
          else if (mem.bytes[i] != eb) chk(0, "store touched a far byte");
        end
      end
    end
    chk(mem.denials > 0, "grant was withheld at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
