// tb_mem_model: behavioural data memory for the CE testbenches (stands in
// for the data cache). 256-bit lines, byte write strobes, one outstanding
// request. The grant is withheld at random (when STALLS is set) and read
// data returns 1 to 3 cycles after the grant, so the slice's wait states
// are exercised. The testbench reads and writes `bytes` directly.
//
// This is a test helper of this design, not part of the described hardware.
module tb_mem_model #(
  parameter int unsigned BYTES  = 4096,
  parameter bit          STALLS = 1'b1
) (
  input  logic         clk,
  input  logic         req,
  input  logic         we,
  input  logic [31:0]  addr,
  input  logic [255:0] wdata,
  input  logic [31:0]  wstrb,
  output logic         gnt,
  output logic         rvalid,
  output logic [255:0] rdata
);
  logic [7:0] bytes [BYTES];
  logic       allow = 1'b1;
  int         pend = 0;
  logic [255:0] pdata;
  int unsigned grants = 0, denials = 0;

  assign gnt = req && allow && (pend == 0);

  initial begin
    for (int i = 0; i < BYTES; i++) bytes[i] = '0;
    rvalid = 0;
    rdata  = '0;
  end

  always @(posedge clk) begin
    rvalid <= 1'b0;
    if (pend > 0) begin
      pend <= pend - 1;
      if (pend == 1) begin
        rvalid <= 1'b1;
        rdata  <= pdata;
      end
    end
    if (req && !gnt) denials++;
    if (gnt) begin
      grants++;
      if (we) begin
        for (int i = 0; i < 32; i++)
          if (wstrb[i]) bytes[(addr + i) % BYTES] <= wdata[8*i +: 8];
      end else begin
        for (int i = 0; i < 32; i++) pdata[8*i +: 8] <= bytes[(addr + i) % BYTES];
        pend <= $urandom_range(1, 3);
      end
    end
    allow <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
  end
endmodule
