// regfile: the integer register file.
//
// NREGS registers of WIDTH bits with two combinational read ports (rs1, rs2)
// and NWRITE write ports that update at the rising clock edge. Register 0
// always reads as zero and ignores writes. Port 0 carries the rd write-back;
// port 1 exists for the base-register increment of lw.ai. If two ports write
// the same register in one cycle, port 0 wins. Registers are not reset.
// A read in the cycle of a write returns the old value; the new value is seen
// from the next cycle, which is all a single-cycle processor needs.
module regfile #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned NREGS  = 32,
  parameter int unsigned NWRITE = 2,
  localparam int unsigned AW    = $clog2(NREGS)
) (
  input  logic                        clk,
  input  logic [AW-1:0]               raddr0,
  output logic [WIDTH-1:0]            rdata0,
  input  logic [AW-1:0]               raddr1,
  output logic [WIDTH-1:0]            rdata1,
  input  logic [NWRITE-1:0]           wen,
  input  logic [NWRITE-1:0][AW-1:0]   waddr,
  input  logic [NWRITE-1:0][WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] regs [NREGS];

  always_comb begin
    rdata0 = (raddr0 == '0) ? '0 : regs[raddr0];
    rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  end

  // Highest-numbered port first so that port 0 has the last word.
  always_ff @(posedge clk) begin
    for (int p = NWRITE - 1; p >= 0; p--) begin
      if (wen[p] && waddr[p] != '0) regs[waddr[p]] <= wdata[p];
    end
  end
endmodule
