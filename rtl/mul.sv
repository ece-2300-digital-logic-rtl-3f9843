// mul: WIDTH-bit combinational multiplier.
//
// y holds the low WIDTH bits of a * b, which is the same for signed and
// unsigned operands. It completes within the single cycle, as the processor
// needs; the low-word result matches RISC-V mul and is this design's reading
// of "R[rd] <- R[rs1] x R[rs2]". Interface: a, b in; y out; no clock.
module mul #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a * b;
endmodule
