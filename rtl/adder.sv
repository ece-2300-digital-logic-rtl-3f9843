// adder: WIDTH-bit two-operand adder.
//
// Purely combinational, y = a + b modulo 2^WIDTH. In the datapath it adds the
// PC and the immediate to form the jump/branch target (jalbr_targ) used by
// jal and a taken bne. Interface: a, b in; y out; no clock.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a + b;
endmodule
