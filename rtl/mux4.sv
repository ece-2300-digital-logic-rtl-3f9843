// mux4: WIDTH-bit 4-to-1 multiplexer.
//
// Combinational: y = in[sel]. The datapath uses it for the write-back select
// (ALU, multiplier, load data, PC+4) and for the next-PC select (PC+4,
// jump/branch target, register target; the fourth input repeats PC+4).
module mux4 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [3:0][WIDTH-1:0] in,
  input  logic [1:0]            sel,
  output logic [WIDTH-1:0]      y
);
  always_comb y = in[sel];
endmodule
