// mux2: WIDTH-bit 2-to-1 multiplexer.
//
// Combinational: y = in0 when sel is 0, in1 when sel is 1. The datapath uses
// it as the op2_sel mux that chooses between R[rs2] and the immediate.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? in1 : in0;
endmodule
