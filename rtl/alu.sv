// alu: the processor's arithmetic unit.
//
// Two functions, chosen by func: ALU_ADD gives y = a + b (add, addi and the
// lw/sw address), ALU_CMP gives y = 1 when a == b and 0 otherwise (bne). The
// control unit reads the eq status from bit 0 of y while the compare is
// selected. Addition follows the instruction semantics; the compare function
// and its encoding are this design's choice. Combinational, no clock.
module alu
  import proc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_func_t        func,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (func)
      ALU_ADD: y = a + b;
      ALU_CMP: y = WIDTH'(a == b);
      default: y = a + b;
    endcase
  end
endmodule
