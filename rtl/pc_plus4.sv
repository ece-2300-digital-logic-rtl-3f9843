// pc_plus4: the "+4" unit.
//
// Purely combinational: y = a + 4, wrapping modulo 2^WIDTH. The datapath uses
// it for the sequential next PC (pc_plus4) and, for lw.ai, to increment the
// base register. Interface: a in, y out; no clock.
module pc_plus4 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);
  always_comb y = a + WIDTH'(4);
endmodule
