// pc_reg: the program counter.
//
// A WIDTH-bit register loaded with the next PC on every rising clock edge,
// so one instruction retires per cycle. A synchronous, active-high reset
// loads RESET_PC; the reset value and reset style are this design's choice.
// Interface: clk, reset, d (next PC) in; q (current PC) out.
module pc_reg #(
  parameter int unsigned         WIDTH    = 32,
  parameter logic [WIDTH-1:0]    RESET_PC = '0
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (reset) q <= RESET_PC;
    else       q <= d;
  end
endmodule
