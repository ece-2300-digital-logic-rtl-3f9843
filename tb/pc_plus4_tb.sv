// pc_plus4_tb: self-checking test of the +4 unit.
// Drives corner cases, inputs whose increment carries into every bit
// position, and random inputs, and compares y with a + 4 computed in 64-bit
// arithmetic and truncated. A watchdog ends the run.
module pc_plus4_tb;
  logic [31:0] a, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  pc_plus4 #(.WIDTH(32)) dut (.a, .y);

  task automatic check(input logic [31:0] ta);
    logic [63:0] ref64;
    a = ta; #1;
    ref64 = {32'b0, ta} + 64'd4;
    checks++;
    if (y !== ref64[31:0]) begin
      failures++; $display("FAIL plus4 %h = %h, expected %h", ta, y, ref64[31:0]);
    end
  endtask

  initial begin
    check(0); check(32'hFFFF_FFFF); check(32'h7FFF_FFFC); check(32'h1234_5678);
    for (int k = 2; k < 32; k++) check((32'd1 << k) - 4);
    repeat (500) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
