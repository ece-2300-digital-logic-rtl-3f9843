// adder_tb: self-checking test of the 32-bit adder.
// Drives corner cases and random operand pairs and compares y with a sum
// computed in 64-bit arithmetic and truncated. A watchdog ends the run.
module adder_tb;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  adder #(.WIDTH(32)) dut (.a, .b, .y);

  task automatic check(input logic [31:0] ta, tb_);
    logic [63:0] ref64;
    a = ta; b = tb_; #1;
    ref64 = {32'b0, ta} + {32'b0, tb_};
    checks++;
    if (y !== ref64[31:0]) begin
      failures++; $display("FAIL adder %h + %h = %h, expected %h", ta, tb_, y, ref64[31:0]);
    end
  endtask

  initial begin
    check(0, 0); check(32'hFFFF_FFFF, 1); check(32'h7FFF_FFFF, 1); check(32'h1234_5678, 32'hFFFF_FFFC);
    repeat (500) check($urandom, $urandom);
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
