// alu_tb: self-checking test of the ALU: addition (with carry-out dropped)
// and the equality compare, on random operands and on equal pairs.
module alu_tb;
  import proc_pkg::*;
  logic [31:0] a, b, y, expected;
  alu_func_t   func;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu #(.WIDTH(32)) dut (.a, .b, .func, .y);

  task automatic check(input logic [31:0] ta, tb_, input alu_func_t f);
    logic [32:0] s;
    a = ta; b = tb_; func = f; #1;
    s = {1'b0, ta} + {1'b0, tb_};
    expected = (f == ALU_ADD) ? s[31:0] : ((ta ^ tb_) == 0 ? 32'd1 : 32'd0);
    checks++;
    if (y !== expected) begin
      failures++; $display("FAIL alu f=%0d a=%h b=%h y=%h expected %h", f, ta, tb_, y, expected);
    end
  endtask

  initial begin
    logic [31:0] r;
    check(32'hFFFF_FFFF, 1, ALU_ADD); check(5, 32'hFFFF_FFFF, ALU_ADD);
    check(0, 0, ALU_CMP); check(7, 7, ALU_CMP); check(7, 6, ALU_CMP); check(32'h8000_0000, 0, ALU_CMP);
    repeat (300) check($urandom, $urandom, ALU_ADD);
    repeat (200) check($urandom, $urandom, ALU_CMP);
    repeat (200) begin r = $urandom; check(r, r, ALU_CMP); end
    // operands that differ in exactly one bit, every position
    for (int k = 0; k < 32; k++) begin r = $urandom; check(r, r ^ (32'd1 << k), ALU_CMP); end
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
