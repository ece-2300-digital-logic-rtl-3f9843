// mul_tb: self-checking test of the 32-bit multiplier.
// The reference is the low word of a 64-bit product, worked out by
// shift-and-add so that it does not reuse the '*' operator of the design.
module mul_tb;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mul #(.WIDTH(32)) dut (.a, .b, .y);

  function automatic logic [31:0] ref_mul(logic [31:0] x, logic [31:0] z);
    logic [31:0] acc = '0;
    for (int i = 0; i < 32; i++) if (z[i]) acc += x << i;
    return acc;
  endfunction

  task automatic check(input logic [31:0] ta, tb_);
    a = ta; b = tb_; #1;
    checks++;
    if (y !== ref_mul(ta, tb_)) begin
      failures++; $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, y, ref_mul(ta, tb_));
    end
  endtask

  initial begin
    check(0, 5); check(3, 7); check(32'hFFFF_FFFF, 32'hFFFF_FFFF); check(32'hFFFF_FFFE, 3);
    check(32'h0001_0000, 32'h0001_0000); check(32'd12345, 32'd6789);
    repeat (500) check($urandom, $urandom);
    repeat (200) check($urandom_range(0, 65535), $urandom_range(0, 65535));
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
