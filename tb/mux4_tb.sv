// mux4_tb: self-checking test of the 4-to-1 multiplexer: every select value
// with random data on all four inputs.
module mux4_tb;
  logic [3:0][31:0] in;
  logic [1:0]       sel;
  logic [31:0]      y, expected;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mux4 #(.WIDTH(32)) dut (.in, .sel, .y);

  initial begin
    repeat (400) begin
      for (int i = 0; i < 4; i++) in[i] = $urandom;
      sel = 2'($urandom); #1;
      case (sel)
        2'd0: expected = in[0];
        2'd1: expected = in[1];
        2'd2: expected = in[2];
        default: expected = in[3];
      endcase
      checks++;
      if (y !== expected) begin
        failures++; $display("FAIL mux4 sel=%0d y=%h expected %h", sel, y, expected);
      end
    end
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
