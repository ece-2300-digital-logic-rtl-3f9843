// mux2_tb: self-checking test of the 2-to-1 multiplexer with random data and
// both select values.
module mux2_tb;
  logic [31:0] in0, in1, y;
  logic        sel;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mux2 #(.WIDTH(32)) dut (.in0, .in1, .sel, .y);

  initial begin
    repeat (300) begin
      in0 = $urandom; in1 = $urandom; sel = 1'($urandom); #1;
      checks++;
      if (y !== (sel ? in1 : in0)) begin
        failures++; $display("FAIL mux2 sel=%0d y=%h", sel, y);
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
