// pc_reg_tb: self-checking test of the PC register: synchronous reset to
// RESET_PC (overridden to a non-zero value here), then the register must
// follow d one clock edge later.
module pc_reg_tb;
  localparam logic [31:0] RST = 32'h0000_0200;
  logic clk = 0, reset;
  logic [31:0] d, q, prev_d;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pc_reg #(.WIDTH(32), .RESET_PC(RST)) dut (.clk, .reset, .d, .q);

  initial begin
    reset = 1; d = $urandom;
    @(posedge clk); @(posedge clk); #1;
    checks++; if (q !== RST) begin failures++; $display("FAIL reset q=%h", q); end
    reset = 0;
    repeat (200) begin
      d = $urandom; prev_d = d;
      @(posedge clk); #1;
      checks++; if (q !== prev_d) begin failures++; $display("FAIL q=%h expected %h", q, prev_d); end
    end
    d = 32'h1234; reset = 1;
    @(posedge clk); #1;
    checks++; if (q !== RST) begin failures++; $display("FAIL reset priority q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
