// regfile_tb: self-checking test of the register file against an array
// model: random writes on both ports (including same-register collisions and
// writes to x0), random reads on both read ports after every clock edge.
module regfile_tb;
  logic clk = 0;
  logic [4:0]  raddr0, raddr1;
  logic [31:0] rdata0, rdata1;
  logic [1:0]        wen;
  logic [1:0][4:0]   waddr;
  logic [1:0][31:0]  wdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int collisions = 0;
  always #5 clk = ~clk;

  regfile #(.WIDTH(32), .NREGS(32), .NWRITE(2)) dut (.clk, .raddr0, .rdata0, .raddr1, .rdata1, .wen, .waddr, .wdata);

  task automatic check_reads();
    for (int r = 0; r < 32; r++) begin
      raddr0 = 5'(r); raddr1 = 5'($urandom); #1;
      checks += 2;
      if (rdata0 !== model[r]) begin failures++; $display("FAIL r0 x%0d=%h expected %h", r, rdata0, model[r]); end
      if (rdata1 !== model[raddr1]) begin failures++; $display("FAIL r1 x%0d=%h expected %h", raddr1, rdata1, model[raddr1]); end
    end
  endtask

  initial begin
    // initialise every register through port 0
    wen = 2'b01;
    for (int r = 0; r < 32; r++) begin
      waddr[0] = 5'(r); wdata[0] = $urandom; waddr[1] = '0; wdata[1] = '0;
      model[r] = (r == 0) ? 32'b0 : wdata[0];
      @(posedge clk); #1;
    end
    wen = 2'b00; check_reads();
    repeat (300) begin
      wen = 2'($urandom);
      waddr[0] = 5'($urandom); waddr[1] = ($urandom_range(0, 3) == 0) ? waddr[0] : 5'($urandom);
      wdata[0] = $urandom; wdata[1] = $urandom;
      if (wen == 2'b11 && waddr[0] == waddr[1]) collisions++;
      if (wen[1] && waddr[1] != 0) model[waddr[1]] = wdata[1];
      if (wen[0] && waddr[0] != 0) model[waddr[0]] = wdata[0];
      // before the edge the old values must still be visible
      raddr0 = waddr[0]; raddr1 = waddr[1]; #1;
      @(posedge clk); #1;
      wen = 2'b00;
      raddr0 = waddr[0]; raddr1 = waddr[1]; #1;
      checks += 2;
      if (rdata0 !== model[raddr0]) begin failures++; $display("FAIL wr x%0d=%h expected %h", raddr0, rdata0, model[raddr0]); end
      if (rdata1 !== model[raddr1]) begin failures++; $display("FAIL wr x%0d=%h expected %h", raddr1, rdata1, model[raddr1]); end
    end
    check_reads();
    checks++; if (collisions == 0) begin failures++; $display("FAIL no write collision exercised"); end
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
