// sc_proc_base_tb: test of the plain eight-instruction configuration
// (HAS_LW_AI = 0). A short program checks that add, addi, mul, lw, sw, jal,
// jr and bne still work, that lw.ai is treated as a no-op (neither rd nor rs1
// changes, no memory access), and that each instruction takes one cycle.
module sc_proc_base_tb;
  import tb_asm_pkg::*;
  logic clk = 0, reset;
  logic host_wen;
  logic [31:0] host_addr, host_wdata, host_rdata, trace_pc, trace_inst;
  logic [31:0] prog [32];
  int checks = 0, failures = 0, cycles = 0;
  always #5 clk = ~clk;

  sc_proc_top #(.MEM_WORDS(1024), .RESET_PC(32'h0), .HAS_LW_AI(1'b0)) dut (
    .clk, .reset, .host_wen, .host_addr, .host_wdata, .host_rdata, .trace_pc, .trace_inst);

  task automatic chk(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  task automatic chk_mem(input string what, input logic [31:0] a, exp);
    host_addr = a; #1;
    chk(what, host_rdata, exp);
  endtask

  initial begin
    for (int i = 0; i < 32; i++) prog[i] = asm_jal(0, 0);
    prog[0]  = asm_addi(1, 0, 12'h400);
    prog[1]  = asm_addi(2, 0, 7);
    prog[2]  = asm_addi(3, 0, 55);
    prog[3]  = asm_sw  (2, 0, 1);        // M[400] = 7
    prog[4]  = asm_lwai(3, 0, 1);        // no-op here
    prog[5]  = asm_sw  (3, 4, 1);        // M[404] = 55
    prog[6]  = asm_sw  (1, 8, 1);        // M[408] = 0x400
    prog[7]  = asm_mul (4, 2, 2);
    prog[8]  = asm_lw  (5, 0, 1);        // 7
    prog[9]  = asm_add (4, 4, 5);        // 56
    prog[10] = asm_sw  (4, 12, 1);       // M[40C] = 56
    prog[11] = asm_jal (6, 8);           // to 13, x6 = 48
    prog[12] = asm_sw  (0, 12, 1);       // skipped
    prog[13] = asm_addi(7, 0, 68);
    prog[14] = asm_bne (6, 0, 8);        // taken, to 16
    prog[15] = asm_sw  (0, 12, 1);       // skipped
    prog[16] = asm_bne (0, 0, 8);        // not taken
    prog[17] = asm_addi(7, 0, 80);
    prog[18] = asm_jr  (7);              // to word 20
    prog[19] = asm_sw  (0, 12, 1);       // skipped
    prog[20] = asm_sw  (6, 16, 1);       // M[410] = 48
    prog[21] = asm_jal (0, 0);           // halt at 84

    reset = 1; host_wen = 1;
    for (int w = 0; w < 1024; w++) begin
      host_addr = 32'(w * 4); host_wdata = (w < 32) ? prog[w] : 32'h0;
      @(posedge clk); #1;
    end
    host_wen = 0;
    reset = 0; #1;
    while (trace_pc != 32'd84 && cycles < 200) begin @(posedge clk); #1; cycles++; end
    // executed: words 0..11, 13, 14, 16, 17, 18, 20 = 18 instructions
    chk("cycles", cycles, 18);
    reset = 1; #1;
    chk_mem("M[400]", 32'h400, 7);
    chk_mem("M[404] lw.ai left rd alone", 32'h404, 55);
    chk_mem("M[408] lw.ai left rs1 alone", 32'h408, 32'h400);
    chk_mem("M[40C] mul/add/lw", 32'h40C, 56);
    chk_mem("M[410] jal link", 32'h410, 48);
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
