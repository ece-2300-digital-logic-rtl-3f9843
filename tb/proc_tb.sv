// proc_tb: self-checking test of the processor (control unit + datapath)
// with a behavioural combinational memory in the testbench. A directed
// program exercises every instruction: add, addi, mul, lw, sw, jal (taken
// forward over two instructions), jr, bne (taken four times, then not taken,
// in a countdown loop), writes to x0, and lw.ai (including rd = rs1). The
// results, stored to memory by the program, are compared with values worked
// out by hand. The number of cycles to reach the final self-loop must equal
// the number of instructions executed (one cycle per instruction), and the
// numbers of loads and stores seen on the data port are checked too.
module proc_tb;
  import proc_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, reset;
  mem_req_t imemreq, dmemreq;
  logic [31:0] imemresp_data, dmemresp_data;
  logic [31:0] m [1024];
  int checks = 0, failures = 0;
  int cycles = 0, loads = 0, stores = 0;
  always #5 clk = ~clk;

  proc #(.RESET_PC(32'h0), .HAS_LW_AI(1'b1)) dut (.clk, .reset, .imemreq, .imemresp_data, .dmemreq, .dmemresp_data);

  // behavioural dual-ported combinational memory
  assign imemresp_data = m[imemreq.addr[11:2]];
  assign dmemresp_data = m[dmemreq.addr[11:2]];
  always @(posedge clk) if (!reset && dmemreq.val && dmemreq.wen) m[dmemreq.addr[11:2]] <= dmemreq.data;
  always @(posedge clk) if (!reset && dmemreq.val) begin if (dmemreq.wen) stores++; else loads++; end

  task automatic chk(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h (%0d) expected %h (%0d)", what, got, $signed(got), exp, $signed(exp)); end
  endtask

  localparam logic [31:0] HALT_PC = 32'd156;

  initial begin
    for (int i = 0; i < 1024; i++) m[i] = '0;
    m[0]  = asm_addi(8, 0, 0);
    m[1]  = asm_addi(1, 0, 100);
    m[2]  = asm_addi(2, 0, -7);
    m[3]  = asm_add (3, 1, 2);          // 93
    m[4]  = asm_mul (4, 1, 2);          // -700
    m[5]  = asm_addi(6, 0, 12'h400);
    m[6]  = asm_sw  (3, 0, 6);          // M[400] = 93
    m[7]  = asm_sw  (4, 4, 6);          // M[404] = -700
    m[8]  = asm_lw  (5, 4, 6);          // x5 = -700
    m[9]  = asm_addi(0, 0, 5);          // x0 stays 0
    m[10] = asm_sw  (0, 8, 6);          // M[408] = 0
    m[11] = asm_jal (7, 12);            // x7 = 48, to word 14
    m[12] = asm_addi(8, 0, 1);          // skipped
    m[13] = asm_addi(8, 0, 2);          // skipped
    m[14] = asm_sw  (7, 12, 6);         // M[40C] = 48
    m[15] = asm_sw  (8, 16, 6);         // M[410] = 0
    m[16] = asm_sw  (5, 20, 6);         // M[414] = -700
    m[17] = asm_addi(10, 0, 5);
    m[18] = asm_addi(11, 0, 0);
    m[19] = asm_add (11, 11, 10);       // loop
    m[20] = asm_addi(10, 10, -1);
    m[21] = asm_bne (10, 0, -8);
    m[22] = asm_sw  (11, 24, 6);        // M[418] = 15
    m[23] = asm_addi(12, 0, 108);
    m[24] = asm_jr  (12);               // to word 27
    m[25] = asm_addi(8, 0, 3);          // skipped
    m[26] = asm_addi(8, 0, 4);          // skipped
    m[27] = asm_sw  (8, 28, 6);         // M[41C] = 0
    m[28] = asm_addi(13, 6, 0);         // x13 = 0x400
    m[29] = asm_lwai(14, 0, 13);        // x14 = 93,   x13 = 0x404
    m[30] = asm_lwai(15, 0, 13);        // x15 = -700, x13 = 0x408
    m[31] = asm_sw  (14, 32, 6);        // M[420] = 93
    m[32] = asm_sw  (15, 36, 6);        // M[424] = -700
    m[33] = asm_sw  (13, 40, 6);        // M[428] = 0x408
    m[34] = asm_lwai(13, 0, 13);        // rd = rs1: the loaded 0 wins
    m[35] = asm_sw  (13, 44, 6);        // M[42C] = 0
    m[36] = asm_lw  (16, 4, 6);         // -700
    m[37] = asm_mul (17, 16, 16);       // 490000
    m[38] = asm_sw  (17, 48, 6);        // M[430] = 490000
    m[39] = asm_jal (0, 0);             // halt: jump to itself

    reset = 1;
    repeat (3) @(posedge clk);
    #1;
    chk("no dmem request in reset", {31'b0, dmemreq.val}, 0);
    reset = 0; #1;
    while (imemreq.addr != HALT_PC && cycles < 500) begin
      chk("imemreq.val", {31'b0, imemreq.val}, 1);
      @(posedge clk); #1; cycles++;
    end
    chk("cycles to halt (1 per instruction)", cycles, 47);
    chk("M[400] add",  m[32'h400 >> 2], 93);
    chk("M[404] mul",  m[32'h404 >> 2], -700);
    chk("M[408] x0",   m[32'h408 >> 2], 0);
    chk("M[40C] jal link", m[32'h40C >> 2], 48);
    chk("M[410] jal skip", m[32'h410 >> 2], 0);
    chk("M[414] lw",   m[32'h414 >> 2], -700);
    chk("M[418] bne loop", m[32'h418 >> 2], 15);
    chk("M[41C] jr skip", m[32'h41C >> 2], 0);
    chk("M[420] lw.ai 1", m[32'h420 >> 2], 93);
    chk("M[424] lw.ai 2", m[32'h424 >> 2], -700);
    chk("M[428] lw.ai base", m[32'h428 >> 2], 32'h408);
    chk("M[42C] lw.ai rd=rs1", m[32'h42C >> 2], 0);
    chk("M[430] mul", m[32'h430 >> 2], 490000);
    chk("stores", stores, 13);
    chk("loads", loads, 5);
    // the halt loop holds the PC
    repeat (3) @(posedge clk);
    #1 chk("halt pc", imemreq.addr, HALT_PC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
