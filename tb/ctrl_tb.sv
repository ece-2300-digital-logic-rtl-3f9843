// ctrl_tb: self-checking test of the control unit. Random instructions of
// every class (with random register and immediate fields) and random values
// of eq are decoded; each control signal that matters for the instruction is
// compared with a table written out in the testbench. Undefined encodings
// must produce a no-op (no register or memory write, PC+4).
module ctrl_tb;
  import proc_pkg::*;
  import tb_asm_pkg::*;
  logic [31:0] inst;
  logic        eq;
  ctrl_t       cs;
  int checks = 0, failures = 0;
  int seen [10] = '{default: 0};
  logic clk = 0;
  always #5 clk = ~clk;

  ctrl #(.HAS_LW_AI(1'b1)) dut (.inst, .eq, .cs);

  task automatic expect_sig(input string name, input int got, exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s inst=%h eq=%0d: %s=%0d expected %0d", classify(inst).name(), inst, eq, name, got, exp); end
  endtask

  function automatic logic [31:0] rand_inst(int k);
    int rd = $urandom_range(0, 31), rs1 = $urandom_range(0, 31), rs2 = $urandom_range(0, 31);
    int imm = $urandom_range(0, 4095) - 2048;
    case (k)
      0: return asm_add(rd, rs1, rs2);
      1: return asm_addi(rd, rs1, imm);
      2: return asm_mul(rd, rs1, rs2);
      3: return asm_lw(rd, imm, rs1);
      4: return asm_sw(rs2, imm, rs1);
      5: return asm_jal(rd, 2 * imm);
      6: return asm_jr(rs1);
      7: return asm_bne(rs1, rs2, 2 * imm);
      8: return asm_lwai(rd, imm, rs1);
      default: begin   // undefined: wrong funct3/funct7 or unused opcode
        case ($urandom_range(0, 3))
          0: return asm_add(rd, rs1, rs2) | 32'h4000_0000;
          1: return asm_lw(rd, imm, rs1) ^ 32'h0000_6000;
          2: return asm_bne(rs1, rs2, 8) ^ 32'h0000_1000;
          default: return 32'h0000_007F;
        endcase
      end
    endcase
  endfunction

  initial begin
    repeat (2000) begin
      int k;
      k = $urandom_range(0, 9);
      inst = rand_inst(k); eq = 1'($urandom); #1;
      seen[k]++;
      expect_sig("imemreq_val", int'(cs.imemreq_val), 1);
      case (k)
        0: begin expect_sig("pc_sel", cs.pc_sel, PC_PLUS4); expect_sig("op2_sel", cs.op2_sel, OP2_RF);
                 expect_sig("alu_func", cs.alu_func, ALU_ADD); expect_sig("wb_sel", cs.wb_sel, WB_ALU);
                 expect_sig("rf_wen", cs.rf_wen, 1); expect_sig("rf_wen_inc", cs.rf_wen_inc, 0); expect_sig("dmemreq_val", cs.dmemreq_val, 0); end
        1: begin expect_sig("pc_sel", cs.pc_sel, PC_PLUS4); expect_sig("imm_type", cs.imm_type, IMM_I); expect_sig("op2_sel", cs.op2_sel, OP2_IMM);
                 expect_sig("alu_func", cs.alu_func, ALU_ADD); expect_sig("wb_sel", cs.wb_sel, WB_ALU);
                 expect_sig("rf_wen", cs.rf_wen, 1); expect_sig("rf_wen_inc", cs.rf_wen_inc, 0); expect_sig("dmemreq_val", cs.dmemreq_val, 0); end
        2: begin expect_sig("pc_sel", cs.pc_sel, PC_PLUS4); expect_sig("wb_sel", cs.wb_sel, WB_MUL);
                 expect_sig("rf_wen", cs.rf_wen, 1); expect_sig("rf_wen_inc", cs.rf_wen_inc, 0); expect_sig("dmemreq_val", cs.dmemreq_val, 0); end
        3: begin expect_sig("pc_sel", cs.pc_sel, PC_PLUS4); expect_sig("imm_type", cs.imm_type, IMM_I); expect_sig("op2_sel", cs.op2_sel, OP2_IMM);
                 expect_sig("alu_func", cs.alu_func, ALU_ADD); expect_sig("wb_sel", cs.wb_sel, WB_MEM);
                 expect_sig("rf_wen", cs.rf_wen, 1); expect_sig("rf_wen_inc", cs.rf_wen_inc, 0);
                 expect_sig("dmemreq_val", cs.dmemreq_val, 1); expect_sig("dmemreq_wen", cs.dmemreq_wen, 0); end
        4: begin expect_sig("pc_sel", cs.pc_sel, PC_PLUS4); expect_sig("imm_type", cs.imm_type, IMM_S); expect_sig("op2_sel", cs.op2_sel, OP2_IMM);
                 expect_sig("alu_func", cs.alu_func, ALU_ADD); expect_sig("rf_wen", cs.rf_wen, 0); expect_sig("rf_wen_inc", cs.rf_wen_inc, 0);
                 expect_sig("dmemreq_val", cs.dmemreq_val, 1); expect_sig("dmemreq_wen", cs.dmemreq_wen, 1); end
        5: begin expect_sig("pc_sel", cs.pc_sel, PC_JALBR); expect_sig("imm_type", cs.imm_type, IMM_J); expect_sig("wb_sel", cs.wb_sel, WB_PC4);
                 expect_sig("rf_wen", cs.rf_wen, 1); expect_sig("rf_wen_inc", cs.rf_wen_inc, 0); expect_sig("dmemreq_val", cs.dmemreq_val, 0); end
        6: begin expect_sig("pc_sel", cs.pc_sel, PC_JR); expect_sig("rf_wen", cs.rf_wen, 0); expect_sig("rf_wen_inc", cs.rf_wen_inc, 0);
                 expect_sig("dmemreq_val", cs.dmemreq_val, 0); end
        7: begin expect_sig("pc_sel", cs.pc_sel, eq ? PC_PLUS4 : PC_JALBR); expect_sig("imm_type", cs.imm_type, IMM_B);
                 expect_sig("op2_sel", cs.op2_sel, OP2_RF); expect_sig("alu_func", cs.alu_func, ALU_CMP);
                 expect_sig("rf_wen", cs.rf_wen, 0); expect_sig("rf_wen_inc", cs.rf_wen_inc, 0); expect_sig("dmemreq_val", cs.dmemreq_val, 0); end
        8: begin expect_sig("pc_sel", cs.pc_sel, PC_PLUS4); expect_sig("imm_type", cs.imm_type, IMM_I); expect_sig("op2_sel", cs.op2_sel, OP2_IMM);
                 expect_sig("alu_func", cs.alu_func, ALU_ADD); expect_sig("wb_sel", cs.wb_sel, WB_MEM);
                 expect_sig("rf_wen", cs.rf_wen, 1); expect_sig("rf_wen_inc", cs.rf_wen_inc, 1);
                 expect_sig("dmemreq_val", cs.dmemreq_val, 1); expect_sig("dmemreq_wen", cs.dmemreq_wen, 0); end
        default: begin expect_sig("pc_sel", cs.pc_sel, PC_PLUS4); expect_sig("rf_wen", cs.rf_wen, 0);
                 expect_sig("rf_wen_inc", cs.rf_wen_inc, 0); expect_sig("dmemreq_val", cs.dmemreq_val, 0); end
      endcase
    end
    for (int k = 0; k < 10; k++) begin
      checks++; if (seen[k] == 0) begin failures++; $display("FAIL class %0d never generated", k); end
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
