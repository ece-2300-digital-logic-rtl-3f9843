// ctrl: the control unit of the single-cycle processor.
//
// Combinational decoder from the instruction (and the eq status bit) to the
// datapath control signals, one row per instruction:
//
//   inst   pc_sel   imm op2 alu wb   rf_wen dmem
//   add    +4       -   rf  +   alu  1      -
//   addi   +4       I   imm +   alu  1      -
//   mul    +4       -   -   -   mul  1      -
//   lw     +4       I   imm +   mem  1      read
//   sw     +4       S   imm +   -    0      write
//   jal    jalbr    J   -   -   pc+4 1      -
//   jr     jr       -   -   -   -    0      -
//   bne    eq?+4:br B   rf  cmp -    0      -
//   lw.ai  +4       I   imm +   mem  1      read   (also rs1 <- rs1 + 4)
//
// The add, mul, lw and jr rows are the lecture's control table; the rest are
// derived from the datapath and the instruction semantics. For bne the eq
// status is folded into pc_sel: the branch is taken when eq is 0. The
// instruction fetch is always valid. Decoding checks opcode, funct3 and, for
// add/mul, funct7; any other instruction is a no-op that advances the PC
// (this design's choice). Don't-care fields are driven with fixed values.
// HAS_LW_AI = 0 removes lw.ai (it then decodes as a no-op).
module ctrl
  import proc_pkg::*;
#(
  parameter bit HAS_LW_AI = 1'b1
) (
  input  logic [31:0] inst,
  input  logic        eq,
  output ctrl_t       cs
);
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;

  always_comb begin
    opcode = inst[6:0];
    funct3 = inst[14:12];
    funct7 = inst[31:25];

    // Defaults: a no-op that fetches the next instruction
    cs = '{pc_sel: PC_PLUS4, imm_type: IMM_I, op2_sel: OP2_RF, alu_func: ALU_ADD,
             wb_sel: WB_ALU, rf_wen: 1'b0, rf_wen_inc: 1'b0, imemreq_val: 1'b1,
             dmemreq_val: 1'b0, dmemreq_wen: 1'b0};

    unique case (opcode)
      OPC_OP: begin
        if (funct3 == F3_ADD && funct7 == F7_ADD) begin          // add
          cs.op2_sel = OP2_RF;  cs.alu_func = ALU_ADD;
          cs.wb_sel  = WB_ALU;  cs.rf_wen   = 1'b1;
        end else if (funct3 == F3_ADD && funct7 == F7_MUL) begin // mul
          cs.wb_sel  = WB_MUL;  cs.rf_wen   = 1'b1;
        end
      end
      OPC_OP_IMM: if (funct3 == F3_ADD) begin                    // addi
        cs.imm_type = IMM_I;  cs.op2_sel = OP2_IMM; cs.alu_func = ALU_ADD;
        cs.wb_sel   = WB_ALU; cs.rf_wen  = 1'b1;
      end
      OPC_LOAD: if (funct3 == F3_LW) begin                       // lw
        cs.imm_type = IMM_I;  cs.op2_sel = OP2_IMM; cs.alu_func = ALU_ADD;
        cs.wb_sel   = WB_MEM; cs.rf_wen  = 1'b1;    cs.dmemreq_val = 1'b1;
      end
      OPC_STORE: if (funct3 == F3_LW) begin                      // sw
        cs.imm_type = IMM_S;  cs.op2_sel = OP2_IMM; cs.alu_func = ALU_ADD;
        cs.dmemreq_val = 1'b1; cs.dmemreq_wen = 1'b1;
      end
      OPC_JAL: begin                                             // jal
        cs.pc_sel = PC_JALBR; cs.imm_type = IMM_J;
        cs.wb_sel = WB_PC4;   cs.rf_wen   = 1'b1;
      end
      OPC_JALR: if (funct3 == F3_ADD) begin                      // jr
        cs.pc_sel = PC_JR;
      end
      OPC_BRANCH: if (funct3 == F3_BNE) begin                    // bne
        cs.imm_type = IMM_B;  cs.op2_sel = OP2_RF; cs.alu_func = ALU_CMP;
        cs.pc_sel   = eq ? PC_PLUS4 : PC_JALBR;
      end
      OPC_CUST0: if (HAS_LW_AI && funct3 == F3_ADD) begin        // lw.ai
        cs.imm_type = IMM_I;  cs.op2_sel = OP2_IMM; cs.alu_func = ALU_ADD;
        cs.wb_sel   = WB_MEM; cs.rf_wen  = 1'b1;    cs.dmemreq_val = 1'b1;
        cs.rf_wen_inc = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
