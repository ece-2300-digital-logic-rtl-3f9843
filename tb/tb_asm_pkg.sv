// tb_asm_pkg: instruction encoders and a reference immediate decoder used by
// the processor testbenches. The encoders follow the RISC-V R/I/S/B/J
// formats; lw.ai uses the custom-0 opcode 0001011 with funct3 000.
package tb_asm_pkg;

  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, rs1, logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i_type(int imm, logic [4:0] rs1, logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    logic [31:0] v = 32'(imm);
    return {v[11:0], rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] asm_add (int rd, int rs1, int rs2); return r_type(7'b0000000, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011); endfunction
  function automatic logic [31:0] asm_mul (int rd, int rs1, int rs2); return r_type(7'b0000001, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011); endfunction
  function automatic logic [31:0] asm_addi(int rd, int rs1, int imm); return i_type(imm, 5'(rs1), 3'b000, 5'(rd), 7'b0010011); endfunction
  function automatic logic [31:0] asm_lw  (int rd, int imm, int rs1); return i_type(imm, 5'(rs1), 3'b010, 5'(rd), 7'b0000011); endfunction
  function automatic logic [31:0] asm_lwai(int rd, int imm, int rs1); return i_type(imm, 5'(rs1), 3'b000, 5'(rd), 7'b0001011); endfunction
  function automatic logic [31:0] asm_jr  (int rs1);                  return i_type(0,   5'(rs1), 3'b000, 5'd0,   7'b1100111); endfunction
  function automatic logic [31:0] asm_sw  (int rs2, int imm, int rs1);
    logic [31:0] v = 32'(imm);
    return {v[11:5], 5'(rs2), 5'(rs1), 3'b010, v[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] asm_bne (int rs1, int rs2, int off);
    logic [31:0] v = 32'(off);
    return {v[12], v[10:5], 5'(rs2), 5'(rs1), 3'b001, v[4:1], v[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] asm_jal (int rd, int off);
    logic [31:0] v = 32'(off);
    return {v[20], v[10:1], v[11], v[19:12], 5'(rd), 7'b1101111};
  endfunction

  // Instruction classes recognised by the reference models
  typedef enum int {K_ADD, K_ADDI, K_MUL, K_LW, K_SW, K_JAL, K_JR, K_BNE, K_LWAI, K_OTHER} kind_t;

  function automatic kind_t classify(logic [31:0] i);
    case (i[6:0])
      7'b0110011: if (i[14:12] == 3'b000 && i[31:25] == 7'b0000000) return K_ADD;
                  else if (i[14:12] == 3'b000 && i[31:25] == 7'b0000001) return K_MUL;
      7'b0010011: if (i[14:12] == 3'b000) return K_ADDI;
      7'b0000011: if (i[14:12] == 3'b010) return K_LW;
      7'b0100011: if (i[14:12] == 3'b010) return K_SW;
      7'b1101111: return K_JAL;
      7'b1100111: if (i[14:12] == 3'b000) return K_JR;
      7'b1100011: if (i[14:12] == 3'b001) return K_BNE;
      7'b0001011: if (i[14:12] == 3'b000) return K_LWAI;
      default: ;
    endcase
    return K_OTHER;
  endfunction

  function automatic logic [31:0] sext(logic [31:0] v, int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction
  function automatic logic [31:0] imm_i(logic [31:0] i); return sext({20'b0, i[31:20]}, 12); endfunction
  function automatic logic [31:0] imm_s(logic [31:0] i); return sext({20'b0, i[31:25], i[11:7]}, 12); endfunction
  function automatic logic [31:0] imm_b(logic [31:0] i); return sext({19'b0, i[31], i[7], i[30:25], i[11:8], 1'b0}, 13); endfunction
  function automatic logic [31:0] imm_j(logic [31:0] i); return sext({11'b0, i[31], i[19:12], i[20], i[30:21], 1'b0}, 21); endfunction

endpackage
