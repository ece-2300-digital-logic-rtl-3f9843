// imm_gen: the immediate generator.
//
// Assembles and sign-extends the immediate field of the instruction according
// to imm_type (combinational, no clock):
//   I  (addi, lw, lw.ai, jr): inst[31:20]
//   S  (sw):  {inst[31:25], inst[11:7]}
//   B  (bne): {inst[31], inst[7], inst[30:25], inst[11:8], 0}
//   J  (jal): {inst[31], inst[19:12], inst[20], inst[30:21], 0}
// These bit layouts are the RISC-V formats; inst[31] is always the sign bit.
module imm_gen
  import proc_pkg::*;
(
  input  logic [31:0] inst,
  input  imm_type_t   imm_type,
  output logic [31:0] imm
);
  always_comb begin
    unique case (imm_type)
      IMM_I:   imm = {{20{inst[31]}}, inst[31:20]};
      IMM_S:   imm = {{20{inst[31]}}, inst[31:25], inst[11:7]};
      IMM_B:   imm = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_J:   imm = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = '0;
    endcase
  end
endmodule
