// proc_pkg: types and constants shared by the single-cycle processor.
//
// Holds the instruction encodings of the eight-instruction RISC-V subset
// (add, addi, mul, lw, sw, jal, jr, bne) plus the auto-incrementing load
// lw.ai, the enumerated control signals that the control unit sends to the
// datapath, and the memory request bundle used on the instruction and data
// ports. Opcode, funct3 and funct7 values are the ones printed in the
// instruction-format diagrams; the enum encodings are this design's choice.
package proc_pkg;

  localparam int unsigned XLEN = 32;

  // Major opcodes (inst[6:0])
  localparam logic [6:0] OPC_OP     = 7'b0110011; // add, mul
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011; // addi
  localparam logic [6:0] OPC_LOAD   = 7'b0000011; // lw
  localparam logic [6:0] OPC_STORE  = 7'b0100011; // sw
  localparam logic [6:0] OPC_JAL    = 7'b1101111; // jal
  localparam logic [6:0] OPC_JALR   = 7'b1100111; // jr
  localparam logic [6:0] OPC_BRANCH = 7'b1100011; // bne
  localparam logic [6:0] OPC_CUST0  = 7'b0001011; // lw.ai

  localparam logic [2:0] F3_ADD  = 3'b000;
  localparam logic [2:0] F3_LW   = 3'b010;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [6:0] F7_ADD  = 7'b0000000;
  localparam logic [6:0] F7_MUL  = 7'b0000001;

  // Control signals (control unit -> datapath)
  typedef enum logic [1:0] {PC_PLUS4 = 2'd0, PC_JALBR = 2'd1, PC_JR = 2'd2} pc_sel_t;
  typedef enum logic [1:0] {IMM_I = 2'd0, IMM_S = 2'd1, IMM_B = 2'd2, IMM_J = 2'd3} imm_type_t;
  typedef enum logic       {OP2_RF = 1'b0, OP2_IMM = 1'b1} op2_sel_t;
  typedef enum logic       {ALU_ADD = 1'b0, ALU_CMP = 1'b1} alu_func_t;
  typedef enum logic [1:0] {WB_ALU = 2'd0, WB_MUL = 2'd1, WB_MEM = 2'd2, WB_PC4 = 2'd3} wb_sel_t;

  typedef struct packed {
    pc_sel_t   pc_sel;
    imm_type_t imm_type;
    op2_sel_t  op2_sel;
    alu_func_t alu_func;
    wb_sel_t   wb_sel;
    logic      rf_wen;        // write rd
    logic      rf_wen_inc;    // write rs1 <- rs1 + 4 (lw.ai)
    logic      imemreq_val;
    logic      dmemreq_val;
    logic      dmemreq_wen;   // 1: store, 0: load
  } ctrl_t;

  // Memory request: combinational read, write at the clock edge
  typedef struct packed {
    logic            val;
    logic            wen;
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] data;
  } mem_req_t;

endpackage
