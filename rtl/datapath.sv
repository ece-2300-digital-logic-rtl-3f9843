// datapath: the single-cycle processor datapath.
//
// Every instruction flows through it in one clock cycle. The PC addresses the
// instruction memory; the fetched instruction goes to the control unit and
// supplies the register addresses (rs1 = ir[19:15], rs2 = ir[24:20],
// rd = ir[11:7]) and the immediate (ir[31:7] into imm_gen). R[rs1] feeds the
// ALU, the multiplier and the register jump target (jr_targ); the op2_sel mux
// picks R[rs2] or the immediate as the second ALU operand. The ALU result is
// both the write-back candidate and the data-memory address, and R[rs2] is the
// store data. The wb_sel mux chooses ALU result, product, load data or PC+4
// to write to rd. Next PC is PC+4, PC+imm (jalbr_targ, for jal and a taken
// bne) or R[rs1] (jr), chosen by pc_sel. The eq status is bit 0 of the ALU
// result while the compare function is selected.
//
// The structure is the lecture's final datapath. This design adds, for lw.ai,
// a second +4 unit on R[rs1] feeding a second register-file write port
// addressed by rs1 (removed when HAS_LW_AI = 0). State changes (PC, register
// file) happen at the rising clock edge; all else is combinational.
module datapath
  import proc_pkg::*;
#(
  parameter logic [31:0] RESET_PC  = 32'h0000_0000,
  parameter bit          HAS_LW_AI = 1'b1
) (
  input  logic        clk,
  input  logic        reset,
  input  ctrl_t       cs,
  output logic [31:0] inst,
  output logic        eq,
  output logic [31:0] imemreq_addr,
  input  logic [31:0] imemresp_data,
  output logic [31:0] dmemreq_addr,
  output logic [31:0] dmemreq_data,
  input  logic [31:0] dmemresp_data
);
  localparam int unsigned NWRITE = HAS_LW_AI ? 2 : 1;

  logic [31:0] pc, pc_next, pc_plus4_val, jalbr_targ, jr_targ;
  logic [31:0] rf_rdata0, rf_rdata1, imm, op2, alu_out, mul_out, wb_data;
  logic [31:0] rs1_plus4;

  // Fetch
  pc_reg #(.WIDTH(32), .RESET_PC(RESET_PC)) u_pc (
    .clk, .reset, .d(pc_next), .q(pc));
  pc_plus4 #(.WIDTH(32)) u_pc_plus4 (.a(pc), .y(pc_plus4_val));

  assign imemreq_addr = pc;
  assign inst         = imemresp_data;

  // Register read, immediate
  logic [NWRITE-1:0]           rf_wen;
  logic [NWRITE-1:0][4:0]      rf_waddr;
  logic [NWRITE-1:0][31:0]     rf_wdata;

  regfile #(.WIDTH(32), .NREGS(32), .NWRITE(NWRITE)) u_rf (
    .clk,
    .raddr0(inst[19:15]), .rdata0(rf_rdata0),
    .raddr1(inst[24:20]), .rdata1(rf_rdata1),
    .wen(rf_wen), .waddr(rf_waddr), .wdata(rf_wdata));

  imm_gen u_imm_gen (.inst, .imm_type(cs.imm_type), .imm);

  // Execute
  mux2 #(.WIDTH(32)) u_op2_mux (
    .in0(rf_rdata1), .in1(imm), .sel(cs.op2_sel == OP2_IMM), .y(op2));
  alu  #(.WIDTH(32)) u_alu (.a(rf_rdata0), .b(op2), .func(cs.alu_func), .y(alu_out));
  mul  #(.WIDTH(32)) u_mul (.a(rf_rdata0), .b(rf_rdata1), .y(mul_out));

  assign eq = alu_out[0];

  // Memory
  assign dmemreq_addr = alu_out;
  assign dmemreq_data = rf_rdata1;

  // Write back
  mux4 #(.WIDTH(32)) u_wb_mux (
    .in({pc_plus4_val, dmemresp_data, mul_out, alu_out}),   // index = wb_sel_t
    .sel(cs.wb_sel), .y(wb_data));

  assign rf_wen[0]   = cs.rf_wen;
  assign rf_waddr[0] = inst[11:7];
  assign rf_wdata[0] = wb_data;

  if (HAS_LW_AI) begin : g_lw_ai
    pc_plus4 #(.WIDTH(32)) u_rs1_plus4 (.a(rf_rdata0), .y(rs1_plus4));
    assign rf_wen[1]   = cs.rf_wen_inc;
    assign rf_waddr[1] = inst[19:15];
    assign rf_wdata[1] = rs1_plus4;
  end else begin : g_no_lw_ai
    assign rs1_plus4 = '0;
  end

  // Next PC
  adder #(.WIDTH(32)) u_targ_adder (.a(pc), .b(imm), .y(jalbr_targ));
  assign jr_targ = rf_rdata0;

  mux4 #(.WIDTH(32)) u_pc_mux (
    .in({pc_plus4_val, jr_targ, jalbr_targ, pc_plus4_val}),  // index = pc_sel_t
    .sel(cs.pc_sel), .y(pc_next));
endmodule
