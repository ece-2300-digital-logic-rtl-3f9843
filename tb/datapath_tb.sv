// datapath_tb: self-checking test of the datapath on its own. The testbench
// plays the control unit and both memories: every cycle it applies a random
// instruction word, random control signals and random load data, and checks
// the memory request (address = ALU result, store data = R[rs2]), the eq
// status and, after the clock edge, the new PC and the register writes,
// against a reference model of the datapath written in the testbench
// (register array, PC, immediate decoders from tb_asm_pkg).
module datapath_tb;
  import proc_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, reset;
  ctrl_t cs;
  logic [31:0] inst, imemreq_addr, imemresp_data, dmemreq_addr, dmemreq_data, dmemresp_data;
  logic eq;
  logic [31:0] R [32];
  logic [31:0] pc_m;
  int checks = 0, failures = 0;
  int n_pcsel [3] = '{default: 0};
  int n_wbsel [4] = '{default: 0};
  int n_inc = 0;
  always #5 clk = ~clk;

  datapath #(.RESET_PC(32'h0000_0000), .HAS_LW_AI(1'b1)) dut (
    .clk, .reset, .cs, .inst, .eq, .imemreq_addr, .imemresp_data,
    .dmemreq_addr, .dmemreq_data, .dmemresp_data);

  task automatic chk(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  // One cycle with the given instruction / controls / load data.
  task automatic step(input logic [31:0] i, input ctrl_t c, input logic [31:0] ld);
    logic [31:0] rs1v, rs2v, imm, op2, alu, wb, npc;
    imemresp_data = i; cs = c; dmemresp_data = ld; #1;
    rs1v = R[i[19:15]]; rs2v = R[i[24:20]];
    case (c.imm_type)
      IMM_I: imm = imm_i(i);
      IMM_S: imm = imm_s(i);
      IMM_B: imm = imm_b(i);
      default: imm = imm_j(i);
    endcase
    op2 = (c.op2_sel == OP2_IMM) ? imm : rs2v;
    alu = (c.alu_func == ALU_ADD) ? rs1v + op2 : {31'b0, rs1v == op2};
    case (c.wb_sel)
      WB_ALU: wb = alu;
      WB_MUL: wb = rs1v * rs2v;
      WB_MEM: wb = ld;
      default: wb = pc_m + 4;
    endcase
    case (c.pc_sel)
      PC_JALBR: npc = pc_m + imm;
      PC_JR:    npc = rs1v;
      default:  npc = pc_m + 4;
    endcase
    chk("imemreq_addr", imemreq_addr, pc_m);
    chk("inst", inst, i);
    chk("dmemreq_addr", dmemreq_addr, alu);
    chk("dmemreq_data", dmemreq_data, rs2v);
    if (c.alu_func == ALU_CMP) chk("eq", {31'b0, eq}, {31'b0, rs1v == op2});
    n_pcsel[c.pc_sel]++; if (c.rf_wen) n_wbsel[c.wb_sel]++;
    if (c.rf_wen_inc) n_inc++;
    @(posedge clk);
    if (c.rf_wen_inc && i[19:15] != 0) R[i[19:15]] = rs1v + 4;
    if (c.rf_wen && i[11:7] != 0)      R[i[11:7]]  = wb;
    pc_m = npc;
    #1;
    chk("next pc", imemreq_addr, pc_m);
  endtask

  function automatic ctrl_t rand_ctrl();
    ctrl_t c;
    c = ctrl_t'($urandom);
    c.pc_sel   = pc_sel_t'($urandom_range(0, 2));
    return c;
  endfunction

  initial begin
    ctrl_t c;
    int r;
    reset = 1; cs = '0; imemresp_data = '0; dmemresp_data = '0;
    @(posedge clk); @(posedge clk); #1;
    reset = 0; pc_m = 32'h0;
    chk("reset pc", imemreq_addr, 32'h0);
    R[0] = '0;
    // load every register with a random value through the load-data path
    for (int k = 1; k < 32; k++) begin
      c = '0; c.rf_wen = 1; c.wb_sel = WB_MEM; c.pc_sel = PC_PLUS4;
      step(asm_lw(k, 0, 0), c, $urandom);
    end
    // random instruction words and controls
    repeat (3000) step($urandom, rand_ctrl(), $urandom);
    // equal operands (rs1 = rs2) for the compare
    repeat (100) begin
      c = rand_ctrl(); c.alu_func = ALU_CMP; c.op2_sel = OP2_RF;
      r = $urandom_range(0, 31);
      step(asm_bne(r, r, 8), c, $urandom);
    end
    // final sweep of the register file through the store-data path
    for (int k = 0; k < 32; k++) begin
      c = '0; c.pc_sel = PC_PLUS4;
      step(asm_sw(k, 0, 0), c, 0);
    end
    for (int k = 0; k < 3; k++) begin checks++; if (n_pcsel[k] == 0) begin failures++; $display("FAIL pc_sel %0d unused", k); end end
    for (int k = 0; k < 4; k++) begin checks++; if (n_wbsel[k] == 0) begin failures++; $display("FAIL wb_sel %0d unused", k); end end
    checks++; if (n_inc == 0) begin failures++; $display("FAIL no rs1 increment"); end
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
