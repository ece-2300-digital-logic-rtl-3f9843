// proc: the single-cycle processor, control unit plus datapath.
//
// Each cycle the processor fetches the instruction at PC through the
// instruction port, decodes it, and completes it: register and memory writes
// and the PC update all take effect at the next rising clock edge, so CPI is
// exactly 1. Both memory ports expect a combinational response within the same
// cycle (imemresp_data / dmemresp_data answer the request presented in that
// cycle). The request bundles (val, wen, addr, data) are this design's format;
// wen marks a store. Reset is synchronous and active high; the first fetch
// after reset is from RESET_PC. Instructions: add, addi, mul, lw, sw, jal, jr,
// bne and, with HAS_LW_AI = 1, the auto-incrementing load lw.ai. Two
// assertions state the request rules: wen only with val, and a fetch every
// cycle out of reset.
module proc
  import proc_pkg::*;
#(
  parameter logic [31:0] RESET_PC  = 32'h0000_0000,
  parameter bit          HAS_LW_AI = 1'b1
) (
  input  logic        clk,
  input  logic        reset,
  output mem_req_t    imemreq,
  input  logic [31:0] imemresp_data,
  output mem_req_t    dmemreq,
  input  logic [31:0] dmemresp_data
);
  ctrl_t       c;
  logic [31:0] inst;
  logic        eq;
  logic [31:0] imem_addr, dmem_addr, dmem_data;

  ctrl #(.HAS_LW_AI(HAS_LW_AI)) u_ctrl (.inst, .eq, .cs(c));

  datapath #(.RESET_PC(RESET_PC), .HAS_LW_AI(HAS_LW_AI)) u_dpath (
    .clk, .reset, .cs(c), .inst, .eq,
    .imemreq_addr(imem_addr), .imemresp_data,
    .dmemreq_addr(dmem_addr), .dmemreq_data(dmem_data), .dmemresp_data);

  // No memory access is requested while reset is held.
  assign imemreq = '{val: c.imemreq_val & ~reset, wen: 1'b0, addr: imem_addr, data: '0};
  assign dmemreq = '{val: c.dmemreq_val & ~reset, wen: c.dmemreq_wen, addr: dmem_addr, data: dmem_data};

  // Request rules: a store is always a valid data request, and out of reset
  // an instruction is fetched every cycle.
  a_store_valid: assert property (@(posedge clk) disable iff (reset) dmemreq.wen |-> dmemreq.val)
    else $error("store flag without a valid data request");
  a_fetch_every_cycle: assert property (@(posedge clk) disable iff (reset) imemreq.val)
    else $error("no instruction fetch");
endmodule
