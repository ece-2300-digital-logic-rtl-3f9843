// sc_proc_top: single-cycle processor system.
//
// The processor (control unit and datapath) connected to a dual-ported
// combinational memory: the instruction port fetches, the data port serves
// lw, sw and lw.ai. Every instruction takes exactly one clock cycle.
// To run a program, hold reset high, write the program and data through the
// host port (host_wen/host_addr/host_wdata, one word per clock edge), then
// release reset: the processor starts fetching at RESET_PC. host_rdata shows
// the memory word at host_addr at any time, and trace_pc / trace_inst show the
// instruction being executed in the current cycle. The memory size, reset PC
// and host port are this design's choices; HAS_LW_AI = 0 gives the plain
// eight-instruction processor without the auto-incrementing load.
module sc_proc_top
  import proc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 4096,
  parameter logic [31:0] RESET_PC  = 32'h0000_0000,
  parameter bit          HAS_LW_AI = 1'b1
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        host_wen,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic [31:0] trace_pc,
  output logic [31:0] trace_inst
);
  mem_req_t    imemreq, dmemreq;
  logic [31:0] imemresp_data, dmemresp_data;

  proc #(.RESET_PC(RESET_PC), .HAS_LW_AI(HAS_LW_AI)) u_proc (
    .clk, .reset, .imemreq, .imemresp_data, .dmemreq, .dmemresp_data);

  mem #(.MEM_WORDS(MEM_WORDS)) u_mem (
    .clk, .imemreq, .imemresp_data, .dmemreq, .dmemresp_data,
    .host_wen, .host_addr, .host_wdata, .host_rdata);

  assign trace_pc   = imemreq.addr;
  assign trace_inst = imemresp_data;
endmodule
