// mem: dual-ported memory with combinational reads.
//
// MEM_WORDS 32-bit words behind two ports. The instruction port reads the word
// at imemreq.addr; the data port reads the word at dmemreq.addr and, when
// dmemreq.val and dmemreq.wen are set, writes dmemreq.data there at the rising
// clock edge. Reads are combinational (the answer arrives in the same cycle as
// the request), which is what a single-cycle processor needs. Addresses are
// byte addresses of aligned words: bits [1:0] are ignored and the word index
// wraps modulo MEM_WORDS. A third, host port loads programs and data and reads
// results back; a host write wins over a data-port write to the same word.
// The size and the host port are this design's choices.
module mem
  import proc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 4096,
  localparam int unsigned AW       = $clog2(MEM_WORDS)
) (
  input  logic        clk,
  input  mem_req_t    imemreq,
  output logic [31:0] imemresp_data,
  input  mem_req_t    dmemreq,
  output logic [31:0] dmemresp_data,
  input  logic        host_wen,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata
);
  logic [31:0] m [MEM_WORDS];

  logic [AW-1:0] iidx, didx, hidx;
  assign iidx = imemreq.addr[AW+1:2];
  assign didx = dmemreq.addr[AW+1:2];
  assign hidx = host_addr[AW+1:2];

  assign imemresp_data = m[iidx];
  assign dmemresp_data = m[didx];
  assign host_rdata    = m[hidx];

  always_ff @(posedge clk) begin
    if (dmemreq.val && dmemreq.wen) m[didx] <= dmemreq.data;
    if (host_wen)                   m[hidx] <= host_wdata;
  end
endmodule
