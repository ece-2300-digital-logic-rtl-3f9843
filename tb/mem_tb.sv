// mem_tb: self-checking test of the dual-ported memory: host-port loads,
// combinational reads on the instruction and data ports in the same cycle,
// data-port writes that take effect at the clock edge only when val and wen
// are both set, and address wrap-around, against an array model.
module mem_tb;
  import proc_pkg::*;
  localparam int W = 256;
  logic clk = 0;
  mem_req_t imemreq, dmemreq;
  logic [31:0] imemresp_data, dmemresp_data, host_addr, host_wdata, host_rdata;
  logic host_wen;
  logic [31:0] model [W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mem #(.MEM_WORDS(W)) dut (.clk, .imemreq, .imemresp_data, .dmemreq, .dmemresp_data,
                            .host_wen, .host_addr, .host_wdata, .host_rdata);

  task automatic chk(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  initial begin
    imemreq = '0; dmemreq = '0; host_wen = 1;
    for (int i = 0; i < W; i++) begin
      host_addr = 32'(i * 4); host_wdata = $urandom; model[i] = host_wdata;
      @(posedge clk); #1;
    end
    host_wen = 0;
    repeat (400) begin
      int ia, da, ha;
      ia = $urandom_range(0, W - 1); da = $urandom_range(0, W - 1); ha = $urandom_range(0, W - 1);
      imemreq = '{val: 1'b1, wen: 1'b0, addr: 32'(ia * 4), data: '0};
      dmemreq = '{val: 1'($urandom), wen: 1'($urandom), addr: 32'(da * 4) + 32'(W * 4 * $urandom_range(0, 1)), data: $urandom};
      host_addr = 32'(ha * 4); #1;
      chk("imem", imemresp_data, model[ia]);
      chk("dmem read", dmemresp_data, model[da]);
      chk("host read", host_rdata, model[ha]);
      if (dmemreq.val && dmemreq.wen) model[da] = dmemreq.data;
      @(posedge clk); #1;
      dmemreq.val = 0;
      host_addr = 32'(da * 4); #1;
      chk("after write", host_rdata, model[da]);
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
