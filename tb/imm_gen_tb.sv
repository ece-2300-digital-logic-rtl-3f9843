// imm_gen_tb: self-checking test of the immediate generator. The expected
// immediate is rebuilt bit by bit from the instruction-format definitions
// (I, S, B, J) and sign-extended with a signed shift; the instructions are
// random, so both signs and every bit position are exercised.
module imm_gen_tb;
  import proc_pkg::*;
  logic [31:0] inst, imm, expected;
  imm_type_t   imm_type;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  imm_gen dut (.inst, .imm_type, .imm);

  function automatic logic [31:0] ref_imm(logic [31:0] i, imm_type_t t);
    logic [31:0] raw; int nbits;
    raw = '0;
    case (t)
      IMM_I: begin nbits = 12; for (int k = 0; k < 12; k++) raw[k] = i[20 + k]; end
      IMM_S: begin nbits = 12; for (int k = 0; k < 5; k++) raw[k] = i[7 + k];
                               for (int k = 0; k < 7; k++) raw[5 + k] = i[25 + k]; end
      IMM_B: begin nbits = 13; for (int k = 1; k < 5; k++) raw[k] = i[7 + k];
                               for (int k = 5; k < 11; k++) raw[k] = i[20 + k];
                               raw[11] = i[7]; raw[12] = i[31]; end
      default: begin nbits = 21; for (int k = 1; k < 11; k++) raw[k] = i[20 + k];
                               raw[11] = i[20];
                               for (int k = 12; k < 20; k++) raw[k] = i[k];
                               raw[20] = i[31]; end
    endcase
    return 32'($signed(raw << (32 - nbits)) >>> (32 - nbits));
  endfunction

  initial begin
    repeat (1000) begin
      inst = $urandom; imm_type = imm_type_t'($urandom_range(0, 3)); #1;
      expected = ref_imm(inst, imm_type);
      checks++;
      if (imm !== expected) begin
        failures++; $display("FAIL imm type=%0d inst=%h imm=%h expected %h", imm_type, inst, imm, expected);
      end
    end
    // a few fixed encodings: addi x1,x0,-1 ; bne back by 32 ; jal +2048
    inst = 32'hFFF00093; imm_type = IMM_I; #1; checks++; if (imm !== 32'hFFFF_FFFF) begin failures++; $display("FAIL addi -1"); end
    inst = 32'hFE0010E3; imm_type = IMM_B; #1; checks++; if (imm !== -32'sd32) begin failures++; $display("FAIL bne -32 %h", imm); end
    inst = 32'h0010006F; imm_type = IMM_J; #1; checks++; if (imm !== 32'd2048) begin failures++; $display("FAIL jal 2048 %h", imm); end
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
