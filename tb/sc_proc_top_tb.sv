// sc_proc_top_tb: end-to-end test of the single-cycle processor system at
// its default parameters.
//
// Each run holds reset, loads the whole memory through the host port,
// releases reset and lets the processor execute until it reaches the halt
// instruction (a jal to itself). Throughout, an instruction-level reference
// model in the testbench executes the same program in lockstep: every cycle
// the PC and instruction on the trace port must match the model, so every
// cycle retires exactly one instruction. At the end the whole memory is
// compared with the model's memory.
//
// Programs:
//   vvadd  the vector-vector add loop (9 instructions per element, n = 64);
//          results are also checked against dest[i] = src0[i] + src1[i] and
//          the cycle count against 9 * n plus setup.
//   find   the search loop (n = 64, only the first element matches); the
//          found flag is checked and the cycle count is 1 + 6 + 5 * 63 plus
//          setup.
//   random programs of add/addi/mul/lw/sw/jal/jr/bne/lw.ai with forward
//          branches and jumps, ending by storing all registers to memory.
// Every instruction class, taken and not-taken bne, writes to x0 and lw.ai
// with rd = rs1 are counted and must each occur at least once.
module sc_proc_top_tb;
  import tb_asm_pkg::*;

  localparam int MEM_WORDS = 4096;      // the system's default size
  logic clk = 0, reset;
  logic host_wen;
  logic [31:0] host_addr, host_wdata, host_rdata, trace_pc, trace_inst;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sc_proc_top dut (.clk, .reset, .host_wen, .host_addr, .host_wdata, .host_rdata, .trace_pc, .trace_inst);

  // ---------------- reference model ----------------
  logic [31:0] mm [MEM_WORDS];   // model memory
  logic [31:0] RR [32];          // model registers
  logic [31:0] pcm;
  int n_kind [10] = '{default: 0};
  int n_bne_taken = 0, n_bne_not = 0, n_x0_write = 0, n_lwai_same = 0;

  function automatic int widx(logic [31:0] a); return int'(a[13:2]) % MEM_WORDS; endfunction

  task automatic iss_step();
    logic [31:0] i, a, b, npc;
    kind_t k;
    i = mm[widx(pcm)]; k = classify(i);
    a = RR[i[19:15]]; b = RR[i[24:20]];
    npc = pcm + 4;
    n_kind[k]++;
    case (k)
      K_ADD:  wr(i[11:7], a + b);
      K_ADDI: wr(i[11:7], a + imm_i(i));
      K_MUL:  wr(i[11:7], a * b);
      K_LW:   wr(i[11:7], mm[widx(a + imm_i(i))]);
      K_SW:   mm[widx(a + imm_s(i))] = b;
      K_JAL:  begin wr(i[11:7], pcm + 4); npc = pcm + imm_j(i); end
      K_JR:   npc = a;
      K_BNE:  if (a != b) begin npc = pcm + imm_b(i); n_bne_taken++; end else n_bne_not++;
      K_LWAI: begin
                if (i[19:15] == i[11:7] && i[11:7] != 0) n_lwai_same++;
                wr(i[19:15], a + 4);
                wr(i[11:7], mm[widx(a + imm_i(i))]);   // the load result wins when rd = rs1
              end
      default: ;
    endcase
    pcm = npc;
  endtask

  task automatic wr(logic [4:0] rd, logic [31:0] v);
    if (rd == 0) n_x0_write++;
    else RR[rd] = v;
  endtask

  // ---------------- helpers ----------------
  task automatic chk(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  logic [31:0] image [MEM_WORDS];   // memory image to load

  // Load image into both the system (host port, under reset) and the model.
  task automatic load_and_reset();
    reset = 1; host_wen = 1;
    for (int w = 0; w < MEM_WORDS; w++) begin
      host_addr = 32'(w * 4); host_wdata = image[w]; mm[w] = image[w];
      @(posedge clk); #1;
    end
    host_wen = 0;
    for (int r = 0; r < 32; r++) RR[r] = '0;
    pcm = 32'h0;
  endtask

  // Run in lockstep until the halt instruction; return the cycle count.
  // Registers other than x0 are never read before they are written by the
  // programs, so the model's zero start values do not matter.
  task automatic run(input string name, input int max_cycles, output int cycles);
    cycles = 0;
    reset = 0; #1;
    forever begin
      chk({name, " pc"}, trace_pc, pcm);
      chk({name, " inst"}, trace_inst, mm[widx(pcm)]);
      if (mm[widx(pcm)] == asm_jal(0, 0) || cycles >= max_cycles) break;
      iss_step();
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles >= max_cycles) begin failures++; $display("FAIL %s did not halt", name); end
    reset = 1;
    // whole-memory comparison through the host port
    for (int w = 0; w < MEM_WORDS; w++) begin
      host_addr = 32'(w * 4); #1;
      chk({name, " memory"}, host_rdata, mm[w]);
    end
  endtask

  function automatic void clear_image();
    for (int w = 0; w < MEM_WORDS; w++) image[w] = $urandom;
  endfunction

  // ---------------- programs ----------------
  localparam int N = 64;
  localparam logic [31:0] SRC0 = 32'h1000, SRC1 = 32'h1400, DEST = 32'h1800, RES = 32'h1C00;

  task automatic put(inout int pc_w, input logic [31:0] inst);
    image[pc_w] = inst; pc_w++;
  endtask

  task automatic test_vvadd();
    int p = 0, cycles;
    logic [31:0] s0 [N], s1 [N];
    clear_image();
    for (int i = 0; i < N; i++) begin
      s0[i] = $urandom; s1[i] = $urandom;
      image[widx(SRC0) + i] = s0[i]; image[widx(SRC1) + i] = s1[i];
    end
    // setup: x1 = src0, x2 = src1, x3 = dest, x4 = n  (addresses need 2 instrs)
    put(p, asm_addi(1, 0, 1024)); put(p, asm_add(1, 1, 1)); put(p, asm_add(1, 1, 1));          // 0x1000
    put(p, asm_addi(2, 1, 1024));                                                               // 0x1400
    put(p, asm_addi(3, 2, 1024));                                                               // 0x1800
    put(p, asm_addi(4, 0, N));
    // loop
    put(p, asm_lw(5, 0, 1));
    put(p, asm_lw(6, 0, 2));
    put(p, asm_add(7, 5, 6));
    put(p, asm_sw(7, 0, 3));
    put(p, asm_addi(1, 1, 4));
    put(p, asm_addi(2, 2, 4));
    put(p, asm_addi(3, 3, 4));
    put(p, asm_addi(4, 4, -1));
    put(p, asm_bne(4, 0, -32));
    put(p, asm_jal(0, 0));
    load_and_reset();
    run("vvadd", 10000, cycles);
    chk("vvadd cycles", cycles, 6 + 9 * N);
    for (int i = 0; i < N; i++) begin
      host_addr = DEST + 32'(4 * i); #1;
      chk("vvadd dest", host_rdata, s0[i] + s1[i]);
    end
  endtask

  task automatic test_find();
    int p = 0, cycles;
    logic [31:0] value;
    clear_image();
    value = 32'hCAFE_0001;
    for (int i = 0; i < N; i++) image[widx(SRC0) + i] = (i == 0) ? value : value ^ (32'($urandom_range(1, 1000)));
    // setup: x1 = src0, x2 = n, x3 = value (built from 12-bit pieces)
    put(p, asm_addi(1, 0, 1024)); put(p, asm_add(1, 1, 1)); put(p, asm_add(1, 1, 1));          // 0x1000
    put(p, asm_addi(2, 0, N));
    put(p, asm_lw(3, 0, 1));                                                                    // value = src0[0]
    // program
    put(p, asm_addi(5, 0, 0));
    put(p, asm_lw(4, 0, 1));         // loop
    put(p, asm_bne(4, 3, 8));
    put(p, asm_addi(5, 0, 1));
    put(p, asm_addi(1, 1, 4));       // neq
    put(p, asm_addi(2, 2, -1));
    put(p, asm_bne(2, 0, -20));
    put(p, asm_addi(6, 0, 1024)); put(p, asm_add(6, 6, 6)); put(p, asm_add(6, 6, 6)); put(p, asm_add(6, 6, 6)); // 0x2000
    put(p, asm_sw(5, 0, 6));
    put(p, asm_jal(0, 0));
    load_and_reset();
    run("find", 10000, cycles);
    chk("find cycles", cycles, 5 + (1 + 6 + 5 * (N - 1)) + 5);
    host_addr = 32'h2000; #1;
    chk("find found flag", host_rdata, 1);
  endtask

  // Random program in words [0, 240), data in [0x400, 0x800).
  task automatic test_random(input int seed_no);
    int p = 0, cycles, len, k;
    int rd, rs1, rs2, off;
    bit landing [MEM_WORDS];      // words that some branch or jump targets
    clear_image();
    for (int w = 0; w < MEM_WORDS; w++) landing[w] = 0;
    len = 200;
    // give registers x1..x28 values
    for (int r = 1; r <= 28; r++) put(p, asm_addi(r, 0, $urandom_range(0, 4095) - 2048));
    put(p, asm_addi(31, 0, 12'h400));                      // lw.ai pointer
    while (p < len) begin
      rd = $urandom_range(0, 28); rs1 = $urandom_range(0, 28); rs2 = $urandom_range(0, 28);
      k = $urandom_range(0, 11);
      case (k)
        0: put(p, asm_add(rd, rs1, rs2));
        1: put(p, asm_addi(rd, rs1, $urandom_range(0, 4095) - 2048));
        2: put(p, asm_mul(rd, rs1, rs2));
        3: put(p, asm_lw(rd, 12'h400 + 4 * $urandom_range(0, 255), 0));
        4: put(p, asm_sw(rs2, 12'h400 + 4 * $urandom_range(0, 255), 0));
        5: begin off = $urandom_range(2, 4); landing[p + off] = 1; put(p, asm_bne(rs1, $urandom_range(0, 1) ? rs2 : rs1, 4 * off)); end
        6: begin off = $urandom_range(1, 3); landing[p + off] = 1; put(p, asm_jal(rd, 4 * off)); end
        7: begin
             // the jr must not be a branch target, or x29 could be stale
             while (landing[p + 1]) put(p, asm_addi(0, 0, 0));
             off = $urandom_range(1, 3); landing[p + 1 + off] = 1;
             put(p, asm_addi(29, 0, 4 * (p + 1 + off))); put(p, asm_jr(29));
           end
        8: put(p, asm_lwai(rd, 0, 31));
        9: begin put(p, asm_addi(30, 0, 12'h400 + 4 * $urandom_range(0, 255))); put(p, asm_lwai(30, 0, 30)); end
        10: put(p, asm_addi(0, rs1, 1));
        default: put(p, asm_add(rd, rs1, 0));
      endcase
    end
    // pad the forward targets, then dump all registers and halt
    for (int j = 0; j < 4; j++) put(p, asm_addi(0, 0, 0));
    for (int r = 1; r < 32; r++) put(p, asm_sw(r, 12'h780 + 4 * (r - 1) - 12'h380, 0));
    put(p, asm_jal(0, 0));
    load_and_reset();
    run($sformatf("random%0d", seed_no), 10000, cycles);
  endtask

  initial begin
    reset = 1; host_wen = 0; host_addr = '0; host_wdata = '0;
    test_vvadd();
    test_find();
    for (int s = 0; s < 6; s++) test_random(s);
    // every mechanism must have happened
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("FAIL %s never executed", kind_t'(k)); end
    end
    checks++; if (n_bne_taken == 0) begin failures++; $display("FAIL bne never taken"); end
    checks++; if (n_bne_not == 0)   begin failures++; $display("FAIL bne never fell through"); end
    checks++; if (n_x0_write == 0)  begin failures++; $display("FAIL no write to x0"); end
    checks++; if (n_lwai_same == 0) begin failures++; $display("FAIL no lw.ai with rd = rs1"); end
    $display("executed: add %0d addi %0d mul %0d lw %0d sw %0d jal %0d jr %0d bne %0d lw.ai %0d; bne taken %0d not %0d; x0 writes %0d; lw.ai rd=rs1 %0d",
             n_kind[K_ADD], n_kind[K_ADDI], n_kind[K_MUL], n_kind[K_LW], n_kind[K_SW], n_kind[K_JAL], n_kind[K_JR],
             n_kind[K_BNE], n_kind[K_LWAI], n_bne_taken, n_bne_not, n_x0_write, n_lwai_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
