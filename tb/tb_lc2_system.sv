// tb_lc2_system: end-to-end test of the LC-2 system (processor + memory) at
// its default parameters.
//
// Phase 1 runs a directed program at 0x3000 that uses every instruction:
// register and immediate ADD/AND (among them ADD R5, R4, #3), NOT, LD, ST,
// LDR, STR, LEA, BR taken and not taken on each of n, z and p, JSR and JMP,
// JSRR and JMPR, RET, a TRAP through the vector table, and an unassigned
// opcode. It ends in a branch to itself. The testbench checks hand-computed
// results in registers and memory, compares the state after every
// instruction with Lc2Model, checks that each instruction takes 8 cycles, and
// counts how often each mechanism occurred; a mechanism that never occurs is
// a failure.
// Phase 2 refills the whole memory with random words, resets, and compares a
// long random instruction stream with the model instruction by instruction.
module tb_lc2_system;
  import lc2_pkg::*;
  import lc2_tb_pkg::*;

  localparam word_t START = 16'h3000;   // the system's default RESET_PC
  localparam int    RAND_INSNS = 4000;

  logic       clk = 0, rst_n = 0;
  word_t      pc, ir;
  stage_e     stage;
  logic       retire;
  logic [2:0] nzp;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  Lc2Model m;

  // mechanism counters
  int n_op [16];
  int n_br_taken, n_br_not, n_link, n_nolink, n_imm, n_reg, n_cc_n, n_cc_z, n_cc_p;

  lc2_system dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h (ir %h)", what, got, exp, ir);
    end
  endtask

  task automatic put(logic [15:0] a, logic [15:0] w);
    dut.u_mem.mem[a] = w;
    m.mem[a] = w;
  endtask

  // Run until a branch to itself retires or max instructions; compare each step.
  task automatic run(int max_insns, bit count, output int executed);
    int unsigned last;
    logic [15:0] pc_before, i;
    bit stop;
    last = cyc;
    executed = 0;
    stop = 0;
    while (!stop && executed < max_insns) begin
      pc_before = m.pc;
      do @(negedge clk); while (!retire);
      i = ir;
      m.step();
      if (executed > 0) chk("cycles per instruction", 16'(cyc - last), 16'd8);
      last = cyc;
      executed++;
      @(posedge clk);
      #1;
      chk("pc", pc, m.pc);
      chk("nzp", 16'(nzp), 16'({m.n, m.z, m.p}));
      for (int r = 0; r < 8; r++) chk($sformatf("R%0d", r), dut.u_cpu.u_rf.regs[r], m.r[r]);
      if (m.wr) chk("stored word", dut.u_mem.mem[m.wr_addr], m.wr_data);
      if (count) begin
        n_op[i[15:12]]++;
        if (i[15:12] == 4'b0000) begin
          if (pc != pc_before + 16'd1) n_br_taken++; else n_br_not++;
        end
        if (i[15:12] inside {4'b0100, 4'b1100}) begin
          if (i[11]) n_link++; else n_nolink++;
        end
        if (i[15:12] inside {4'b0001, 4'b0101}) begin
          if (i[5]) n_imm++; else n_reg++;
        end
        if (i[15:12] inside {4'b0001, 4'b0101, 4'b1001, 4'b0010, 4'b0110, 4'b1110}) begin
          if (nzp == 3'b100) n_cc_n++;
          if (nzp == 3'b010) n_cc_z++;
          if (nzp == 3'b001) n_cc_p++;
        end
      end
      if (i[15:12] == 4'b0000 && i[11:9] == 3'b111 && pc == pc_before) stop = 1;
    end
  endtask

  initial begin
    int executed, t0;
    foreach (n_op[k]) n_op[k] = 0;
    {n_br_taken, n_br_not, n_link, n_nolink, n_imm, n_reg, n_cc_n, n_cc_z, n_cc_p} = '0;

    // ---------------- phase 1: directed program ----------------
    m = new(START);
    for (int a = 0; a < 65536; a++) put(16'(a), 16'h0000);
    put(16'h0025, 16'h3100);                   // TRAP x25 vector
    put(16'h3000, e_add_i(4, 4, 7));           // R4 = 7
    put(16'h3001, e_add_i(5, 4, 3));           // ADD R5, R4, #3 -> 10
    put(16'h3002, e_add_i(1, 5, -16));         // R1 = -6           (N)
    put(16'h3003, e_and_r(2, 1, 5));           // R2 = 0xFFFA & 10 = 10
    put(16'h3004, e_and_i(3, 5, 0));           // R3 = 0            (Z)
    put(16'h3005, e_br(0, 1, 0, 9'h007));      // BRz -> 0x3007, taken
    put(16'h3006, e_add_i(3, 3, 1));           //   skipped
    put(16'h3007, e_br(1, 0, 0, 9'h00A));      // BRn, not taken
    put(16'h3008, e_not(0, 1));                // R0 = ~(-6) = 5    (P)
    put(16'h3009, e_br(0, 0, 1, 9'h00B));      // BRp -> 0x300B, taken
    put(16'h300A, e_add_i(3, 3, 1));           //   skipped
    put(16'h300B, e_st(5, 9'h0F0));            // M[30F0] = 10
    put(16'h300C, e_lea(6, 9'h0F0));           // R6 = 0x30F0
    put(16'h300D, e_str(0, 6, 1));             // M[R6+1] = R0 = 5
    put(16'h300E, e_ldr(2, 6, 1));             // R2 = 5
    put(16'h300F, e_ld(3, 9'h0F0));            // R3 = 10
    put(16'h3010, e_jsr(1, 9'h020));           // JSR 0x3020, R7 = 0x3011
    put(16'h3011, e_trap(8'h25));              // TRAP -> 0x3100, R7 = 0x3012
    put(16'h3012, e_lea(1, 9'h030));           // R1 = 0x3030
    put(16'h3013, e_jsrr(1, 1, 0));            // JSRR R1+0, R7 = 0x3014
    put(16'h3014, e_lea(1, 9'h040));           // R1 = 0x3040
    put(16'h3015, e_jsrr(0, 1, 2));            // JMPR R1+2 -> 0x3042
    put(16'h3016, e_add_i(3, 3, 8));           //   skipped
    put(16'h3020, e_add_i(3, 3, 1));           // sub A: R3 = 11
    put(16'h3021, e_ret());
    put(16'h3030, e_add_i(3, 3, 2));           // sub B: R3 = 17 (after TRAP)
    put(16'h3031, e_ret());
    put(16'h3042, e_jsr(0, 9'h050));           // JMP 0x3050, R7 kept
    put(16'h3050, 16'hA000);                   // unassigned opcode: no-op
    put(16'h3051, e_st(3, 9'h0F2));            // M[30F2] = R3 = 17
    put(16'h3052, e_st(7, 9'h0F3));            // M[30F3] = R7 = 0x3014
    put(16'h3053, e_br(1, 1, 1, 9'h053));      // halt: branch to self
    put(16'h3100, e_add_i(3, 3, 4));           // TRAP routine: R3 = 15
    put(16'h3101, e_ret());

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    t0 = int'(cyc);
    run(200, 1, executed);
    $display("directed program: %0d instructions in %0d cycles", executed, int'(cyc) - t0);
    chk("instructions executed", 16'(executed), 16'd31);
    chk("cycles for the program", 16'(int'(cyc) - t0), 16'(31 * 8));
    chk("M[30F0]", dut.u_mem.mem[16'h30F0], 16'd10);
    chk("M[30F1]", dut.u_mem.mem[16'h30F1], 16'd5);
    chk("M[30F2]", dut.u_mem.mem[16'h30F2], 16'd17);
    chk("M[30F3]", dut.u_mem.mem[16'h30F3], 16'h3014);
    chk("R0", dut.u_cpu.u_rf.regs[0], 16'd5);
    chk("R1", dut.u_cpu.u_rf.regs[1], 16'h3040);
    chk("R2", dut.u_cpu.u_rf.regs[2], 16'd5);
    chk("R4", dut.u_cpu.u_rf.regs[4], 16'd7);
    chk("R5", dut.u_cpu.u_rf.regs[5], 16'd10);
    chk("R6", dut.u_cpu.u_rf.regs[6], 16'h30F0);
    chk("pc at halt", pc, 16'h3053);

    // every mechanism must have happened
    begin
      int req [string];
      req["ADD"] = n_op[1];  req["AND"] = n_op[5];  req["NOT"] = n_op[9];
      req["LD"] = n_op[2];   req["ST"] = n_op[3];   req["LDR"] = n_op[6];
      req["STR"] = n_op[7];  req["LEA"] = n_op[14]; req["BR"] = n_op[0];
      req["JMP/JSR"] = n_op[4]; req["JMPR/JSRR"] = n_op[12];
      req["RET"] = n_op[13]; req["TRAP"] = n_op[15]; req["unassigned"] = n_op[10];
      req["branch taken"] = n_br_taken; req["branch not taken"] = n_br_not;
      req["link L=1"] = n_link; req["no link L=0"] = n_nolink;
      req["immediate operand"] = n_imm; req["register operand"] = n_reg;
      req["N set"] = n_cc_n; req["Z set"] = n_cc_z; req["P set"] = n_cc_p;
      foreach (req[k]) begin
        $display("  mechanism %-18s %0d", k, req[k]);
        checks++;
        if (req[k] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", k);
        end
      end
    end

    // ---------------- phase 2: random instruction stream ----------------
    rst_n = 0;
    m = new(START);
    for (int a = 0; a < 65536; a++) put(16'(a), 16'($urandom));
    for (int r = 0; r < 8; r++) put(START + 16'(r), e_add_i(r, r, int'($urandom % 32)));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(RAND_INSNS, 0, executed);
    $display("random stream: %0d instructions", executed);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
