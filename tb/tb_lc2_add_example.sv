// tb_lc2_add_example: the instruction ADD R5, R4, #3 traced stage by stage
// through the LC-2 system.
//
// R4 is first set to 3 by a preceding instruction; then the ADD at
// 0x3001 is followed cycle by cycle and the datapath registers are checked
// at the end of each of its eight stages:
//   1 SEND: MAR = PC            5 ADDR: (no memory operand)
//   2 FETCH: memory word read   6 MEM: no memory read issued
//   3 STORE: IR = 0x1B23, PC+1  7 EXEC: RES = 6
//   4 DECODE: A = R4            8 WRITE: R5 = 6, P set
module tb_lc2_add_example;
  import lc2_pkg::*;
  import lc2_tb_pkg::*;

  logic       clk = 0, rst_n = 0;
  word_t      pc, ir;
  stage_e     stage;
  logic       retire;
  logic [2:0] nzp;
  int checks = 0, failures = 0;

  lc2_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 65536; a++) dut.u_mem.mem[a] = 16'h0000;
    dut.u_mem.mem[16'h3000] = e_add_i(4, 4, 5'h03);   // ADD R4, R4, #3
    dut.u_mem.mem[16'h3001] = e_add_i(5, 4, 3);       // ADD R5, R4, #3
    dut.u_mem.mem[16'h3002] = e_br(1, 1, 1, 9'h002);  // branch to self
    chk("encoding of ADD R5, R4, #3", e_add_i(5, 4, 3), 16'h1B23);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // first instruction: 8 cycles
    repeat (8) @(posedge clk);
    #1;
    chk("R4 before the example", dut.u_cpu.u_rf.regs[4], 16'd3);
    chk("stage at start", 16'(stage), 16'(ST_SEND));
    @(posedge clk); #1;                       // end of stage 1
    chk("1 SEND: MAR = PC", dut.u_cpu.mar_q, 16'h3001);
    @(posedge clk); #1;                       // end of stage 2
    chk("2 FETCH: word read", dut.u_mem.rdata, 16'h1B23);
    @(posedge clk); #1;                       // end of stage 3
    chk("3 STORE: IR", ir, 16'h1B23);
    chk("3 STORE: PC incremented", pc, 16'h3002);
    @(posedge clk); #1;                       // end of stage 4
    chk("4 DECODE: operand A = R4", dut.u_cpu.a_q, 16'd3);
    @(posedge clk); #1;                       // end of stage 5
    chk("5 ADDR: stage", 16'(stage), 16'(ST_MEM));
    chk("6 MEM: no read for ADD", 16'(dut.u_cpu.mem_re), 16'd0);
    @(posedge clk); #1;                       // end of stage 6
    @(posedge clk); #1;                       // end of stage 7
    chk("7 EXEC: result", dut.u_cpu.res_q, 16'd6);
    chk("7 EXEC: R5 not yet written", dut.u_cpu.u_rf.regs[5], 16'd0);
    chk("8 WRITE: retire", 16'(retire), 16'd1);
    @(posedge clk); #1;                       // end of stage 8
    chk("8 WRITE: R5", dut.u_cpu.u_rf.regs[5], 16'd6);
    chk("8 WRITE: N/Z/P", 16'(nzp), 16'b001);
    chk("next instruction starts", 16'(stage), 16'(ST_SEND));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
