// tb_lc2_control: self-checking test of the eight-stage controller.
// After reset, checks that the stage steps 1..8 and wraps, one stage per
// cycle (8 cycles per instruction), and that each stage raises exactly the
// expected enables for random decoded instructions and branch conditions:
// instruction fetch in stages 1-3, operand read in 4, address in 5, memory
// read in 6 only for loads/TRAP, result in 7, and register, condition-code,
// memory and PC writes in 8 according to the instruction.
module tb_lc2_control;
  import lc2_pkg::*;
  logic   clk = 0, rst_n = 0, taken;
  ctrl_t  ctrl;
  stage_e stage;
  en_t    en, e;
  int checks = 0, failures = 0;
  int unsigned cycle = 0, last_write = 0;

  lc2_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    taken = 0;
    ctrl  = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 1600; k++) begin
      int s;
      s = k % 8;
      // new random instruction each cycle (the controller must only look at
      // it in the stages that use it)
      ctrl  = ctrl_t'({$urandom, $urandom});
      ctrl.pc_sel = pc_sel_e'($urandom % 4);
      taken = 1'($urandom);
      #1;
      e = '0;
      case (s)
        0: e.mar_from_pc = 1;
        1: e.mem_re = 1;
        2: begin e.ir_ld = 1; e.pc_inc = 1; end
        3: e.ab_ld = 1;
        4: e.mar_from_ea = 1;
        5: e.mem_re = ctrl.mem_read;
        6: e.res_ld = 1;
        default: begin
          e.rf_we  = ctrl.reg_write;
          e.cc_ld  = ctrl.reg_write & ctrl.set_cc;
          e.mem_we = ctrl.mem_write;
          e.pc_ld  = (ctrl.pc_sel != PC_KEEP) & (~ctrl.is_branch | taken);
        end
      endcase
      checks++;
      if (int'(stage) != s) begin
        failures++;
        $display("FAIL cycle %0d stage=%0d exp=%0d", k, stage, s);
      end
      checks++;
      if (en !== e) begin
        failures++;
        $display("FAIL cycle %0d stage=%0d en=%b exp=%b", k, s, en, e);
      end
      if (s == 7) begin
        if (k >= 8) begin
          checks++;
          if (k - int'(last_write) != 8) begin
            failures++;
            $display("FAIL instruction took %0d cycles", k - int'(last_write));
          end
        end
        last_write = k;
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
