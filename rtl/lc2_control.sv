// lc2_control: the multi-cycle controller of the LC-2.
//
// Every instruction is executed in eight stages of one clock cycle each:
//   1 SEND    MAR <- PC                   5 ADDR   MAR <- effective address
//   2 FETCH   memory read at MAR          6 MEM    memory read at MAR (loads, TRAP)
//   3 STORE   IR <- data, PC <- PC + 1    7 EXEC   RES <- ALU / data / EA / PC
//   4 DECODE  A, B <- register file       8 WRITE  register, N/Z/P, memory, PC
// The stage register advances unconditionally, so every instruction takes
// exactly 8 cycles; stages an instruction does not use are idle. The eight
// stages and their order are the LC-2 execution sequence; running all eight
// for every instruction, and performing stores in stage 8, are this design's
// choices. Outputs are combinational from the stage, the decoded instruction
// (ctrl, valid from stage 4 on) and the BR condition (taken).
module lc2_control
  import lc2_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  ctrl_t  ctrl,
  input  logic   taken,
  output stage_e stage,
  output en_t    en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage <= ST_SEND;
    else        stage <= stage_e'(stage + 3'd1);   // ST_WRITE wraps to ST_SEND
  end

  always_comb begin
    en = '0;
    unique case (stage)
      ST_SEND:   en.mar_from_pc = 1'b1;
      ST_FETCH:  en.mem_re      = 1'b1;
      ST_STORE: begin
        en.ir_ld  = 1'b1;
        en.pc_inc = 1'b1;
      end
      ST_DECODE: en.ab_ld       = 1'b1;
      ST_ADDR:   en.mar_from_ea = 1'b1;
      ST_MEM:    en.mem_re      = ctrl.mem_read;
      ST_EXEC:   en.res_ld      = 1'b1;
      ST_WRITE: begin
        en.rf_we  = ctrl.reg_write;
        en.cc_ld  = ctrl.reg_write && ctrl.set_cc;
        en.mem_we = ctrl.mem_write;
        en.pc_ld  = (ctrl.pc_sel != PC_KEEP) && (!ctrl.is_branch || taken);
      end
      default: ;
    endcase
  end

endmodule
