// lc2_decoder: instruction decoder of the LC-2.
//
// Combinational. Takes the 16-bit instruction and produces a ctrl_t: which
// registers to read into the A and B operand registers, the destination
// register, the ALU operation and its immediate select, the effective-address
// mode, memory read/write, register write-back source, condition-code update
// and the new-PC source. Field positions (opcode 15:12, Rd 11:9, Rs/Rs1 8:6,
// Rs2 2:0, immediate-select bit 5, L bit 11, n/z/p 11:9) are the LC-2
// instruction formats. STR takes its base from bits 11:9 and its store data
// from bits 8:6, as the STR format names them (Rs1 base, Rs2 data). Choices
// of this design: the three unassigned opcodes decode as no-operations, and
// bits printed as fixed values in the formats are not checked.
module lc2_decoder
  import lc2_pkg::*;
(
  input  word_t ir,
  output ctrl_t ctrl
);

  opcode_e op;
  reg_t    f_11_9, f_8_6, f_2_0;
  logic    link;

  assign op     = opcode_e'(ir[15:12]);
  assign f_11_9 = ir[11:9];
  assign f_8_6  = ir[8:6];
  assign f_2_0  = ir[2:0];
  assign link   = ir[11];   // L bit of JMP/JSR and JMPR/JSRR

  always_comb begin
    ctrl = '{ra1: f_8_6, ra2: f_2_0, wa: f_11_9, alu_op: ALU_ADD, use_imm: 1'b0,
             ea_mode: EA_PAGE, mem_read: 1'b0, mem_write: 1'b0, reg_write: 1'b0,
             wb_sel: WB_ALU, set_cc: 1'b0, pc_sel: PC_KEEP, is_branch: 1'b0};
    unique case (op)
      OP_ADD, OP_AND: begin
        ctrl.alu_op    = (op == OP_ADD) ? ALU_ADD : ALU_AND;
        ctrl.use_imm   = ir[5];
        ctrl.reg_write = 1'b1;
        ctrl.set_cc    = 1'b1;
      end
      OP_NOT: begin
        ctrl.alu_op    = ALU_NOT;
        ctrl.reg_write = 1'b1;
        ctrl.set_cc    = 1'b1;
      end
      OP_LD: begin
        ctrl.mem_read  = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.wb_sel    = WB_MEM;
        ctrl.set_cc    = 1'b1;
      end
      OP_LDR: begin
        ctrl.ea_mode   = EA_INDEX;
        ctrl.mem_read  = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.wb_sel    = WB_MEM;
        ctrl.set_cc    = 1'b1;
      end
      OP_ST: begin
        ctrl.ra2       = f_11_9;
        ctrl.mem_write = 1'b1;
      end
      OP_STR: begin
        ctrl.ra1       = f_11_9;  // base Rs1
        ctrl.ra2       = f_8_6;   // data Rs2
        ctrl.ea_mode   = EA_INDEX;
        ctrl.mem_write = 1'b1;
      end
      OP_LEA: begin
        ctrl.reg_write = 1'b1;
        ctrl.wb_sel    = WB_EA;
        ctrl.set_cc    = 1'b1;
      end
      OP_BR: begin
        ctrl.pc_sel    = PC_EA;
        ctrl.is_branch = 1'b1;
      end
      OP_JSR: begin
        ctrl.wa        = 3'd7;
        ctrl.reg_write = link;
        ctrl.wb_sel    = WB_PC;
        ctrl.pc_sel    = PC_EA;
      end
      OP_JSRR: begin
        ctrl.ea_mode   = EA_INDEX;
        ctrl.wa        = 3'd7;
        ctrl.reg_write = link;
        ctrl.wb_sel    = WB_PC;
        ctrl.pc_sel    = PC_EA;
      end
      OP_RET: begin
        ctrl.ra1       = 3'd7;
        ctrl.pc_sel    = PC_REGA;
      end
      OP_TRAP: begin
        ctrl.ea_mode   = EA_TRAP;
        ctrl.mem_read  = 1'b1;
        ctrl.wa        = 3'd7;
        ctrl.reg_write = 1'b1;
        ctrl.wb_sel    = WB_PC;
        ctrl.pc_sel    = PC_MEM;
      end
      default: ;  // unassigned opcodes: no operation
    endcase
  end

endmodule
