// tb_lc2_decoder: self-checking test of the instruction decoder.
// For every one of the 16 opcodes and many random field values, checks the
// decoded register selects, destination, ALU operation, immediate select,
// address mode, memory read/write, register write, write-back source,
// condition-code update and PC source against an expectation table written
// here from the instruction definitions.
module tb_lc2_decoder;
  import lc2_pkg::*;
  word_t ir;
  ctrl_t ctrl, e;
  int checks = 0, failures = 0;

  lc2_decoder dut (.ir, .ctrl);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected decode. Fields that the instruction does not use keep the
  // defaults below; the RTL must match them too (they are harmless values).
  function automatic ctrl_t expect_of(word_t i);
    ctrl_t x;
    x.ra1 = i[8:6]; x.ra2 = i[2:0]; x.wa = i[11:9];
    x.alu_op = ALU_ADD; x.use_imm = 0; x.ea_mode = EA_PAGE;
    x.mem_read = 0; x.mem_write = 0; x.reg_write = 0; x.wb_sel = WB_ALU;
    x.set_cc = 0; x.pc_sel = PC_KEEP; x.is_branch = 0;
    case (i[15:12])
      4'h1: begin x.use_imm = i[5]; x.reg_write = 1; x.set_cc = 1; end
      4'h5: begin x.alu_op = ALU_AND; x.use_imm = i[5]; x.reg_write = 1; x.set_cc = 1; end
      4'h9: begin x.alu_op = ALU_NOT; x.reg_write = 1; x.set_cc = 1; end
      4'h2: begin x.mem_read = 1; x.reg_write = 1; x.wb_sel = WB_MEM; x.set_cc = 1; end
      4'h6: begin x.ea_mode = EA_INDEX; x.mem_read = 1; x.reg_write = 1; x.wb_sel = WB_MEM; x.set_cc = 1; end
      4'h3: begin x.ra2 = i[11:9]; x.mem_write = 1; end
      4'h7: begin x.ra1 = i[11:9]; x.ra2 = i[8:6]; x.ea_mode = EA_INDEX; x.mem_write = 1; end
      4'hE: begin x.reg_write = 1; x.wb_sel = WB_EA; x.set_cc = 1; end
      4'h0: begin x.pc_sel = PC_EA; x.is_branch = 1; end
      4'h4: begin x.wa = 7; x.reg_write = i[11]; x.wb_sel = WB_PC; x.pc_sel = PC_EA; end
      4'hC: begin x.ea_mode = EA_INDEX; x.wa = 7; x.reg_write = i[11]; x.wb_sel = WB_PC; x.pc_sel = PC_EA; end
      4'hD: begin x.ra1 = 7; x.pc_sel = PC_REGA; end
      4'hF: begin x.ea_mode = EA_TRAP; x.mem_read = 1; x.wa = 7; x.reg_write = 1; x.wb_sel = WB_PC; x.pc_sel = PC_MEM; end
      default: ;
    endcase
    return x;
  endfunction

  initial begin
    for (int opc = 0; opc < 16; opc++) begin
      for (int k = 0; k < 200; k++) begin
        ir = {4'(opc), 12'($urandom)};
        #1;
        e = expect_of(ir);
        checks++;
        if (ctrl !== e) begin
          failures++;
          $display("FAIL ir=%h ctrl=%h exp=%h", ir, ctrl, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
