// lc2_addr_unit: effective-address computation for memory, jump and trap
// instructions.
//
// Three modes (combinational):
//   EA_PAGE  : {pc[15:9], ir[8:0]}  direct addressing within the current
//              512-word page, used by LD, ST, LEA, BR and JMP/JSR;
//   EA_INDEX : base + zext(ir[5:0]) indexed addressing, used by LDR, STR and
//              JMPR/JSRR;
//   EA_TRAP  : zext(ir[7:0])        address of the TRAP vector-table entry.
// The three formulas follow the LC-2 instruction set. pc is the already
// incremented program counter. Zero-extension of the 6-bit index is this
// design's choice.
module lc2_addr_unit
  import lc2_pkg::*;
(
  input  ea_mode_e mode,
  input  word_t    pc,
  input  word_t    ir,
  input  word_t    base,
  output word_t    ea
);

  always_comb begin
    unique case (mode)
      EA_PAGE:  ea = {pc[15:9], ir[8:0]};
      EA_INDEX: ea = base + {10'b0, ir[5:0]};
      EA_TRAP:  ea = {8'b0, ir[7:0]};
      default:  ea = {pc[15:9], ir[8:0]};
    endcase
  end

endmodule
