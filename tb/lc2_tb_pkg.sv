// lc2_tb_pkg: testbench helpers for the LC-2.
//
// Instruction encoders (one function per instruction form) and Lc2Model, an
// instruction-level reference model written straight from the instruction
// set: it executes one whole instruction per step() call and records any
// memory write, so that a testbench can compare the RTL after each retired
// instruction. The model shares no code with the RTL.
package lc2_tb_pkg;

  // ---------------- encoders ----------------
  function automatic logic [15:0] e_add_r(int rd, int rs1, int rs2);
    return {4'b0001, 3'(rd), 3'(rs1), 3'b000, 3'(rs2)};
  endfunction
  function automatic logic [15:0] e_add_i(int rd, int rs, int imm5);
    return {4'b0001, 3'(rd), 3'(rs), 1'b1, 5'(imm5)};
  endfunction
  function automatic logic [15:0] e_and_r(int rd, int rs1, int rs2);
    return {4'b0101, 3'(rd), 3'(rs1), 3'b000, 3'(rs2)};
  endfunction
  function automatic logic [15:0] e_and_i(int rd, int rs, int imm5);
    return {4'b0101, 3'(rd), 3'(rs), 1'b1, 5'(imm5)};
  endfunction
  function automatic logic [15:0] e_not(int rd, int rs);
    return {4'b1001, 3'(rd), 3'(rs), 6'b111111};
  endfunction
  function automatic logic [15:0] e_ld(int rd, int off9);
    return {4'b0010, 3'(rd), 9'(off9)};
  endfunction
  function automatic logic [15:0] e_st(int rs, int off9);
    return {4'b0011, 3'(rs), 9'(off9)};
  endfunction
  function automatic logic [15:0] e_ldr(int rd, int rs, int idx6);
    return {4'b0110, 3'(rd), 3'(rs), 6'(idx6)};
  endfunction
  // STR Rs2 -> M(Rs1 + index): Rs1 in bits 11:9, Rs2 in bits 8:6
  function automatic logic [15:0] e_str(int rs2, int rs1, int idx6);
    return {4'b0111, 3'(rs1), 3'(rs2), 6'(idx6)};
  endfunction
  function automatic logic [15:0] e_lea(int rd, int off9);
    return {4'b1110, 3'(rd), 9'(off9)};
  endfunction
  function automatic logic [15:0] e_br(bit n, bit z, bit p, int off9);
    return {4'b0000, n, z, p, 9'(off9)};
  endfunction
  function automatic logic [15:0] e_jsr(bit l, int off9);
    return {4'b0100, l, 2'b00, 9'(off9)};
  endfunction
  function automatic logic [15:0] e_jsrr(bit l, int rs, int idx6);
    return {4'b1100, l, 2'b00, 3'(rs), 6'(idx6)};
  endfunction
  function automatic logic [15:0] e_ret();
    return 16'hD000;
  endfunction
  function automatic logic [15:0] e_trap(int vec8);
    return {4'b1111, 4'b0000, 8'(vec8)};
  endfunction

  // ---------------- reference model ----------------
  class Lc2Model;
    logic [15:0] mem [65536];
    logic [15:0] r [8];
    logic [15:0] pc;
    bit          n, z, p;
    // memory write of the last step
    bit          wr;
    logic [15:0] wr_addr, wr_data;

    function new(logic [15:0] reset_pc);
      pc = reset_pc;
      foreach (r[i]) r[i] = '0;
      n = 0; z = 1; p = 0;
      wr = 0; wr_addr = '0; wr_data = '0;
    endfunction

    function void setcc(logic [15:0] v);
      n = v[15];
      z = (v == 0);
      p = !v[15] && (v != 0);
    endfunction

    function void step();
      logic [15:0] i, npc, page, v;
      logic [3:0]  op;
      int          d, s1, s2;
      i    = mem[pc];
      npc  = pc + 16'd1;
      page = {npc[15:9], i[8:0]};
      op   = i[15:12];
      d    = int'(i[11:9]);
      s1   = int'(i[8:6]);
      s2   = int'(i[2:0]);
      wr   = 0;
      pc   = npc;
      case (op)
        4'b0001: begin
          v = r[s1] + (i[5] ? {{11{i[4]}}, i[4:0]} : r[s2]);
          r[d] = v; setcc(v);
        end
        4'b0101: begin
          v = r[s1] & (i[5] ? {{11{i[4]}}, i[4:0]} : r[s2]);
          r[d] = v; setcc(v);
        end
        4'b1001: begin v = ~r[s1]; r[d] = v; setcc(v); end
        4'b0010: begin v = mem[page]; r[d] = v; setcc(v); end
        4'b0110: begin v = mem[r[s1] + 16'(i[5:0])]; r[d] = v; setcc(v); end
        4'b1110: begin r[d] = page; setcc(page); end
        4'b0011: begin wr = 1; wr_addr = page; wr_data = r[d]; end
        4'b0111: begin wr = 1; wr_addr = r[d] + 16'(i[5:0]); wr_data = r[s1]; end
        4'b0000: if ((n && i[11]) || (z && i[10]) || (p && i[9])) pc = page;
        4'b0100: begin if (i[11]) r[7] = npc; pc = page; end
        4'b1100: begin
          v = r[s1] + 16'(i[5:0]);
          if (i[11]) r[7] = npc;
          pc = v;
        end
        4'b1101: pc = r[7];
        4'b1111: begin r[7] = npc; pc = mem[16'(i[7:0])]; end
        default: ;
      endcase
      if (wr) mem[wr_addr] = wr_data;
    endfunction
  endclass

endpackage
