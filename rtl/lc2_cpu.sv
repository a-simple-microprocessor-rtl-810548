// lc2_cpu: the LC-2 processor, a 16-bit multi-cycle RISC.
//
// Datapath registers: PC, IR, MAR (memory address), A and B (operands read
// from the register file), RES (value to write back) and MDR (memory word
// kept for TRAP). Around them sit the ALU, the 8 x 16-bit register file, the
// N/Z/P condition codes, the effective-address unit and the decoder; the
// controller sequences the eight one-cycle stages
//   SEND, FETCH, STORE, DECODE, ADDR, MEM, EXEC, WRITE
// so every instruction takes 8 clock cycles and retire pulses in the last one.
//
// Memory interface: mem_addr is MAR; mem_re requests a read whose data must be
// on mem_rdata in the next cycle (a synchronous RAM); mem_we writes mem_wdata
// (the B register) at mem_addr on the rising edge.
//
// The instruction set, the addressing formulas, the condition codes and the
// stage sequence are the LC-2's. The datapath registers named above, the
// reset PC (RESET_PC) and the use of the incremented PC for page addressing
// and as the return address are this design's choices.
module lc2_cpu
  import lc2_pkg::*;
#(
  parameter word_t RESET_PC = 16'h3000
) (
  input  logic   clk,
  input  logic   rst_n,
  // memory
  output word_t  mem_addr,
  output logic   mem_re,
  output logic   mem_we,
  output word_t  mem_wdata,
  input  word_t  mem_rdata,
  // status
  output word_t  pc,
  output word_t  ir,
  output stage_e stage,
  output logic   retire,
  output logic [2:0] nzp
);

  word_t pc_q, ir_q, mar_q, a_q, b_q, res_q, mdr_q;
  ctrl_t ctrl;
  en_t   en;
  logic  taken;
  word_t rd1, rd2, alu_b, alu_y, ea, res_d, pc_target;

  lc2_decoder u_dec (.ir(ir_q), .ctrl(ctrl));

  lc2_control u_ctl (
    .clk, .rst_n, .ctrl, .taken, .stage, .en
  );

  lc2_regfile #(.W(XLEN), .NREGS(8)) u_rf (
    .clk, .rst_n,
    .ra1(ctrl.ra1), .ra2(ctrl.ra2), .rd1, .rd2,
    .we(en.rf_we), .wa(ctrl.wa), .wd(res_q)
  );

  lc2_cond_codes #(.W(XLEN)) u_cc (
    .clk, .rst_n, .ld(en.cc_ld), .value(res_q),
    .nzp_mask(ir_q[11:9]), .nzp, .taken
  );

  assign alu_b = ctrl.use_imm ? {{11{ir_q[4]}}, ir_q[4:0]} : b_q;

  lc2_alu #(.W(XLEN)) u_alu (.op(ctrl.alu_op), .a(a_q), .b(alu_b), .y(alu_y));

  lc2_addr_unit u_ea (.mode(ctrl.ea_mode), .pc(pc_q), .ir(ir_q), .base(a_q), .ea);

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_ALU:  res_d = alu_y;
      WB_MEM:  res_d = mem_rdata;
      WB_EA:   res_d = mar_q;
      WB_PC:   res_d = pc_q;
      default: res_d = alu_y;
    endcase
    unique case (ctrl.pc_sel)
      PC_EA:   pc_target = mar_q;
      PC_MEM:  pc_target = mdr_q;
      PC_REGA: pc_target = a_q;
      default: pc_target = pc_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= RESET_PC;
      ir_q  <= '0;
      mar_q <= '0;
      a_q   <= '0;
      b_q   <= '0;
      res_q <= '0;
      mdr_q <= '0;
    end else begin
      if (en.mar_from_pc) mar_q <= pc_q;
      if (en.mar_from_ea) mar_q <= ea;
      if (en.ir_ld)       ir_q  <= mem_rdata;
      if (en.pc_inc)      pc_q  <= pc_q + 16'd1;
      if (en.pc_ld)       pc_q  <= pc_target;
      if (en.ab_ld) begin
        a_q <= rd1;
        b_q <= rd2;
      end
      if (en.res_ld) begin
        res_q <= res_d;
        mdr_q <= mem_rdata;
      end
    end
  end

  assign mem_addr  = mar_q;
  assign mem_re    = en.mem_re;
  assign mem_we    = en.mem_we;
  assign mem_wdata = b_q;
  assign pc        = pc_q;
  assign ir        = ir_q;
  assign retire    = (stage == ST_WRITE);

endmodule
