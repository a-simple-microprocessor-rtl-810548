// lc2_system: the LC-2 processor with its 64K-word main memory.
//
// The processor's memory port drives the synchronous RAM directly: one read
// or one write per cycle, read data one cycle after the request. Programs and
// the TRAP vector table (words 0x0000-0x00FF, each holding the start address
// of a system routine) are placed in the memory array before reset is
// released; execution starts at RESET_PC. The status outputs expose the
// program counter, the instruction register, the current stage, a retire pulse
// in the last stage of every instruction and the N/Z/P condition codes.
// The processor/memory pairing follows the LC-2; the absence of I/O devices
// is this design's simplification.
module lc2_system
  import lc2_pkg::*;
#(
  parameter word_t RESET_PC = 16'h3000
) (
  input  logic       clk,
  input  logic       rst_n,
  output word_t      pc,
  output word_t      ir,
  output stage_e     stage,
  output logic       retire,
  output logic [2:0] nzp
);

  word_t mem_addr, mem_wdata, mem_rdata;
  logic  mem_re, mem_we;

  lc2_cpu #(.RESET_PC(RESET_PC)) u_cpu (
    .clk, .rst_n,
    .mem_addr, .mem_re, .mem_we, .mem_wdata, .mem_rdata,
    .pc, .ir, .stage, .retire, .nzp
  );

  lc2_memory #(.AW(XLEN), .W(XLEN)) u_mem (
    .clk, .re(mem_re), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

endmodule
