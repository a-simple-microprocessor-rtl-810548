// lc2_pkg: types and constants shared by the LC-2 processor blocks.
//
// The LC-2 is a 16-bit load/store machine with eight general registers and
// fixed 16-bit instructions. The opcode is bits 15:12; the remaining twelve
// bits carry register numbers (3 bits each), immediates and offsets as listed
// per instruction below. Opcode values and field positions follow the
// instruction-format definition of the LC-2; the enum and struct layouts that
// carry decoded control through the datapath are this design's own.
package lc2_pkg;

  localparam int unsigned XLEN = 16;  // data and instruction word
  localparam int unsigned RAW  = 3;   // register number width (8 registers)

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  reg_t;

  // Opcodes (bits 15:12). 1000, 1010 and 1011 are unassigned.
  typedef enum logic [3:0] {
    OP_BR   = 4'b0000,  // BR nzp offset9           PC <- {PC[15:9],offset9} if cond
    OP_ADD  = 4'b0001,  // ADD Rd,Rs1,Rs2 / Rd,Rs,imm5
    OP_LD   = 4'b0010,  // LD  Rd <- M({PC[15:9],offset9})
    OP_ST   = 4'b0011,  // ST  Rs -> M({PC[15:9],offset9})
    OP_JSR  = 4'b0100,  // JMP/JSR L,offset9
    OP_AND  = 4'b0101,  // AND Rd,Rs1,Rs2 / Rd,Rs,imm5
    OP_LDR  = 4'b0110,  // LDR Rd <- M(Rs + index6)
    OP_STR  = 4'b0111,  // STR Rs2 -> M(Rs1 + index6)
    OP_RSV8 = 4'b1000,
    OP_NOT  = 4'b1001,  // NOT Rd <- ~Rs
    OP_RSVA = 4'b1010,
    OP_RSVB = 4'b1011,
    OP_JSRR = 4'b1100,  // JMPR/JSRR L,Rs,index6
    OP_RET  = 4'b1101,  // PC <- R7
    OP_LEA  = 4'b1110,  // Rd <- {PC[15:9],offset9}
    OP_TRAP = 4'b1111   // R7 <- PC; PC <- M(zext(trapvect8))
  } opcode_e;

  typedef enum logic [1:0] {ALU_ADD, ALU_AND, ALU_NOT} alu_op_e;

  // Effective-address modes of the address unit.
  typedef enum logic [1:0] {
    EA_PAGE,   // {PC[15:9], IR[8:0]}
    EA_INDEX,  // base register + zext(IR[5:0])
    EA_TRAP    // zext(IR[7:0])
  } ea_mode_e;

  // Value written back to the register file in stage 8.
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_EA, WB_PC} wb_sel_e;

  // New PC source in stage 8.
  typedef enum logic [1:0] {
    PC_KEEP,   // PC stays at the incremented value
    PC_EA,     // JMP/JSR/JMPR/JSRR, and BR when the condition holds
    PC_MEM,    // TRAP: word read from the vector table
    PC_REGA    // RET: R7 read in the decode stage
  } pc_sel_e;

  // The eight execution stages, one clock cycle each.
  typedef enum logic [2:0] {
    ST_SEND   = 3'd0,  // 1. send instruction address      MAR <- PC
    ST_FETCH  = 3'd1,  // 2. fetch instruction             memory read at MAR
    ST_STORE  = 3'd2,  // 3. store instruction             IR <- data, PC <- PC+1
    ST_DECODE = 3'd3,  // 4. decode, fetch operands        A,B <- registers
    ST_ADDR   = 3'd4,  // 5. compute address               MAR <- EA
    ST_MEM    = 3'd5,  // 6. fetch operands from memory    memory read at MAR
    ST_EXEC   = 3'd6,  // 7. execution                     RES <- ALU/mem/EA/PC
    ST_WRITE  = 3'd7   // 8. write result                  register, memory, PC
  } stage_e;

  // Decoded instruction.
  typedef struct packed {
    reg_t     ra1;        // register read into A (first operand / base)
    reg_t     ra2;        // register read into B (second operand / store data)
    reg_t     wa;         // destination register
    alu_op_e  alu_op;
    logic     use_imm;    // ALU B operand is sext(IR[4:0])
    ea_mode_e ea_mode;
    logic     mem_read;   // read memory at the effective address (stage 6)
    logic     mem_write;  // write B to memory at the effective address (stage 8)
    logic     reg_write;
    wb_sel_e  wb_sel;
    logic     set_cc;     // the register write updates N/Z/P
    pc_sel_e  pc_sel;
    logic     is_branch;  // PC_EA only when the BR condition holds
  } ctrl_t;

  // Datapath enables issued by the controller for the current cycle.
  typedef struct packed {
    logic mar_from_pc;  // MAR <- PC
    logic mar_from_ea;  // MAR <- effective address
    logic mem_re;
    logic mem_we;
    logic ir_ld;        // IR <- memory data
    logic pc_inc;       // PC <- PC + 1
    logic ab_ld;        // A, B <- register file
    logic res_ld;       // RES, MDR <- result / memory data
    logic rf_we;
    logic cc_ld;
    logic pc_ld;        // PC <- pc_sel source
  } en_t;

endpackage
