// lc2_regfile: the eight general-purpose registers R0..R7.
//
// Two combinational read ports (ra1/rd1, ra2/rd2) feed the operand registers
// during the decode stage; one write port (we, wa, wd) is written on the rising
// clock edge during the write-result stage. R7 is an ordinary register that
// also receives return addresses (JSR, JSRR, TRAP) and supplies them to RET.
// Eight registers of one word each follow the instruction format (3-bit
// register fields); the port count and the clear-on-reset are this design's
// choices. A read of the register being written returns the old value.
module lc2_regfile #(
  parameter int unsigned W     = 16,
  parameter int unsigned NREGS = 8,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];

endmodule
