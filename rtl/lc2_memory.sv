// lc2_memory: word-addressed main memory of the LC-2.
//
// 2^AW words of W bits. Synchronous: on a rising edge with we high, wdata is
// written at addr; with re high, the word at addr is captured into rdata,
// which is therefore valid in the cycle after the read request and holds
// until the next read. A read and a write in the same cycle are not issued by
// the processor; if both occur, rdata returns the old contents. The 16-bit
// word and 16-bit address space follow the LC-2; the synchronous one-cycle
// read (matching the separate send-address and fetch stages) is this
// design's choice. The array is not reset.
module lc2_memory #(
  parameter int unsigned AW = 16,
  parameter int unsigned W  = 16
) (
  input  logic          clk,
  input  logic          re,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
