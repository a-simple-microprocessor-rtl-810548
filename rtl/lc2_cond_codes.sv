// lc2_cond_codes: the N, Z and P condition bits and the branch test.
//
// When ld is high on a rising clock edge, the bits are set from the word being
// written into the register file: N if it is negative (bit W-1 set), Z if it
// is zero, P if it is positive; exactly one is set. taken is the combinational
// BR condition (N & n) | (Z & z) | (P & p), where nzp_mask holds the n, z, p
// bits (11:9) of the BR instruction. The bits and the branch equation follow
// the LC-2 definition; the reset value (Z set, as for a register file of zeros)
// is this design's choice.
module lc2_cond_codes #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] value,
  input  logic [2:0]   nzp_mask,   // {n, z, p}
  output logic [2:0]   nzp,        // {N, Z, P}
  output logic         taken
);

  logic n_q, z_q, p_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= 1'b0;
      z_q <= 1'b1;
      p_q <= 1'b0;
    end else if (ld) begin
      n_q <= value[W-1];
      z_q <= (value == '0);
      p_q <= !value[W-1] && (value != '0);
    end
  end

  assign nzp   = {n_q, z_q, p_q};
  assign taken = (n_q & nzp_mask[2]) | (z_q & nzp_mask[1]) | (p_q & nzp_mask[0]);

  // Exactly one of N, Z, P is set at all times.
  always_comb begin
    if (rst_n) begin
      cc_onehot: assert ({n_q, z_q, p_q} inside {3'b100, 3'b010, 3'b001})
        else $error("condition codes not one-hot: %b", {n_q, z_q, p_q});
    end
  end

endmodule
