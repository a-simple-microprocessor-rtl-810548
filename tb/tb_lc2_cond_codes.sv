// tb_lc2_cond_codes: self-checking test of the N/Z/P condition codes.
// Checks the reset value (Z), updates from negative, zero and positive words
// (including 0x8000 and 0x7FFF), that the bits hold while ld is low, and the
// branch condition for all eight n/z/p masks after every update.
module tb_lc2_cond_codes;
  logic        clk = 0, rst_n = 0, ld;
  logic [15:0] value;
  logic [2:0]  nzp_mask, nzp;
  logic        taken;
  logic [2:0]  exp_nzp;
  int checks = 0, failures = 0;

  lc2_cond_codes #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    checks++;
    if (nzp !== exp_nzp) begin
      failures++;
      $display("FAIL nzp=%b exp=%b", nzp, exp_nzp);
    end
    for (int m = 0; m < 8; m++) begin
      nzp_mask = 3'(m);
      #1;
      checks++;
      if (taken !== ((exp_nzp & 3'(m)) != 0)) begin
        failures++;
        $display("FAIL taken=%b nzp=%b mask=%b", taken, exp_nzp, 3'(m));
      end
    end
  endtask

  task automatic load(logic [15:0] v, logic do_ld);
    @(negedge clk);
    ld = do_ld; value = v;
    @(posedge clk);
    #1 ld = 0;
    if (do_ld) exp_nzp = v[15] ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
    check_all();
  endtask

  initial begin
    ld = 0; value = 0; nzp_mask = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp_nzp = 3'b010;
    check_all();
    load(16'h8000, 1);
    load(16'h0000, 0);   // held
    load(16'h7FFF, 1);
    load(16'h0000, 1);
    load(16'hFFFF, 1);
    load(16'h0001, 1);
    for (int k = 0; k < 300; k++) begin
      logic [15:0] v;
      v = (k % 7 == 0) ? 16'h0 : 16'($urandom);
      load(v, ($urandom % 4) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
