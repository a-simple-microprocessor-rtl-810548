// tb_lc2_regfile: self-checking test of the 8 x 16 register file.
// Checks that reset clears every register, then performs random writes and
// reads on both ports against a shadow array, including a read of the
// register being written in the same cycle (old value expected).
module tb_lc2_regfile;
  logic        clk = 0, rst_n = 0;
  logic [2:0]  ra1, ra2, wa;
  logic [15:0] rd1, rd2, wd;
  logic        we;
  logic [15:0] shadow [8];
  int checks = 0, failures = 0;

  lc2_regfile #(.W(16), .NREGS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      shadow[i] = '0;
      ra1 = 3'(i); ra2 = 3'(7 - i);
      #1;
      chk("reset rd1", rd1, 16'h0);
      chk("reset rd2", rd2, 16'h0);
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      we  = ($urandom % 4) != 0;
      wa  = 3'($urandom);
      wd  = 16'($urandom);
      ra1 = (k % 5 == 0) ? wa : 3'($urandom);
      ra2 = 3'($urandom);
      #1;
      chk("rd1", rd1, shadow[ra1]);
      chk("rd2", rd2, shadow[ra2]);
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 8; i++) begin
      ra1 = 3'(i); ra2 = 3'(i);
      #1;
      chk("final rd1", rd1, shadow[i]);
      chk("final rd2", rd2, shadow[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
