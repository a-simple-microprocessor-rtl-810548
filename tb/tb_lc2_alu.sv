// tb_lc2_alu: self-checking test of the LC-2 ALU.
// Drives corner-case and random operand pairs for ADD, AND and NOT and
// compares y with results computed here (16-bit wrap-around add, bitwise
// AND, bitwise inversion of a).
module tb_lc2_alu;
  import lc2_pkg::*;
  alu_op_e     op;
  logic [15:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  lc2_alu #(.W(16)) dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(alu_op_e o, logic [15:0] x, logic [15:0] w);
    op = o; a = x; b = w;
    #1;
    case (o)
      ALU_ADD: exp_y = 16'((32'(x) + 32'(w)) & 32'hFFFF);
      ALU_AND: exp_y = x & w;
      default: exp_y = x ^ 16'hFFFF;
    endcase
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, w, y, exp_y);
    end
  endtask

  initial begin
    check(ALU_ADD, 16'h7FFF, 16'h0001);
    check(ALU_ADD, 16'hFFFF, 16'h0001);
    check(ALU_ADD, 16'h0004, 16'hFFFD);   // 4 + (-3)
    check(ALU_AND, 16'hF0F0, 16'h0FF0);
    check(ALU_NOT, 16'h0000, 16'h1234);
    check(ALU_NOT, 16'hA5A5, 16'h0000);
    for (int k = 0; k < 300; k++) begin
      check(ALU_ADD, 16'($urandom), 16'($urandom));
      check(ALU_AND, 16'($urandom), 16'($urandom));
      check(ALU_NOT, 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
