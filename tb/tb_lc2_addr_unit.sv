// tb_lc2_addr_unit: self-checking test of the effective-address unit.
// For random PC, instruction and base values, checks the page-direct address
// {PC[15:9], IR[8:0]}, the indexed address base + zext(IR[5:0]) (including
// wrap-around past 0xFFFF) and the trap vector address zext(IR[7:0]).
module tb_lc2_addr_unit;
  import lc2_pkg::*;
  ea_mode_e mode;
  word_t    pc, ir, base, ea, exp_ea;
  int checks = 0, failures = 0;

  lc2_addr_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(ea_mode_e m, word_t p, word_t i, word_t b);
    mode = m; pc = p; ir = i; base = b;
    #1;
    case (m)
      EA_PAGE:  exp_ea = (p & 16'hFE00) | (i & 16'h01FF);
      EA_INDEX: exp_ea = 16'((int'(b) + int'(i % 64)) % 65536);
      default:  exp_ea = i & 16'h00FF;
    endcase
    checks++;
    if (ea !== exp_ea) begin
      failures++;
      $display("FAIL mode=%s pc=%h ir=%h base=%h ea=%h exp=%h", m.name(), p, i, b, ea, exp_ea);
    end
  endtask

  initial begin
    check(EA_PAGE,  16'h31FF, 16'h0E05, 16'h0);
    check(EA_INDEX, 16'h0,    16'h003F, 16'hFFFF);
    check(EA_TRAP,  16'h3000, 16'hF025, 16'h1234);
    for (int k = 0; k < 500; k++) begin
      check(EA_PAGE,  16'($urandom), 16'($urandom), 16'($urandom));
      check(EA_INDEX, 16'($urandom), 16'($urandom), 16'($urandom));
      check(EA_TRAP,  16'($urandom), 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
