// tb_lc2_cpu: self-checking test of the LC-2 processor against the
// instruction-level reference model.
//
// The testbench owns the memory (a synchronous RAM with one-cycle read
// latency, as the processor expects) and fills all 64K words with random
// values, so the processor executes a random instruction stream including
// jumps, traps through random vectors and self-modifying stores. The same
// contents are given to Lc2Model. After every retired instruction it checks
// the PC, N/Z/P, all eight registers and any memory write (address and data)
// against the model, and that every instruction took exactly 8 cycles.
// Several seeds of the stream are run, each from reset.
module tb_lc2_cpu;
  import lc2_pkg::*;
  import lc2_tb_pkg::*;

  localparam word_t START = 16'h3000;
  localparam int    RUNS  = 4;
  localparam int    INSNS = 1500;

  logic   clk = 0, rst_n = 0;
  word_t  mem_addr, mem_wdata, mem_rdata, pc, ir;
  logic   mem_re, mem_we, retire;
  stage_e stage;
  logic [2:0] nzp;
  logic [15:0] tmem [65536];
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  Lc2Model m;

  lc2_cpu #(.RESET_PC(START)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (mem_we) tmem[mem_addr] <= mem_wdata;
    if (mem_re) mem_rdata <= tmem[mem_addr];
  end

  initial begin
    repeat (RUNS * INSNS * 8 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h (pc %h ir %h)", what, got, exp, m.pc, ir);
    end
  endtask

  initial begin
    int unsigned last;
    mem_rdata = '0;
    for (int run = 0; run < RUNS; run++) begin
      rst_n = 0;
      m = new(START);
      for (int a = 0; a < 65536; a++) begin
        tmem[a]  = 16'($urandom);
        m.mem[a] = tmem[a];
      end
      // start with a few writes to registers so that operands are not all 0
      for (int r = 0; r < 8; r++) begin
        tmem[START + r]  = e_add_i(r, r, int'($urandom % 32));
        m.mem[START + r] = tmem[START + r];
      end
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      last = cyc;
      for (int k = 0; k < INSNS; k++) begin
        bit          wr_seen;
        logic [15:0] wa, wd;
        wr_seen = 0; wa = '0; wd = '0;
        do begin
          @(negedge clk);
          if (mem_we) begin wr_seen = 1; wa = mem_addr; wd = mem_wdata; end
        end while (!retire);
        m.step();
        if (k > 0) chk("cycles per instruction", 16'(cyc - last), 16'd8);
        last = cyc;
        checks++;
        if (wr_seen != m.wr) begin
          failures++;
          $display("FAIL memory write seen=%0d exp=%0d ir=%h", wr_seen, m.wr, ir);
        end else if (m.wr) begin
          chk("store address", wa, m.wr_addr);
          chk("store data", wd, m.wr_data);
        end
        @(posedge clk);
        #1;
        chk("pc", pc, m.pc);
        chk("nzp", 16'(nzp), 16'({m.n, m.z, m.p}));
        for (int r = 0; r < 8; r++) chk($sformatf("R%0d", r), dut.u_rf.regs[r], m.r[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
