// tb_lc2_memory: self-checking test of the synchronous main memory.
// Writes random words at random and boundary addresses, then reads them back
// and checks that read data appears exactly one cycle after the request and
// holds while no read is requested.
module tb_lc2_memory;
  logic        clk = 0, re, we;
  logic [15:0] addr, wdata, rdata;
  logic [15:0] shadow [logic [15:0]];
  logic [15:0] addrs [$];
  int checks = 0, failures = 0;

  lc2_memory #(.AW(16), .W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; addr = 0; wdata = 0;
    addrs.push_back(16'h0000);
    addrs.push_back(16'hFFFF);
    for (int k = 0; k < 500; k++) addrs.push_back(16'($urandom));
    foreach (addrs[k]) begin
      @(negedge clk);
      we = 1; addr = addrs[k]; wdata = 16'($urandom);
      shadow[addrs[k]] = wdata;
    end
    @(negedge clk);
    we = 0;
    foreach (addrs[k]) begin
      @(negedge clk);
      re = 1; addr = addrs[k];
      @(negedge clk);
      re = 0; addr = 16'($urandom);
      checks++;
      if (rdata !== shadow[addrs[k]]) begin
        failures++;
        $display("FAIL addr=%h rdata=%h exp=%h", addrs[k], rdata, shadow[addrs[k]]);
      end
      @(negedge clk);          // no read: data must hold
      checks++;
      if (rdata !== shadow[addrs[k]]) begin
        failures++;
        $display("FAIL hold addr=%h rdata=%h", addrs[k], rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
