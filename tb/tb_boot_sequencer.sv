// tb_boot_sequencer: checks the boot order of the two processors.
//
// After reset both processors are held; the first is released after
// RST_STRETCH (+1 for the output register) cycles; the second stays in reset
// however long the first takes, and is released two cycles after
// cpu0_boot_done. The boot vectors must be the two parameter values.
module tb_boot_sequencer;
  logic clk = 0, rst_n = 0, cpu0_boot_done = 0;
  logic cpu0_reset_n, cpu1_reset_n;
  logic [31:0] cpu0_reset_addr, cpu1_reset_addr;
  int checks = 0, failures = 0;

  boot_sequencer #(.CPU0_RESET_ADDR(32'h0000_0000), .CPU1_RESET_ADDR(32'h0020_0000),
                   .RST_STRETCH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int t;
    for (int run = 0; run < 3; run++) begin
      int boot_len;
      boot_len = 50 + run * 400;
      rst_n = 0; cpu0_boot_done = 0;
      repeat (2) @(negedge clk);
      chk(!cpu0_reset_n && !cpu1_reset_n, "both held in reset");
      rst_n = 1;
      t = 0;
      while (!cpu0_reset_n) begin @(negedge clk); t++; chk(!cpu1_reset_n, "cpu1 before cpu0"); end
      chk(t == 17, $sformatf("cpu0 released after %0d cycles", t));
      repeat (boot_len) begin
        @(negedge clk);
        chk(cpu0_reset_n && !cpu1_reset_n, "cpu1 must wait for boot done");
      end
      cpu0_boot_done = 1;
      @(negedge clk);
      chk(!cpu1_reset_n, "cpu1 one cycle after done");
      @(negedge clk);
      chk(cpu1_reset_n && cpu0_reset_n, "cpu1 released");
      cpu0_boot_done = 0;
      repeat (5) @(negedge clk);
      chk(cpu1_reset_n && cpu0_reset_n, "both stay running");
    end
    chk(cpu0_reset_addr == 32'h0 && cpu1_reset_addr == 32'h0020_0000, "boot vectors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
