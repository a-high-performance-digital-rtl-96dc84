// tb_interlock_io: checks debounce, interlock latching and safe outputs.
//
// With DEB = 20: a pulse of 19 clocks on an input must not reach din_db; a
// level held longer must reach it DEB + 2 clocks after the edge (two
// synchroniser flops). An enabled (masked) input that goes high must latch,
// raise interlock and force all outputs low; an input not in the mask must
// not. clear must release the latch only once the input is low again.
module tb_interlock_io;
  localparam int NIN = 16, NOUT = 8, DEB = 20;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [NIN-1:0] din = '0, mask = '0, din_db, latched;
  logic [NOUT-1:0] dout_reg = '0, dout;
  logic interlock;
  int checks = 0, failures = 0;

  interlock_io #(.NIN(NIN), .NOUT(NOUT), .DEB(DEB)) dut (.*);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    dout_reg = 8'hA5;
    repeat (3) @(negedge clk);
    chk(dout == 8'hA5 && !interlock, "outputs follow register");
    // glitch shorter than DEB
    din[3] = 1; repeat (DEB - 1) @(negedge clk); din[3] = 0;
    repeat (DEB + 5) begin @(negedge clk); chk(din_db[3] == 0, "glitch filtered"); end
    // real edge on an input not in the mask
    din[3] = 1; t = 0;
    while (!din_db[3]) begin @(negedge clk); t++; end
    chk(t == DEB + 2, $sformatf("debounce delay %0d", t));
    repeat (5) @(negedge clk);
    chk(!interlock && latched == '0 && dout == 8'hA5, "unmasked input ignored");
    // masked input trips the interlock
    mask = 16'h0100;
    din[8] = 1;
    repeat (DEB + 4) @(negedge clk);
    chk(interlock && latched == 16'h0100, "interlock latched");
    @(negedge clk);
    chk(dout == 8'h00, "outputs forced low");
    // clear while still high: stays latched
    clear = 1; @(negedge clk); clear = 0;
    @(negedge clk);
    chk(interlock, "clear ignored while input high");
    din[8] = 0;
    repeat (DEB + 4) @(negedge clk);
    chk(interlock, "latch holds after input returns low");
    clear = 1; @(negedge clk); clear = 0;
    repeat (2) @(negedge clk);
    chk(!interlock && latched == '0 && dout == 8'hA5, "cleared");
    // random check of all 16 debounced inputs
    din = 16'h5A3C;
    repeat (DEB + 4) @(negedge clk);
    chk(din_db == 16'h5A3C, $sformatf("din_db %h", din_db));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
