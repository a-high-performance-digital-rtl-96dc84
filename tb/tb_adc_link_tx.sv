// tb_adc_link_tx: checks the SPI frame sent by the ADC card.
//
// A monitor in the testbench samples sdo at every rising sclk edge while cs_n
// is low and rebuilds the frame; it must equal the frame handed to the
// transmitter, MSB first, with exactly FRAME_W clocks. The sclk period must be
// 2 * SCLK_DIV clocks and the whole transfer FRAME_W * 2 * SCLK_DIV + 2 clocks
// of busy.
module tb_adc_link_tx;
  localparam int SCLK_DIV = 3, FRAME_W = 80;
  logic clk = 0, rst_n = 0, send = 0;
  logic [FRAME_W-1:0] frame;
  logic sclk, cs_n, sdo, busy;
  int checks = 0, failures = 0;

  adc_link_tx #(.SCLK_DIV(SCLK_DIV), .FRAME_W(FRAME_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // monitor
  logic [FRAME_W-1:0] got;
  int nbits, last_rise, rise_gap_bad, tcyc;
  logic sclk_d;
  always @(posedge clk) begin
    tcyc++;
    sclk_d <= sclk;
    if (!cs_n && sclk && !sclk_d) begin
      got = {got[FRAME_W-2:0], sdo};
      nbits++;
      if (nbits > 1 && tcyc - last_rise != 2 * SCLK_DIV) rise_gap_bad++;
      last_rise = tcyc;
    end
  end

  initial begin
    tcyc = 0; sclk_d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      logic [FRAME_W-1:0] fr;
      int busy_cycles;
      fr = {$urandom, $urandom, 16'($urandom)};
      if (f == 0) fr = '1;
      if (f == 1) fr = '0;
      nbits = 0; rise_gap_bad = 0;
      @(negedge clk);
      frame = fr; send = 1;
      @(negedge clk); send = 0; frame = '0;
      busy_cycles = 1;
      while (busy) begin @(negedge clk); busy_cycles++; end
      chk(nbits == FRAME_W, $sformatf("bits %0d", nbits));
      chk(got == fr, $sformatf("frame %h exp %h", got, fr));
      chk(rise_gap_bad == 0, "sclk period");
      chk(busy_cycles == FRAME_W * 2 * SCLK_DIV + 2, $sformatf("busy %0d cycles", busy_cycles));
      chk(cs_n, "cs_n high after frame");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
