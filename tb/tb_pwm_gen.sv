// tb_pwm_gen: checks period, duty with rounding correction, phase shift,
// synchronisation and enable of the PWM generator.
//
// Expected values come from the definition: period_start every P clocks
// (P = 150 MHz / f), each channel high for the corrected duty per period
// (duty 30.25 gives 30,30,30,31 and 121 steps per four periods), channel 1
// rising edge PHASE clocks after channel 0, a sync_in pulse restarts the count,
// enable = 0 gives no pulses. The 1 kHz and 100 kHz periods of the design's
// range are checked as 150000 and 1500 clocks.
module tb_pwm_gen;
  localparam int CNT_W = 18, FRAC_W = 14, NCH = 2;
  logic clk = 0, rst_n = 0, enable = 0, sync_in = 0;
  logic [CNT_W-1:0] period;
  logic [CNT_W+FRAC_W-1:0] duty;
  logic [CNT_W-1:0] phase [NCH];
  logic [NCH-1:0] pwm;
  logic period_start;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;

  pwm_gen #(.CNT_W(CNT_W), .FRAC_W(FRAC_W), .NCH(NCH)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic align();
    @(posedge clk iff period_start);
  endtask

  // Both measuring tasks start at a period_start edge and end at the next one.
  // Cycles from one period_start to the next.
  task automatic measure_period(output int n);
    n = 0;
    do begin @(posedge clk); n++; end while (!period_start);
  endtask

  // High cycles of channel ch within one period.
  task automatic measure_high(input int ch, output int hi, output int rise_at);
    int t;
    hi = 0; t = 0; rise_at = -1;
    do begin
      @(posedge clk); t++;
      if (pwm[ch]) hi++;
      if (pwm[ch] && rise_at < 0) rise_at = t;
    end while (!period_start);
  endtask

  initial begin
    int n, hi, r0, r1, tot;
    period = 100; duty = {18'd30, 14'd4096}; phase[0] = 0; phase[1] = 50;
    repeat (3) @(posedge clk);
    rst_n = 1; enable = 1;
    align();
    repeat (3) measure_period(n);
    measure_period(n); chk(n == 100, $sformatf("period %0d != 100", n));
    // rounding correction: four consecutive periods
    tot = 0;
    for (int i = 0; i < 8; i++) begin
      measure_high(0, hi, r0);
      chk(hi == 30 || hi == 31, $sformatf("duty %0d not 30/31", hi));
      tot += hi;
    end
    chk(tot == 242, $sformatf("8-period duty sum %0d != 242", tot));
    // phase shift: channel 1 rises 50 clocks after channel 0
    align();
    fork
      measure_high(0, hi, r0);
      measure_high(1, n, r1);
    join
    chk(r1 - r0 == 50, $sformatf("phase %0d != 50", r1 - r0));
    // sync: pulse sync_in mid-period, next period_start 1 clock later
    @(posedge clk iff count == 40);
    #0.5 sync_in = 1;
    @(posedge clk); #0.5 sync_in = 0;
    chk(count == 0 && period_start, $sformatf("sync restart count=%0d", count));
    // enable off: no pulses
    enable = 0;
    align();
    measure_high(0, hi, r0);
    chk(hi == 0, "pwm while disabled");
    enable = 1;
    // range end points: 100 kHz and 1 kHz
    period = 1500; duty = {18'd750, 14'd0};
    align();
    measure_period(n); measure_period(n);
    chk(n == 1500, $sformatf("100 kHz period %0d", n));
    measure_high(0, hi, r0);
    chk(hi == 750, $sformatf("50%% duty %0d", hi));
    period = 150000; duty = {18'd37500, 14'd0};
    align();
    measure_period(n); measure_period(n);
    chk(n == 150000, $sformatf("1 kHz period %0d", n));
    measure_high(0, hi, r0);
    chk(hi == 37500, $sformatf("25%% duty %0d", hi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
