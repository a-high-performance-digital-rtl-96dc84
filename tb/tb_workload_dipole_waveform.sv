// tb_workload_dipole_waveform: the dipole-magnet programmable waveform case.
//
// The application plays a 16000-point stepped trapezoid with one point every
// 20 PWM periods of a 16 kHz PWM (9375 steps of 6.67 ns): 20 s per waveform
// period. pwm_gen and waveform_ctrl run at their default sizes in local
// (self-triggered) mode. All 16000 points of the waveform are loaded into one
// bank; a second waveform, loaded into the other bank while the first plays,
// must take over exactly at the start of the following waveform period. Every
// point value, its index and the spacing of exactly 20 PWM periods (187500
// clocks) between data triggers are checked against values computed here.
// Simulating the full 20 s takes 3e9 clocks, so the length of the waveform
// period is the only reduced quantity: each period plays the first NPTS points
// of its bank (set with load_len).
module tb_workload_dipole_waveform;
  import ctrl_pkg::*;
  localparam int NPTS   = 200;      // points simulated of the 16000 loaded
  localparam int PERIOD = 9375;     // 16 kHz
  localparam int DIV    = 20;
  localparam int FULL   = 16000;

  logic clk = 0, rst_n = 0;
  logic [PWM_CNT_W-1:0] phase [PWM_NCH];
  logic [PWM_NCH-1:0] pwm;
  logic period_start;
  logic [PWM_CNT_W-1:0] count;
  logic run = 0, remote_trig = 0, wr_en = 0, load_done = 0;
  logic [13:0] wr_addr;
  logic [31:0] wr_data, ref_value;
  logic [14:0] load_len;
  logic data_trig, period_trig, active_bank, pending, playing;
  logic [13:0] index;
  int checks = 0, failures = 0;

  pwm_gen u_pwm (.clk(clk), .rst_n(rst_n), .enable(1'b1), .period(PWM_CNT_W'(PERIOD)),
                 .duty({18'(PERIOD / 2), 14'd0}), .phase(phase), .sync_in(1'b0),
                 .pwm(pwm), .period_start(period_start), .count(count));
  waveform_ctrl u_wave (.clk(clk), .rst_n(rst_n), .pwm_period_start(period_start), .run(run),
                        .mode(WAVE_LOCAL), .remote_trig(remote_trig), .data_div(16'(DIV)),
                        .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
                        .load_len(load_len), .load_done(load_done),
                        .ref_value(ref_value), .data_trig(data_trig), .period_trig(period_trig),
                        .active_bank(active_bank), .pending(pending), .playing(playing),
                        .index(index));
  always #1 clk = ~clk;

  initial begin
    #300_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok && failures < 20) $display("FAIL %s", msg);
    if (!ok) failures++;
  endtask

  // Six-step trapezoid in mA: a linear ramp to 1200 A over the first 600
  // points (0.75 s at 1.25 ms per point), then six plateaus of 1200, 1000, ... 200 A; each new
  // plateau is reached by a 100-point linear ramp from the one before.
  // Waveform 2 is the same shape scaled to 90 %.
  function automatic logic [31:0] shape(input int i, input int which);
    longint ma, lvl, prev;
    int ramp, seg, pos, seglen;
    ramp   = 600;
    seglen = (FULL - ramp) / 6;
    if (i < ramp) ma = longint'(1_200_000) * i / longint'(ramp);
    else begin
      seg  = (i - ramp) / seglen;
      if (seg > 5) seg = 5;
      pos  = (i - ramp) - seg * seglen;
      lvl  = 1_200_000 - 200_000 * seg;
      prev = (seg == 0) ? lvl : lvl + 200_000;
      ma   = (pos < 100) ? prev + (lvl - prev) * pos / 100 : lvl;
    end
    if (which == 2) ma = ma * 9 / 10;
    return 32'(ma);
  endfunction

  task automatic load(input int which, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk) wr_en = 1; wr_addr = 14'(i); wr_data = shape(i, which);
    end
    @(negedge clk) wr_en = 0; load_len = 15'(n); load_done = 1;
    @(negedge clk) load_done = 0;
  endtask

  // data-trigger log
  longint t = 0, last_t = -1;
  int npts = 0, nper = 0;
  logic [31:0] got [$];
  always @(posedge clk) begin
    t++;
    if (rst_n && data_trig) begin
      got.push_back(ref_value);
      if (last_t >= 0) chk(t - last_t == DIV * PERIOD, $sformatf("spacing %0d", t - last_t));
      last_t = t;
    end
    if (rst_n && period_trig) nper++;
  end

  initial begin
    for (int k = 0; k < PWM_NCH; k++) phase[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(1, FULL);                       // the full 16000-point waveform
    chk(pending, "first waveform pending");
    // play a shortened period of NPTS points to keep the run short
    @(negedge clk) load_len = 15'(NPTS); load_done = 1;
    @(negedge clk) load_done = 0;
    run = 1;
    wait (got.size() == 10);
    load(2, FULL);                       // the next waveform, loaded while playing
    @(negedge clk) load_len = 15'(NPTS); load_done = 1;
    @(negedge clk) load_done = 0;
    wait (got.size() == 2 * NPTS + 5);
    for (int i = 0; i < NPTS; i++)
      chk(got[i] == shape(i, 1), $sformatf("wave 1 point %0d = %0d exp %0d", i, got[i], shape(i, 1)));
    for (int i = 0; i < NPTS + 5; i++)
      chk(got[NPTS + i] == shape(i % NPTS, 2), $sformatf("wave 2 point %0d", i));
    chk(nper == 3, $sformatf("%0d period triggers", nper));
    $display("waveform periods: %0d, points played: %0d", nper, got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
