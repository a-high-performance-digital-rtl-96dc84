// tb_waveform_ctrl: checks ping-pong waveform playback and both trigger modes.
//
// PWM period starts come every 10 clocks; a data trigger is expected every
// DIV = 3 PWM periods. Local mode: waveform A (10 points) must play A0..A9 and
// repeat with no gap, the data triggers exactly DIV PWM periods apart across
// the restart. Waveform B (5 points) loaded during playback must take over
// exactly at the next waveform period, after A9. Remote mode: after the last
// point nothing more happens until a remote trigger; the trigger restarts the
// waveform at the next PWM period start. Expected sequences are written out
// here from the mode rules.
module tb_waveform_ctrl;
  import ctrl_pkg::*;
  localparam int AW = 6, DW = 32, DIV = 3;
  logic clk = 0, rst_n = 0, pwm_period_start = 0, run = 0, remote_trig = 0;
  wave_mode_e mode = WAVE_LOCAL;
  logic [15:0] data_div = 16'(DIV);
  logic wr_en = 0, load_done = 0;
  logic [AW-1:0] wr_addr;
  logic [DW-1:0] wr_data;
  logic [AW:0] load_len;
  logic [DW-1:0] ref_value;
  logic data_trig, period_trig, active_bank, pending, playing;
  logic [AW-1:0] index;
  int checks = 0, failures = 0;

  waveform_ctrl #(.AW(AW), .DW(DW), .DIV_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // PWM period starts and a log of data triggers
  int pwm_n = 0, nper = 0;
  logic [DW-1:0] vals [$];
  int            when [$];
  always @(posedge clk) begin
    if (pwm_period_start) pwm_n++;
    if (rst_n && data_trig) begin vals.push_back(ref_value); when.push_back(pwm_n); end
    if (rst_n && period_trig) nper++;
  end
  initial forever begin
    repeat (9) @(negedge clk);
    pwm_period_start = 1;
    @(negedge clk) pwm_period_start = 0;
  end

  task automatic load(input logic [DW-1:0] base, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk) wr_en = 1; wr_addr = AW'(i); wr_data = base + DW'(i);
    end
    @(negedge clk) wr_en = 0; load_len = (AW+1)'(n); load_done = 1;
    @(negedge clk) load_done = 0;
  endtask

  // wait until the log holds n entries
  task automatic wait_n(input int n);
    while (vals.size() < n) @(posedge clk);
  endtask

  task automatic expect_seq(input int from, input logic [DW-1:0] exp [$]);
    for (int i = 0; i < exp.size(); i++)
      chk(vals[from+i] == exp[i], $sformatf("point %0d = %h exp %h", from + i, vals[from+i], exp[i]));
  endtask

  initial begin
    logic [DW-1:0] e [$];
    int n0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(32'hA000, 10);
    chk(pending, "A pending");
    mode = WAVE_LOCAL; run = 1;
    wait_n(25);
    chk(active_bank == 1'b1 && !pending, "A took over from bank 1");
    e = {};
    for (int r = 0; r < 2; r++) for (int i = 0; i < 10; i++) e.push_back(32'hA000 + i);
    for (int i = 0; i < 5; i++) e.push_back(32'hA000 + i);
    expect_seq(0, e);
    for (int i = 1; i < 25; i++)
      chk(when[i] - when[i-1] == DIV, $sformatf("data trigger spacing %0d", when[i] - when[i-1]));
    // load B while A plays: it must start right after the current A9
    load(32'hB000, 5);
    wait_n(50);
    n0 = -1;
    for (int i = 25; i < 50; i++) if (vals[i] == 32'hB000 && n0 < 0) n0 = i;
    chk(n0 > 0 && vals[n0-1] == 32'hA009, $sformatf("B starts after A9 (at %0d)", n0));
    e = {};
    for (int i = 0; i < 5; i++) e.push_back(32'hB000 + i);
    for (int i = 0; i < 5; i++) e.push_back(32'hB000 + i);
    expect_seq(n0, e);
    for (int i = 1; i < 50; i++)
      chk(when[i] - when[i-1] == DIV, $sformatf("spacing at %0d: %0d", i, when[i] - when[i-1]));
    chk(active_bank == 1'b0, "B plays from bank 0");
    // remote mode: play to the end, then hold
    mode = WAVE_REMOTE;
    while (playing) @(posedge clk);
    n0 = vals.size();
    chk(vals[n0-1] == 32'hB004 && ref_value == 32'hB004, "holds last point");
    repeat (200) @(negedge clk);
    chk(vals.size() == n0, "no data trigger without remote trigger");
    begin
      int p0;
      p0 = nper;
      @(negedge clk) remote_trig = 1;
      @(negedge clk) remote_trig = 0;
      wait_n(n0 + 5);
      chk(nper == p0 + 1, "one period trigger");
      e = {};
      for (int i = 0; i < 5; i++) e.push_back(32'hB000 + i);
      expect_seq(n0, e);
      chk(when[n0] - when[n0-1] > 10, "restart waited for the remote trigger");
    end
    while (playing) @(posedge clk);
    // a commit in remote mode waits for the trigger, then swaps
    load(32'hC000, 3);
    repeat (100) @(negedge clk);
    chk(pending && vals.size() == n0 + 5, "C waits for trigger");
    @(negedge clk) remote_trig = 1;
    @(negedge clk) remote_trig = 0;
    wait_n(n0 + 8);
    e = {32'hC000, 32'hC001, 32'hC002};
    expect_seq(n0 + 5, e);
    chk(active_bank == 1'b1 && !pending, "C swapped in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
