// tb_workload_current_oversampling: the current channel across the PWM range.
//
// The complete controller runs at its default sizes at PWM rates of 1, 10, 20,
// 50 and 100 kHz (150000 down to 1500 steps). A current ADC model here returns
// a constant level plus deterministic pseudo-random noise (the sum of four
// uniform draws from a linear congruential generator, about 9.8 LSB RMS). In
// every checked period the frame that reaches the control card must:
//   * arrive within the period it was measured in (exactly one frame per period);
//   * carry floor((P - 600) / 150) samples, the number of 1 MS/s conversions
//     that fit before the 4 us margin, and that many conversions must occur;
//   * carry the exact sum of the samples the model returned in that period;
//   * carry the voltage channels 0 and 1 of the conversion started that period.
// Processor 0 then reads the last count over the bus. Averaging n samples of
// white noise lowers its RMS by sqrt(n): the effective resolution
// log2(full scale / RMS) of the period mean is computed from the frames and
// must lie within 1 bit of the single-sample resolution plus 0.5*log2(n).
// This reproduces the trend of resolution against PWM rate, not the absolute
// numbers of a particular converter.
module tb_workload_current_oversampling;
  import ctrl_pkg::*;
  localparam int LEVEL = 60000;
  localparam int NR = 5;
  localparam int RATE_P [NR] = '{150000, 15000, 7500, 3000, 1500};
  localparam int RATE_N [NR] = '{10, 30, 30, 30, 30};   // checked periods
  logic clk = 0, rst_n = 0;
  logic [11:0] addr = '0;
  logic we = 0;
  logic [31:0] wdata = '0, rdata;
  logic [PWM_NCH-1:0] pwm;
  logic sync_out;
  logic i_conv_start, v_conv_start;
  logic i_adc_valid = 0, v_adc_valid = 0;
  logic signed [17:0] i_adc_data = '0;
  logic [15:0] v_adc_data [4];
  int checks = 0, failures = 0;

  logic r0n, r1n, wd0, wd1, irq0, irq1, cd0, cd1, ftx;
  logic [31:0] ra0, ra1, rd1, cr0, cr1;
  logic [7:0] dout;
  digital_controller_top u (
    .clk(clk), .rst_n(rst_n),
    .cpu0_reset_n(r0n), .cpu0_reset_addr(ra0), .cpu0_boot_done(1'b1),
    .cpu0_addr(addr), .cpu0_we(we), .cpu0_wdata(wdata), .cpu0_rdata(rdata),
    .cpu0_wr_denied(wd0), .cpu0_irq(irq0),
    .cpu0_ci_start(1'b0), .cpu0_ci_dataa(32'd0), .cpu0_ci_datab(32'd0), .cpu0_ci_done(cd0), .cpu0_ci_result(cr0),
    .cpu1_reset_n(r1n), .cpu1_reset_addr(ra1),
    .cpu1_addr(12'd0), .cpu1_we(1'b0), .cpu1_wdata(32'd0), .cpu1_rdata(rd1),
    .cpu1_wr_denied(wd1), .cpu1_irq(irq1),
    .cpu1_ci_start(1'b0), .cpu1_ci_dataa(32'd0), .cpu1_ci_datab(32'd0), .cpu1_ci_done(cd1), .cpu1_ci_result(cr1),
    .pwm(pwm), .sync_in(1'b0), .sync_out(sync_out),
    .trig_fiber(1'b0), .fiber_tx(ftx), .fiber_rx(1'b1),
    .din(16'd0), .dout(dout),
    .i_conv_start(i_conv_start), .i_adc_valid(i_adc_valid), .i_adc_data(i_adc_data),
    .v_conv_start(v_conv_start), .v_adc_valid(v_adc_valid), .v_adc_data(v_adc_data)
  );

  always #3.333 clk = ~clk;

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // current ADC: 10-clock latency, LEVEL + noise
  int unsigned lcg = 32'd12345;
  function automatic int noise();
    int s = 0;
    for (int j = 0; j < 4; j++) begin
      lcg = lcg * 32'd1103515245 + 32'd12345;
      s += int'((lcg >> 16) % 17) - 8;
    end
    return s;
  endfunction
  always @(posedge clk) if (rst_n && i_conv_start) begin
    fork begin
      int v;
      v = LEVEL + noise();
      repeat (9) @(posedge clk);
      i_adc_valid <= 1; i_adc_data <= 18'(v);
      @(posedge clk) i_adc_valid <= 0;
    end join_none
  end

  // voltage ADC: channel c of conversion k reads 100*k + c
  int vk = 0;
  always @(posedge clk) if (rst_n && v_conv_start) begin
    fork begin
      int k;
      k = vk; vk++;
      repeat (40) @(posedge clk);
      for (int c = 0; c < 4; c++) v_adc_data[c] <= 16'(100 * k + c);
      v_adc_valid <= 1;
      @(posedge clk) v_adc_valid <= 0;
    end join_none
  end

  // per period bookkeeping, period marked by the rising edge of sync_out
  logic sync_d = 0;
  longint psum; int pcnt, pframes, vk_at_start;
  bit armed = 0;
  int cur_p = 0;
  real means [$];
  real single_sq; longint single_n;
  always @(posedge clk) if (rst_n) begin
    sync_d <= sync_out;
    if (i_adc_valid) begin
      psum += longint'(i_adc_data); pcnt++;
      single_sq += real'((int'(i_adc_data) - LEVEL) ** 2); single_n++;
    end
    if (u.adc_valid) begin
      adc_frame_t f;
      f = adc_frame_t'(u.adc_frame);
      pframes++;
      if (armed) begin
        chk(int'(f.i_count) == (cur_p - 600) / 150, $sformatf("P=%0d count %0d", cur_p, f.i_count));
        chk(pcnt == (cur_p - 600) / 150, $sformatf("P=%0d conversions %0d", cur_p, pcnt));
        chk(longint'(signed'(f.i_sum)) == psum, $sformatf("P=%0d sum %0d exp %0d", cur_p, f.i_sum, psum));
        chk(f.v0 == 16'(100 * vk_at_start) && f.v1 == 16'(100 * vk_at_start + 1),
            $sformatf("P=%0d voltages %0d %0d", cur_p, f.v0, f.v1));
        if (f.i_count != 0) means.push_back(real'(signed'(f.i_sum)) / real'(f.i_count));
      end
    end
    if (sync_out && !sync_d) begin
      if (armed) chk(pframes == 1, $sformatf("P=%0d %0d frames in one period", cur_p, pframes));
      psum = 0; pcnt = 0; pframes = 0; vk_at_start = vk;
    end
  end

  task automatic wr(input ctrl_reg_e r, input logic [31:0] d);
    @(negedge clk) addr = 12'h400 + 12'(r); wdata = d; we = 1;
    @(negedge clk) we = 0;
  endtask
  task automatic rd(input ctrl_reg_e r, output logic [31:0] d);
    @(negedge clk) addr = 12'h400 + 12'(r); we = 0;
    @(negedge clk) d = rdata;
  endtask
  task automatic periods(input int n);
    repeat (n) begin
      @(posedge clk iff (sync_out && !sync_d));
    end
  endtask

  real res_single, res_mean [NR];
  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(CR_CTRL, 1);
    for (int r = 0; r < NR; r++) begin
      real m, v;
      armed = 0;
      wr(CR_PWM_PERIOD, RATE_P[r]);
      wr(CR_PWM_DUTY, {18'(RATE_P[r] / 2), 14'd0});
      periods(4);                     // new period in force and measured
      cur_p = RATE_P[r];
      means = {};
      @(negedge clk) armed = 1;
      periods(RATE_N[r]);
      armed = 0;
      rd(CR_ADC_ICOUNT, d);
      chk(d == 32'((RATE_P[r] - 600) / 150), $sformatf("P=%0d ICOUNT register %0d", RATE_P[r], d));
      m = 0; v = 0;
      foreach (means[i]) m += means[i];
      m /= means.size();
      foreach (means[i]) v += (means[i] - m) ** 2;
      v /= means.size();
      res_single = $ln(131072.0 / $sqrt(single_sq / single_n)) / $ln(2.0);
      res_mean[r] = $ln(131072.0 / $sqrt(v)) / $ln(2.0);
      begin
        real expect_res;
        int n;
        n = (RATE_P[r] - 600) / 150;
        expect_res = res_single + 0.5 * $ln(real'(n)) / $ln(2.0);
        $display("PWM %0d kHz: %0d samples/period, effective resolution %.2f bit (single sample %.2f, expected %.2f)",
                 150000 / RATE_P[r], n, res_mean[r], res_single, expect_res);
        chk(means.size() == RATE_N[r], $sformatf("P=%0d %0d period means", RATE_P[r], means.size()));
        chk(res_mean[r] > expect_res - 1.0 && res_mean[r] < expect_res + 1.0,
            $sformatf("P=%0d resolution %.2f expected %.2f", RATE_P[r], res_mean[r], expect_res));
      end
    end
    chk(res_mean[0] > res_mean[NR-1] + 2.0, "resolution falls with PWM rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
