// tb_workload_phase_shift: three controllers as in the dipole supply.
//
// A main controller and two slave controllers (A and B), each a complete
// digital_controller_top at its default sizes, run 16 kHz PWM (9375 steps).
// The main controller's sync_out drives both slaves' sync_in. Each slave drives
// two chopper legs; A at phases 0 and P/2, B at P/4 and 3P/4. Slave B comes
// out of reset later than A, so its counter starts out of step; the sync must
// pull it in. Afterwards the four legs must switch on in turn, one every
// P/4 (2343 or 2344 steps), so the summed output carries ripple at four
// times the switching frequency (64 kHz). Each slave's duty also carries a
// fraction, so rounding correction runs in both.
module tb_workload_phase_shift;
  import ctrl_pkg::*;
  localparam int P = 9375;
  localparam int NC = 3;          // 0 main, 1 slave A, 2 slave B
  logic clk = 0;
  logic rst_n [NC];
  logic [11:0] addr [NC];
  logic we [NC];
  logic [31:0] wdata [NC];
  logic [31:0] rdata [NC];
  logic [PWM_NCH-1:0] pwm [NC];
  logic sync_out [NC];
  logic sync_in [NC];
  int checks = 0, failures = 0;

  always #3.333 clk = ~clk;

  for (genvar g = 0; g < NC; g++) begin : ctl
    logic r0n, r1n, wd0, wd1, irq0, irq1, cd0, cd1, ftx, ic, vc;
    logic [31:0] ra0, ra1, rd1, cr0, cr1;
    logic [7:0] dout;
    logic [15:0] vdat [4];
    assign vdat[0] = 16'd1; assign vdat[1] = 16'd2; assign vdat[2] = 16'd3; assign vdat[3] = 16'd4;
    digital_controller_top u (
      .clk(clk), .rst_n(rst_n[g]),
      .cpu0_reset_n(r0n), .cpu0_reset_addr(ra0), .cpu0_boot_done(1'b1),
      .cpu0_addr(addr[g]), .cpu0_we(we[g]), .cpu0_wdata(wdata[g]), .cpu0_rdata(rdata[g]),
      .cpu0_wr_denied(wd0), .cpu0_irq(irq0),
      .cpu0_ci_start(1'b0), .cpu0_ci_dataa(32'd0), .cpu0_ci_datab(32'd0), .cpu0_ci_done(cd0), .cpu0_ci_result(cr0),
      .cpu1_reset_n(r1n), .cpu1_reset_addr(ra1),
      .cpu1_addr(12'd0), .cpu1_we(1'b0), .cpu1_wdata(32'd0), .cpu1_rdata(rd1),
      .cpu1_wr_denied(wd1), .cpu1_irq(irq1),
      .cpu1_ci_start(1'b0), .cpu1_ci_dataa(32'd0), .cpu1_ci_datab(32'd0), .cpu1_ci_done(cd1), .cpu1_ci_result(cr1),
      .pwm(pwm[g]), .sync_in(sync_in[g]), .sync_out(sync_out[g]),
      .trig_fiber(1'b0), .fiber_tx(ftx), .fiber_rx(1'b1),
      .din(16'd0), .dout(dout),
      .i_conv_start(ic), .i_adc_valid(1'b0), .i_adc_data(18'sd0),
      .v_conv_start(vc), .v_adc_valid(1'b0), .v_adc_data(vdat)
    );
  end

  assign sync_in[0] = 1'b0;
  assign sync_in[1] = sync_out[0];
  assign sync_in[2] = sync_out[0];

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(input int c, input ctrl_reg_e r, input logic [31:0] d);
    @(negedge clk) addr[c] = 12'h400 + 12'(r); wdata[c] = d; we[c] = 1;
    @(negedge clk) we[c] = 0;
  endtask

  task automatic setup(input int c, input int ph0, input int ph1);
    wr(c, CR_PWM_PERIOD, P);
    wr(c, CR_PWM_DUTY, {18'd2000, 14'd5461});   // 2000.333 steps
    wr(c, CR_PWM_PHASE0, ph0);
    wr(c, CR_PWM_PHASE1, ph1);
    wr(c, CR_CTRL, 1);
  endtask

  // rising edges of the four legs
  longint t = 0;
  longint rises [$];
  int legs [$];
  logic [3:0] lg, lg_d = '0;
  assign lg = {pwm[2], pwm[1]};
  always @(posedge clk) begin
    t++;
    lg_d <= lg;
    for (int k = 0; k < 4; k++)
      if (lg[k] && !lg_d[k]) begin rises.push_back(t); legs.push_back(k); end
  end

  initial begin
    for (int c = 0; c < NC; c++) begin rst_n[c] = 0; we[c] = 0; addr[c] = '0; wdata[c] = '0; end
    repeat (3) @(negedge clk);
    rst_n[0] = 1; rst_n[1] = 1;
    repeat (3777) @(negedge clk);   // slave B starts out of step
    rst_n[2] = 1;
    fork
      setup(0, 0, 0);
      setup(1, 0, P / 2);
      setup(2, P / 4, 3 * P / 4);
    join
    // settle: several periods under sync
    repeat (4 * P) @(negedge clk);
    rises = {}; legs = {};
    repeat (8 * P) @(negedge clk);
    begin
      int n;
      longint span, expect_span;
      n = rises.size();
      chk(n >= 30, $sformatf("%0d leg turn-ons in 8 periods", n));
      for (int i = 1; i < n; i++) begin
        longint g;
        g = rises[i] - rises[i-1];
        chk(g == 2343 || g == 2344, $sformatf("gap %0d between leg %0d and %0d", g, legs[i-1], legs[i]));
        // leg order: A0 (0), B0 (2), A1 (1), B1 (3)
        chk(legs[i] == ((legs[i-1] == 0) ? 2 : (legs[i-1] == 2) ? 1 : (legs[i-1] == 1) ? 3 : 0),
            $sformatf("leg order %0d after %0d", legs[i], legs[i-1]));
      end
      span = rises[n-1] - rises[0];
      expect_span = longint'(n) * P / 4 - P / 4;
      chk(span >= expect_span - 1 && span <= expect_span + 1,
          "average spacing P/4: ripple at 4x the switching frequency");
      $display("leg turn-ons: %0d, span %0d clocks", n, span);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
