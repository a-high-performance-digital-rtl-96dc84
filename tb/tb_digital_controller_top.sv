// tb_digital_controller_top: end-to-end run of the whole controller at its
// default sizes.
//
// Two bus-functional processors drive the two register buses, behavioural
// ADC models answer the ADC card, and the fiber output is looped back to the
// fiber input. One complete operation is run:
//   boot      processor 1 stays in reset until processor 0 reports boot done;
//   fp        both hardware multipliers compute a product;
//   shared    each processor writes its half of the shared RAM and reads the
//             other's; a write into the other half is refused;
//   pwm       100 kHz (1500 steps), duty 375.25 steps: rounding correction must
//             give one 376-step period in four, channel 1 shifted by 750;
//   adc       one frame per PWM period: 6 current samples at 1 MS/s and their
//             sum, seen by processor 0 through its registers;
//   waveform  processor 1 loads 8 points, local mode plays and repeats them,
//             a second waveform loaded meanwhile takes over at the next waveform
//             period (bank swap), then remote mode waits for the trigger fiber;
//   link      one byte each in RS232 and Manchester mode over the fiber loop;
//   sync      a cascade sync pulse restarts the PWM period;
//   interlock an enabled digital input stops the PWM and clears the outputs.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_digital_controller_top;
  import ctrl_pkg::*;
  localparam int P = 1500;
  logic clk = 0, rst_n = 0;
  logic cpu0_reset_n, cpu1_reset_n, cpu0_boot_done = 0;
  logic [31:0] cpu0_reset_addr, cpu1_reset_addr;
  logic [11:0] cpu0_addr = '0, cpu1_addr = '0;
  logic cpu0_we = 0, cpu1_we = 0;
  logic [31:0] cpu0_wdata = '0, cpu1_wdata = '0, cpu0_rdata, cpu1_rdata;
  logic cpu0_wr_denied, cpu1_wr_denied, cpu0_irq, cpu1_irq;
  logic cpu0_ci_start = 0, cpu1_ci_start = 0, cpu0_ci_done, cpu1_ci_done;
  logic [31:0] cpu0_ci_dataa, cpu0_ci_datab, cpu1_ci_dataa, cpu1_ci_datab;
  logic [31:0] cpu0_ci_result, cpu1_ci_result;
  logic [PWM_NCH-1:0] pwm;
  logic sync_in = 0, sync_out, trig_fiber = 0, fiber_tx, fiber_rx;
  logic [15:0] din = '0;
  logic [7:0] dout;
  logic i_conv_start, i_adc_valid, v_conv_start, v_adc_valid = 0;
  logic signed [17:0] i_adc_data;
  logic [15:0] v_adc_data [4];
  int checks = 0, failures = 0;

  digital_controller_top dut (.*);
  adc_model #(.W(18), .LAT(100), .LEVEL(-20000)) iadc (.clk(clk), .conv_start(i_conv_start),
                                                      .valid(i_adc_valid), .data(i_adc_data));
  assign fiber_rx = fiber_tx;
  always #3.333 clk = ~clk;   // 150 MHz

  // voltage ADC model: channel c reads 100 * c + 7
  always @(posedge clk) begin
    if (v_conv_start) begin
      fork begin
        repeat (40) @(posedge clk);
        for (int c = 0; c < 4; c++) v_adc_data[c] <= 16'(100 * c + 7);
        v_adc_valid <= 1;
        @(posedge clk) v_adc_valid <= 0;
      end join_none
    end
  end

  initial begin
    #4_000_000;   // 4 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- bus-functional processors ----------------
  task automatic wr0(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk) cpu0_addr = a; cpu0_wdata = d; cpu0_we = 1;
    @(negedge clk) cpu0_we = 0;
  endtask
  task automatic rd0(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk) cpu0_addr = a;
    @(negedge clk) d = cpu0_rdata;
  endtask
  task automatic wr1(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk) cpu1_addr = a; cpu1_wdata = d; cpu1_we = 1;
    @(negedge clk) cpu1_we = 0;
  endtask
  task automatic rd1(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk) cpu1_addr = a;
    @(negedge clk) d = cpu1_rdata;
  endtask
  function automatic logic [11:0] creg(input ctrl_reg_e r); return 12'h400 + 12'(r); endfunction
  function automatic logic [11:0] mreg(input comm_reg_e r); return 12'h400 + 12'(r); endfunction

  // ---------------- monitors ----------------
  int n_boot = 0, n_fp = 0, n_shared = 0, n_denied = 0, n_rc = 0, n_phase = 0,
      n_adc = 0, n_wave_local = 0, n_swap = 0, n_remote = 0, n_rs232 = 0, n_manch = 0,
      n_sync = 0, n_interlock = 0;

  // PWM high time per period and channel-1 delay
  int hi0 = 0, t_in = 0, rise0 = -1, rise1 = -1;
  int highs [$];
  int delays [$];
  logic [1:0] pwm_d = '0;
  always @(posedge clk) if (rst_n) begin
    pwm_d <= pwm;
    if (dut.period_start) begin
      highs.push_back(hi0);
      if (rise0 >= 0 && rise1 >= 0) delays.push_back(rise1 - rise0);
      hi0 = 0; t_in = 0; rise0 = -1; rise1 = -1;
    end
    t_in++;
    if (pwm[0]) hi0++;
    if (pwm[0] && !pwm_d[0] && rise0 < 0) rise0 = t_in;
    if (pwm[1] && !pwm_d[1] && rise1 < 0) rise1 = t_in;
  end

  // current ADC outputs summed per PWM period (for the frame check)
  longint isum_acc = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.period_start) isum_acc = 0;
    if (i_adc_valid) isum_acc += i_adc_data;
  end

  // waveform references seen by processor 0 on each data trigger
  logic [31:0] refs [$];
  always @(posedge clk) if (rst_n && dut.wave_data_trig) refs.push_back(dut.wave_ref);

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- boot ----
    wait (cpu0_reset_n);
    repeat (200) @(negedge clk);
    chk(!cpu1_reset_n, "processor 1 held while processor 0 boots");
    cpu0_boot_done = 1;
    repeat (3) @(negedge clk);
    chk(cpu1_reset_n, "processor 1 released");
    if (cpu1_reset_n) n_boot++;

    // ---- floating-point multipliers: 1.5 * -2.5 = -3.75, 3 * 0.5 = 1.5 ----
    @(negedge clk);
    cpu0_ci_dataa = 32'h3FC0_0000; cpu0_ci_datab = 32'hC020_0000; cpu0_ci_start = 1;
    cpu1_ci_dataa = 32'h4040_0000; cpu1_ci_datab = 32'h3F00_0000; cpu1_ci_start = 1;
    @(negedge clk) cpu0_ci_start = 0; cpu1_ci_start = 0;
    @(negedge clk);
    chk(cpu0_ci_done && cpu0_ci_result == 32'hC070_0000, "fp0 -3.75");
    chk(cpu1_ci_done && cpu1_ci_result == 32'h3FC0_0000, "fp1 1.5");
    if (cpu0_ci_result == 32'hC070_0000 && cpu1_ci_result == 32'h3FC0_0000) n_fp++;

    // ---- shared RAM ----
    wr0(12'h010, 32'h1111_0010);
    wr1(12'h210, 32'h2222_0210);
    rd1(12'h010, r); chk(r == 32'h1111_0010, "processor 1 reads processor 0 half");
    if (r == 32'h1111_0010) n_shared++;
    rd0(12'h210, r); chk(r == 32'h2222_0210, "processor 0 reads processor 1 half");
    fork
      wr1(12'h010, 32'hBAD0_BAD0);
      begin @(negedge clk); @(negedge clk); if (cpu1_wr_denied) n_denied++; end
    join
    rd0(12'h010, r); chk(r == 32'h1111_0010, "refused write left data intact");

    // ---- PWM: 100 kHz, duty 375.25, channel 1 at 180 degrees ----
    wr0(creg(CR_PWM_PERIOD), P);
    wr0(creg(CR_PWM_DUTY), {18'd375, 14'd4096});
    wr0(creg(CR_PWM_PHASE0), 0);
    wr0(creg(CR_PWM_PHASE1), P / 2);
    wr0(creg(CR_CTRL), 32'h1);
    repeat (3 * P) @(negedge clk);
    highs = {}; delays = {};
    repeat (8 * P + 10) @(negedge clk);
    begin
      int s = 0;
      for (int i = 0; i < 8; i++) begin
        s += highs[i];
        chk(highs[i] == 375 || highs[i] == 376, $sformatf("high time %0d", highs[i]));
        if (highs[i] == 376) n_rc++;
      end
      chk(s == 8 * 375 + 2, $sformatf("8-period high sum %0d", s));
      foreach (delays[i]) begin
        chk(delays[i] == P / 2, $sformatf("phase delay %0d", delays[i]));
        if (delays[i] == P / 2) n_phase++;
      end
    end

    // ---- ADC frames through the backplane ----
    wr0(creg(CR_STATUS), 32'hF);
    repeat (2) begin
      @(posedge clk iff dut.period_start);
      wait (dut.adc_valid);
      @(negedge clk);
      rd0(creg(CR_ADC_ICOUNT), r);
      chk(r == (P - 600) / 150, $sformatf("samples per frame %0d", r));
      rd0(creg(CR_ADC_ISUM), r);
      chk(longint'(signed'(r)) == isum_acc, $sformatf("current sum %0d exp %0d", signed'(r), isum_acc));
      rd0(creg(CR_ADC_V), r);
      chk(r == {16'd107, 16'd7}, $sformatf("voltages %h", r));
      rd0(creg(CR_STATUS), r);
      chk(r[ST_ADC_NEW] && !r[ST_ADC_ERR] && cpu0_irq, "ADC status and irq");
      if (r[ST_ADC_NEW]) n_adc++;
      wr0(creg(CR_STATUS), 32'hF);
    end

    // ---- waveform: local mode ----
    wr1(mreg(MR_WAVE_ADDR), 0);
    for (int i = 0; i < 8; i++) wr1(mreg(MR_WAVE_DATA), 32'h4100_0000 + i);
    wr1(mreg(MR_WAVE_COMMIT), 8);
    wr0(creg(CR_WAVE_DIV), 2);
    refs = {};
    wr0(creg(CR_CTRL), 32'h3);          // pwm on, run, local
    wait (refs.size() >= 12);
    for (int i = 0; i < 12; i++)
      chk(refs[i] == 32'h4100_0000 + 32'(i % 8), $sformatf("local point %0d = %h", i, refs[i]));
    if (refs[8] == 32'h4100_0000) n_wave_local++;
    rd1(mreg(MR_WAVE_STATUS), r);
    chk(r[0] == 1'b1 && !r[1] && r[2], "first waveform plays from bank 1");
    // second waveform loads into bank 0 while the first plays
    wr1(mreg(MR_WAVE_ADDR), 0);
    for (int i = 0; i < 4; i++) wr1(mreg(MR_WAVE_DATA), 32'h4200_0000 + i);
    wr1(mreg(MR_WAVE_COMMIT), 4);
    begin
      int k0;
      k0 = refs.size();
      wait (refs.size() >= k0 + 16);
      k0 = -1;
      foreach (refs[i]) if (k0 < 0 && refs[i] == 32'h4200_0000) k0 = i;
      chk(k0 > 0 && refs[k0-1] == 32'h4100_0007, "swap at the end of a waveform period");
      for (int i = 0; i < 8; i++)
        chk(refs[k0+i] == 32'h4200_0000 + 32'(i % 4), $sformatf("second waveform point %0d", i));
      rd1(mreg(MR_WAVE_STATUS), r);
      if (k0 > 0 && r[0] == 1'b0) n_swap++;
    end
    // remote mode: hold at the end, restart on the trigger fiber
    wr0(creg(CR_CTRL), 32'h7);
    wait (!dut.w_playing);
    begin
      int k0;
      k0 = refs.size();
      repeat (6 * P) @(negedge clk);
      chk(refs.size() == k0, "remote mode waits for trigger");
      trig_fiber = 1; repeat (10) @(negedge clk); trig_fiber = 0;
      repeat (2 * P) @(negedge clk);
      chk(refs.size() == k0 + 1 && refs[k0] == 32'h4200_0000, "remote trigger restarts waveform");
      if (refs.size() > k0) n_remote++;
    end

    // ---- fiber link: RS232 then Manchester, looped back ----
    wr1(mreg(MR_LINK_CTRL), LINK_RS232);
    wr1(mreg(MR_LINK_STATUS), 3);
    wr1(mreg(MR_LINK_TX), 8'hA7);
    repeat (12 * 1302) @(negedge clk);
    rd1(mreg(MR_LINK_RX), r);
    chk(r == 8'hA7, $sformatf("RS232 loopback %h", r));
    rd1(mreg(MR_LINK_STATUS), r);
    chk(r[1:0] == 2'b01 && cpu1_irq, "RS232 status");
    if (r[0]) n_rs232++;
    wr1(mreg(MR_LINK_CTRL), LINK_MANCHESTER);
    wr1(mreg(MR_LINK_STATUS), 3);
    wr1(mreg(MR_LINK_TX), 8'h3C);
    repeat (12 * 60) @(negedge clk);
    rd1(mreg(MR_LINK_RX), r);
    chk(r == 8'h3C, $sformatf("Manchester loopback %h", r));
    rd1(mreg(MR_LINK_STATUS), r);
    chk(r[1:0] == 2'b01, "Manchester status");
    if (r[0]) n_manch++;

    // ---- cascade sync: restart the PWM period in mid-period ----
    @(posedge clk iff dut.pwm_count == 500);
    @(negedge clk) sync_in = 1;
    begin
      int t;
      t = 0;
      while (dut.pwm_count != 0 && t < 20) begin @(negedge clk); t++; end
      chk(t <= 4 && dut.pwm_count == 0, $sformatf("sync restart after %0d", t));
      if (t <= 4) n_sync++;
    end
    repeat (8) @(negedge clk);
    sync_in = 0;

    // ---- interlock on input 5 ----
    wr0(creg(CR_DOUT), 8'h81);
    wr0(creg(CR_ILK_MASK), 16'h0020);
    repeat (3) @(negedge clk);
    chk(dout == 8'h81, "outputs before interlock");
    din[5] = 1;
    repeat (1600) @(negedge clk);
    rd0(creg(CR_STATUS), r);
    chk(r[ST_INTERLOCK] && dout == 8'h00, "interlock tripped");
    repeat (P + 10) @(negedge clk);
    begin
      int hi = 0;
      repeat (2 * P) begin @(negedge clk); if (pwm != 0) hi++; end
      chk(hi == 0, "PWM off during interlock");
      if (hi == 0 && r[ST_INTERLOCK]) n_interlock++;
    end
    din[5] = 0;
    repeat (1600) @(negedge clk);
    wr0(creg(CR_ILK_LATCH), 0);
    repeat (2 * P + 10) @(negedge clk);
    begin
      int hi = 0;
      repeat (P) begin @(negedge clk); if (pwm[0]) hi++; end
      chk(hi == 375 || hi == 376, $sformatf("PWM back after clear: %0d", hi));
    end

    // ---- every mechanism must have happened ----
    chk(n_boot > 0, "boot sequence");       chk(n_fp > 0, "fp multiply");
    chk(n_shared > 0, "shared RAM");        chk(n_denied > 0, "refused write");
    chk(n_rc > 0, "rounding correction");   chk(n_phase > 0, "phase shift");
    chk(n_adc > 0, "ADC frame");            chk(n_wave_local > 0, "local repeat");
    chk(n_swap > 0, "bank swap");           chk(n_remote > 0, "remote trigger");
    chk(n_rs232 > 0, "RS232 link");         chk(n_manch > 0, "Manchester link");
    chk(n_sync > 0, "cascade sync");        chk(n_interlock > 0, "interlock");
    $display("mechanisms: boot=%0d fp=%0d shared=%0d denied=%0d rc=%0d phase=%0d adc=%0d local=%0d swap=%0d remote=%0d rs232=%0d manchester=%0d sync=%0d interlock=%0d",
             n_boot, n_fp, n_shared, n_denied, n_rc, n_phase, n_adc, n_wave_local, n_swap,
             n_remote, n_rs232, n_manch, n_sync, n_interlock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
