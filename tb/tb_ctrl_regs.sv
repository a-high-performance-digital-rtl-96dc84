// tb_ctrl_regs: register map of the control processor.
//
// Every writable register is written with a random value and read back one
// cycle later; the outputs must carry the written fields. Status bits must set
// on their events, stay set, raise irq and clear on write-1. Read-only
// registers must show their inputs. Writing CR_ILK_LATCH must pulse ilk_clear.
module tb_ctrl_regs;
  import ctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] bus_addr = '0;
  logic bus_we = 0;
  logic [31:0] bus_wdata, bus_rdata;
  logic irq, pwm_enable, wave_run, ilk_clear;
  logic [PWM_CNT_W-1:0] pwm_period;
  logic [PWM_CNT_W+PWM_FRAC_W-1:0] pwm_duty;
  logic [PWM_CNT_W-1:0] pwm_phase [PWM_NCH];
  adc_frame_t adc_frame;
  logic adc_valid = 0, adc_err = 0, wave_data_trig = 0, wave_period_trig = 0, interlock = 0;
  wave_mode_e wave_mode;
  logic [15:0] wave_div, din, ilk_mask, ilk_latched;
  logic [31:0] wave_ref;
  logic [13:0] wave_index;
  logic [7:0] dout_reg;
  int checks = 0, failures = 0;

  ctrl_regs dut (.*);
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

  task automatic wr(input ctrl_reg_e a, input logic [31:0] d);
    @(negedge clk) bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk) bus_we = 0;
  endtask

  task automatic rd(input ctrl_reg_e a, output logic [31:0] d);
    @(negedge clk) bus_addr = a;
    @(negedge clk) d = bus_rdata;
  endtask

  initial begin
    logic [31:0] v, r;
    logic [17:0] nv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(CR_PWM_PERIOD, r); chk(r == 1500, "reset period 100 kHz");
    rd(CR_WAVE_DIV, r);   chk(r == 20, "reset data divider 20");
    for (int i = 0; i < 5; i++) begin
      v = $urandom;
      wr(CR_CTRL, v);       rd(CR_CTRL, r);
      chk(r == {29'd0, v[2:0]} && pwm_enable == v[0] && wave_run == v[1] && wave_mode == wave_mode_e'(v[2]), "CTRL");
      v = $urandom;
      wr(CR_PWM_PERIOD, v); rd(CR_PWM_PERIOD, r); chk(r == 32'(v[17:0]) && pwm_period == v[17:0], "PERIOD");
      wr(CR_PWM_DUTY, v);   rd(CR_PWM_DUTY, r);   chk(r == v && pwm_duty == v, "DUTY");
      wr(CR_PWM_PHASE0, v); rd(CR_PWM_PHASE0, r); chk(pwm_phase[0] == v[17:0] && r == 32'(v[17:0]), "PHASE0");
      wr(CR_PWM_PHASE1, ~v); rd(CR_PWM_PHASE1, r); nv = ~v[17:0];
      chk(pwm_phase[1] == nv && r == {14'd0, nv}, $sformatf("PHASE1 %h %h", pwm_phase[1], r));
      wr(CR_WAVE_DIV, v);   rd(CR_WAVE_DIV, r);   chk(wave_div == v[15:0] && r == 32'(v[15:0]), "WAVE_DIV");
      wr(CR_DOUT, v);       rd(CR_DOUT, r);       chk(dout_reg == v[7:0] && r == 32'(v[7:0]), "DOUT");
      wr(CR_ILK_MASK, v);   rd(CR_ILK_MASK, r);   chk(ilk_mask == v[15:0] && r == 32'(v[15:0]), "ILK_MASK");
    end
    // read-only inputs
    adc_frame = {32'h1234_5678, 16'd6, 16'hBEEF, 16'hCAFE};
    wave_ref = 32'h4120_0000; wave_index = 14'd1234; din = 16'hA55A; ilk_latched = 16'h0042;
    rd(CR_ADC_ISUM, r);   chk(r == 32'h1234_5678, "ISUM");
    rd(CR_ADC_ICOUNT, r); chk(r == 6, "ICOUNT");
    rd(CR_ADC_V, r);      chk(r == 32'hBEEF_CAFE, "V");
    rd(CR_WAVE_REF, r);   chk(r == 32'h4120_0000, "WAVE_REF");
    rd(CR_WAVE_INDEX, r); chk(r == 1234, "WAVE_INDEX");
    rd(CR_DIN, r);        chk(r == 32'hA55A, "DIN");
    rd(CR_ILK_LATCH, r);  chk(r == 32'h42, "ILK_LATCH");
    // status events
    rd(CR_STATUS, r); chk(r[3:0] == 0 && !irq, "status clear");
    @(negedge clk) adc_valid = 1; wave_period_trig = 1;
    @(negedge clk) adc_valid = 0; wave_period_trig = 0;
    repeat (3) @(negedge clk);
    rd(CR_STATUS, r); chk(r[3:0] == 4'b1001 && irq, $sformatf("status %b", r[3:0]));
    wr(CR_STATUS, 32'h1);
    rd(CR_STATUS, r); chk(r[3:0] == 4'b1000 && irq, "W1C one bit");
    @(negedge clk) adc_err = 1; wave_data_trig = 1; interlock = 1;
    @(negedge clk) adc_err = 0; wave_data_trig = 0;
    rd(CR_STATUS, r); chk(r[4:0] == 5'b11110, $sformatf("status %b", r[4:0]));
    wr(CR_STATUS, 32'hF);
    rd(CR_STATUS, r); chk(r[3:0] == 0 && !irq, "all cleared");
    // interlock clear pulse
    fork
      wr(CR_ILK_LATCH, 0);
      begin
        int seen = 0;
        repeat (4) begin @(posedge clk); #1 if (ilk_clear) seen++; end
        chk(seen == 1, $sformatf("ilk_clear pulses %0d", seen));
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
