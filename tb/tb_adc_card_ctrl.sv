// tb_adc_card_ctrl: checks one frame per PWM period from the ADC card.
//
// A stretched sync pulse marks each PWM period of P clocks. Current and
// voltage ADC models answer the conversion requests. A monitor decodes the SPI
// frame independently. For every period after the first two, the frame must
// carry floor((P - MARGIN) / SAMPLE_DIV) current samples and their sum (summed
// here from the current model's outputs in that period), the voltages of
// channels VSEL1 and VSEL0 converted at that period's start, and it must be
// complete before the next period starts. Runs at 100 kHz and 50 kHz with the
// default sample rate and margin.
module tb_adc_card_ctrl;
  import ctrl_pkg::*;
  localparam int SAMPLE_DIV = 150, MARGIN = 600, SCLK_DIV = 3;
  logic clk = 0, rst_n = 0, pwm_sync = 0;
  logic i_conv_start, i_adc_valid, v_conv_start, v_adc_valid = 0;
  logic signed [17:0] i_adc_data;
  logic [15:0] v_adc_data [4];
  logic sclk, cs_n, sdo;
  int checks = 0, failures = 0;

  adc_card_ctrl #(.VSEL0(2), .VSEL1(1), .SAMPLE_DIV(SAMPLE_DIV), .MARGIN(MARGIN),
                  .SCLK_DIV(SCLK_DIV)) dut (.*);
  adc_model #(.W(18), .LAT(100), .LEVEL(120000)) iadc (.clk(clk), .conv_start(i_conv_start),
                                                      .valid(i_adc_valid), .data(i_adc_data));
  always #5 clk = ~clk;

  // voltage ADC model: channel c of conversion k reads 1000*k + c
  int vk = 0;
  always @(posedge clk) begin
    if (v_conv_start) begin
      fork begin
        int k;
        k = vk; vk++;
        repeat (40) @(posedge clk);
        for (int c = 0; c < 4; c++) v_adc_data[c] <= 16'(1000 * k + c);
        v_adc_valid <= 1;
        @(posedge clk) v_adc_valid <= 0;
      end join_none
    end
  end

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

  // SPI monitor
  logic [ADC_FRAME_W-1:0] sh;
  int nbits = 0, frames = 0;
  logic sclk_d = 0, cs_d = 1;
  adc_frame_t last;
  always @(posedge clk) begin
    sclk_d <= sclk; cs_d <= cs_n;
    if (!cs_n && sclk && !sclk_d) begin sh = {sh[ADC_FRAME_W-2:0], sdo}; nbits++; end
    if (cs_n && !cs_d) begin
      if (nbits == ADC_FRAME_W) begin last = adc_frame_t'(sh); frames++; end
      nbits = 0;
    end
  end

  longint isum; int icnt;
  always @(posedge clk) if (i_adc_valid) begin isum += i_adc_data; icnt++; end

  task automatic run_period(input int P, input bit check_it, input int vconv);
    int f0; longint s; int n;
    f0 = frames; isum = 0; icnt = 0;
    @(negedge clk) pwm_sync = 1;
    repeat (8) @(negedge clk);
    pwm_sync = 0;
    repeat (P - 8) @(negedge clk);
    s = isum; n = icnt;
    if (check_it) begin
      chk(frames == f0 + 1, $sformatf("P=%0d frames %0d in period", P, frames - f0));
      chk(last.i_count == 16'((P - MARGIN) / SAMPLE_DIV), $sformatf("P=%0d count %0d", P, last.i_count));
      chk(n == (P - MARGIN) / SAMPLE_DIV, $sformatf("P=%0d conversions %0d", P, n));
      chk(longint'(last.i_sum) == s, $sformatf("P=%0d sum %0d exp %0d", P, last.i_sum, s));
      chk(last.v0 == 16'(1000 * vconv + 2) && last.v1 == 16'(1000 * vconv + 1),
          $sformatf("P=%0d voltages %0d %0d conv %0d", P, last.v0, last.v1, vconv));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1; vk = 0;
    run_period(1500, 0, 0);
    for (int i = 1; i < 6; i++) run_period(1500, i > 1, i);
    run_period(3000, 0, 6);
    for (int i = 7; i < 10; i++) run_period(3000, 1, i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
