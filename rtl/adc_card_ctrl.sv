// adc_card_ctrl: the logic of the ADC card.
//
// The ADC card samples the feedback signals in step with the PWM of the
// control card. The control card's period-start pulse arrives on pwm_sync
// (a backplane line, synchronised here). At each period start:
//   - the voltage ADC is started once (v_conv_start); of its four 16-bit
//     channels, VSEL0 and VSEL1 are kept, so the voltage sample rate equals
//     the PWM frequency;
//   - current_oversampler restarts its window and converts the 18-bit current
//     ADC at a fixed rate as long as the samples fit before the period ends.
// When the current window closes, the frame {current sum, sample count,
// voltage VSEL1, voltage VSEL0} is sent to the control card over adc_link_tx,
// so each period's data arrives before the period is over.
//
// The ADC chips are outside: conv_start pulses ask for a conversion, valid
// strobes return the result (at most SAMPLE_DIV clocks later for the current
// ADC, before the current window closes for the voltage ADC). The channel
// choice by parameter and the framing are this design's choices.
module adc_card_ctrl
  import ctrl_pkg::*;
#(
  parameter int VSEL0      = 0,
  parameter int VSEL1      = 1,
  parameter int SAMPLE_DIV = 150,
  parameter int MARGIN     = 600,
  parameter int SCLK_DIV   = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pwm_sync,
  // current ADC (18 bit)
  output logic               i_conv_start,
  input  logic               i_adc_valid,
  input  logic signed [17:0] i_adc_data,
  // voltage ADC (4 x 16 bit)
  output logic               v_conv_start,
  input  logic               v_adc_valid,
  input  logic [15:0]        v_adc_data [4],
  // SPI link to the control card
  output logic               sclk,
  output logic               cs_n,
  output logic               sdo
);

  logic period_start;
  logic i_valid;
  logic signed [31:0] i_sum;
  logic [15:0] i_count;
  logic [15:0] v0_q, v1_q;
  adc_frame_t  fr;
  logic        tx_busy, send;

  sync_edge u_sync (.clk(clk), .rst_n(rst_n), .d(pwm_sync), .rise(period_start));

  current_oversampler #(.SAMPLE_DIV(SAMPLE_DIV), .MARGIN(MARGIN), .DW(18)) u_os (
    .clk(clk), .rst_n(rst_n), .period_start(period_start),
    .conv_start(i_conv_start), .adc_valid(i_adc_valid), .adc_data(i_adc_data),
    .result_valid(i_valid), .sum(i_sum), .count(i_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_conv_start <= 1'b0;
      v0_q <= '0; v1_q <= '0;
      send <= 1'b0;
      fr   <= '0;
    end else begin
      v_conv_start <= period_start;
      if (v_adc_valid) begin
        v0_q <= v_adc_data[VSEL0];
        v1_q <= v_adc_data[VSEL1];
      end
      send <= 1'b0;
      if (i_valid && !tx_busy) begin
        fr.i_sum   <= i_sum;
        fr.i_count <= i_count;
        fr.v1      <= v1_q;
        fr.v0      <= v0_q;
        send       <= 1'b1;
      end
    end
  end

  adc_link_tx #(.SCLK_DIV(SCLK_DIV), .FRAME_W(ADC_FRAME_W)) u_tx (
    .clk(clk), .rst_n(rst_n), .send(send), .frame(fr),
    .sclk(sclk), .cs_n(cs_n), .sdo(sdo), .busy(tx_busy)
  );

endmodule
