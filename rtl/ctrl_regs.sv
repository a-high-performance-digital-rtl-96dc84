// ctrl_regs: register block on the control processor's bus.
//
// The control processor runs the regulation loop. Through these registers it
// sets the PWM (enable, period, fixed-point duty, two phase offsets), starts
// waveform playback and picks its trigger mode, reads each period's ADC frame,
// reads the current waveform reference, and handles the digital I/O and
// interlock. The register map is in ctrl_pkg (ctrl_reg_e).
//
// Bus: word address bus_addr, write strobe bus_we with bus_wdata; bus_rdata
// shows the addressed register one cycle after the address (fixed read latency
// of one, as on the shared RAM). Reads have no side effects. CR_STATUS holds
// sticky event bits (new ADC frame, ADC frame error, data trigger, period
// trigger), cleared by writing 1; bit 4 shows the live interlock. irq is high
// while any sticky bit is set. Writing CR_ILK_LATCH pulses ilk_clear.
// The register map, reset values and interrupt rule are this design's choices.
module ctrl_regs
  import ctrl_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        bus_addr,
  input  logic              bus_we,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              irq,
  // PWM
  output logic              pwm_enable,
  output logic [PWM_CNT_W-1:0]            pwm_period,
  output logic [PWM_CNT_W+PWM_FRAC_W-1:0] pwm_duty,
  output logic [PWM_CNT_W-1:0]            pwm_phase [PWM_NCH],
  // ADC frames
  input  adc_frame_t        adc_frame,
  input  logic              adc_valid,
  input  logic              adc_err,
  // waveform
  output logic              wave_run,
  output wave_mode_e        wave_mode,
  output logic [15:0]       wave_div,
  input  logic [31:0]       wave_ref,
  input  logic [13:0]       wave_index,
  input  logic              wave_data_trig,
  input  logic              wave_period_trig,
  // digital I/O
  input  logic [15:0]       din,
  output logic [7:0]        dout_reg,
  output logic [15:0]       ilk_mask,
  output logic              ilk_clear,
  input  logic [15:0]       ilk_latched,
  input  logic              interlock
);

  logic [3:0] status;
  ctrl_reg_e  a;
  assign a = ctrl_reg_e'(bus_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_enable <= 1'b0;
      pwm_period <= PWM_CNT_W'(1500);       // 100 kHz
      pwm_duty   <= '0;
      for (int k = 0; k < PWM_NCH; k++) pwm_phase[k] <= '0;
      wave_run   <= 1'b0;
      wave_mode  <= WAVE_LOCAL;
      wave_div   <= 16'd20;
      dout_reg   <= '0;
      ilk_mask   <= '0;
      ilk_clear  <= 1'b0;
      status     <= '0;
    end else begin
      ilk_clear <= 1'b0;
      // events
      if (adc_valid)        status[ST_ADC_NEW]   <= 1'b1;
      if (adc_err)          status[ST_ADC_ERR]   <= 1'b1;
      if (wave_data_trig)   status[ST_WAVE_DATA] <= 1'b1;
      if (wave_period_trig) status[ST_WAVE_PER]  <= 1'b1;
      if (bus_we) begin
        unique case (a)
          CR_CTRL: begin
            pwm_enable <= bus_wdata[0];
            wave_run   <= bus_wdata[1];
            wave_mode  <= wave_mode_e'(bus_wdata[2]);
          end
          CR_PWM_PERIOD: pwm_period   <= bus_wdata[PWM_CNT_W-1:0];
          CR_PWM_DUTY:   pwm_duty     <= bus_wdata[PWM_CNT_W+PWM_FRAC_W-1:0];
          CR_PWM_PHASE0: pwm_phase[0] <= bus_wdata[PWM_CNT_W-1:0];
          CR_PWM_PHASE1: pwm_phase[1] <= bus_wdata[PWM_CNT_W-1:0];
          CR_STATUS:     status       <= status & ~bus_wdata[3:0];
          CR_WAVE_DIV:   wave_div     <= bus_wdata[15:0];
          CR_DOUT:       dout_reg     <= bus_wdata[7:0];
          CR_ILK_MASK:   ilk_mask     <= bus_wdata[15:0];
          CR_ILK_LATCH:  ilk_clear    <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata <= '0;
    end else begin
      unique case (a)
        CR_CTRL:       bus_rdata <= {29'd0, wave_mode, wave_run, pwm_enable};
        CR_PWM_PERIOD: bus_rdata <= 32'(pwm_period);
        CR_PWM_DUTY:   bus_rdata <= 32'(pwm_duty);
        CR_PWM_PHASE0: bus_rdata <= 32'(pwm_phase[0]);
        CR_PWM_PHASE1: bus_rdata <= 32'(pwm_phase[1]);
        CR_ADC_ISUM:   bus_rdata <= adc_frame.i_sum;
        CR_ADC_ICOUNT: bus_rdata <= 32'(adc_frame.i_count);
        CR_ADC_V:      bus_rdata <= {adc_frame.v1, adc_frame.v0};
        CR_STATUS:     bus_rdata <= {27'd0, interlock, status};
        CR_WAVE_REF:   bus_rdata <= wave_ref;
        CR_WAVE_INDEX: bus_rdata <= 32'(wave_index);
        CR_WAVE_DIV:   bus_rdata <= 32'(wave_div);
        CR_DIN:        bus_rdata <= 32'(din);
        CR_DOUT:       bus_rdata <= 32'(dout_reg);
        CR_ILK_MASK:   bus_rdata <= 32'(ilk_mask);
        CR_ILK_LATCH:  bus_rdata <= 32'(ilk_latched);
        default:       bus_rdata <= '0;
      endcase
    end
  end

  assign irq = |status;

endmodule
