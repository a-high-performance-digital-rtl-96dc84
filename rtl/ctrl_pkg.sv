// ctrl_pkg: constants and types shared by the power-supply controller.
//
// The whole controller runs from one 150 MHz clock, so one clock cycle is the
// 6.67 ns PWM step. The ADC card sends one frame per PWM period to the control
// card; its layout is adc_frame_t. The register maps of the two processor buses
// are listed here as word addresses. The frame layout and the register maps are
// this design's own choices.
package ctrl_pkg;

  parameter int unsigned CLK_HZ   = 150_000_000;
  parameter int          PWM_CNT_W  = 18;   // 150000 steps = 1 kHz period
  parameter int          PWM_FRAC_W = 14;   // duty fraction bits (rounding correction)
  parameter int          PWM_NCH    = 2;    // two interleaved chopper legs per controller

  // One sample frame sent from the ADC card per PWM period (80 bits, MSB first).
  typedef struct packed {
    logic [31:0] i_sum;    // sum of oversampled 18-bit current samples
    logic [15:0] i_count;  // number of samples in i_sum
    logic [15:0] v1;       // second selected voltage channel
    logic [15:0] v0;       // first selected voltage channel
  } adc_frame_t;

  parameter int ADC_FRAME_W = $bits(adc_frame_t);

  // Waveform trigger source.
  typedef enum logic {
    WAVE_LOCAL  = 1'b0,    // controller makes its own period trigger
    WAVE_REMOTE = 1'b1     // period trigger arrives on the trigger fiber
  } wave_mode_e;

  // Fiber link line code.
  typedef enum logic {
    LINK_RS232      = 1'b0,
    LINK_MANCHESTER = 1'b1
  } link_mode_e;

  // Control processor registers (word addresses inside the register window).
  typedef enum logic [4:0] {
    CR_CTRL       = 5'h00,  // [0] pwm_enable [1] wave_run [2] wave_mode
    CR_PWM_PERIOD = 5'h01,
    CR_PWM_DUTY   = 5'h02,  // Q18.14 steps
    CR_PWM_PHASE0 = 5'h03,
    CR_PWM_PHASE1 = 5'h04,
    CR_ADC_ISUM   = 5'h05,
    CR_ADC_ICOUNT = 5'h06,
    CR_ADC_V      = 5'h07,  // {v1, v0}
    CR_STATUS     = 5'h08,  // sticky event bits, write 1 to clear
    CR_WAVE_REF   = 5'h09,
    CR_WAVE_INDEX = 5'h0A,
    CR_WAVE_DIV   = 5'h0B,
    CR_DIN        = 5'h0C,
    CR_DOUT       = 5'h0D,
    CR_ILK_MASK   = 5'h0E,
    CR_ILK_LATCH  = 5'h0F   // read latched faults, write anything to clear
  } ctrl_reg_e;

  // CR_STATUS bits
  parameter int ST_ADC_NEW   = 0;
  parameter int ST_ADC_ERR   = 1;
  parameter int ST_WAVE_DATA = 2;
  parameter int ST_WAVE_PER  = 3;
  parameter int ST_INTERLOCK = 4;  // live, not sticky

  // Communication processor registers.
  typedef enum logic [4:0] {
    MR_WAVE_ADDR   = 5'h00,  // load pointer, auto-increments on data write
    MR_WAVE_DATA   = 5'h01,  // write one point into the loading bank
    MR_WAVE_COMMIT = 5'h02,  // write point count: loading bank becomes pending
    MR_WAVE_STATUS = 5'h03,  // [0] active bank [1] pending [2] playing
    MR_LINK_CTRL   = 5'h04,  // [0] link mode (0 RS232, 1 Manchester)
    MR_LINK_TX     = 5'h05,  // write a byte to send
    MR_LINK_RX     = 5'h06,  // last received byte
    MR_LINK_STATUS = 5'h07   // [0] rx new [1] rx error (sticky, W1C) [2] tx busy
  } comm_reg_e;

  parameter int LS_RX_NEW = 0;
  parameter int LS_RX_ERR = 1;
  parameter int LS_TX_BUSY = 2;

endpackage
