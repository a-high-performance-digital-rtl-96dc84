// digital_controller_top: FPGA logic of the power-supply digital controller.
//
// The controller is a control card and an ADC card joined by a backplane. This
// top holds the logic of both FPGAs, clocked together at 150 MHz, with the
// processors, memories and converters outside as ports:
//
//   control card
//     - boot_sequencer: releases processor 0, then processor 1 once processor
//       0 has finished its boot copy from the shared flash;
//     - two fp_mul units, one on each processor's custom-instruction port;
//     - dual_port_ram: shared parameters, each half writable by one processor;
//     - ctrl_regs on processor 0's bus (the control processor): pwm_gen,
//       waveform reference, ADC frames, interlock_io;
//     - comm_regs on processor 1's bus (the communication processor): loading
//       of the idle waveform_ctrl bank, fiber link through uart or
//       manchester_codec (selected by a register);
//     - adc_link_rx receiving the ADC card's frame each PWM period;
//     - the remote trigger fiber feeding waveform_ctrl; a cascade sync input
//       and output for phase-locked operation of several controllers.
//   ADC card
//     - adc_card_ctrl: PWM-synchronous voltage sampling, oversampled current,
//       frame transmission over the backplane SPI link.
//
// Processor bus (each processor): word address cpuN_addr[11:0]; 0x000-0x3FF is
// the shared RAM, 0x400-0x41F the processor's register block; read data
// appears one cycle after the address. The PWM period start is stretched to
// SYNC_W clocks on sync_out and on the backplane sync line so that a receiver
// with its own clock cannot miss it; the leading edge marks count 0. A slave
// controller takes its sync_in from a master's sync_out and restarts its PWM
// counter on the rising edge (three clocks after it, because of the input
// synchroniser). A latched interlock switches the PWM off. The address map,
// the sync stretching and the link mode selection are this design's choices.
module digital_controller_top
  import ctrl_pkg::*;
#(
  parameter int WAVE_AW    = 14,
  parameter int SHARED_AW  = 10,
  parameter int SAMPLE_DIV = 150,
  parameter int MARGIN     = 600,
  parameter int SCLK_DIV   = 3,
  parameter int UART_DIV   = 1302,
  parameter int MAN_DIV    = 60,
  parameter int DEB        = 1500,
  parameter int SYNC_W     = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor 0 (control)
  output logic               cpu0_reset_n,
  output logic [31:0]        cpu0_reset_addr,
  input  logic               cpu0_boot_done,
  input  logic [11:0]        cpu0_addr,
  input  logic               cpu0_we,
  input  logic [31:0]        cpu0_wdata,
  output logic [31:0]        cpu0_rdata,
  output logic               cpu0_wr_denied,
  output logic               cpu0_irq,
  input  logic               cpu0_ci_start,
  input  logic [31:0]        cpu0_ci_dataa,
  input  logic [31:0]        cpu0_ci_datab,
  output logic               cpu0_ci_done,
  output logic [31:0]        cpu0_ci_result,
  // processor 1 (communication)
  output logic               cpu1_reset_n,
  output logic [31:0]        cpu1_reset_addr,
  input  logic [11:0]        cpu1_addr,
  input  logic               cpu1_we,
  input  logic [31:0]        cpu1_wdata,
  output logic [31:0]        cpu1_rdata,
  output logic               cpu1_wr_denied,
  output logic               cpu1_irq,
  input  logic               cpu1_ci_start,
  input  logic [31:0]        cpu1_ci_dataa,
  input  logic [31:0]        cpu1_ci_datab,
  output logic               cpu1_ci_done,
  output logic [31:0]        cpu1_ci_result,
  // power stage and cascade
  output logic [PWM_NCH-1:0] pwm,
  input  logic               sync_in,
  output logic               sync_out,
  // optical fibers
  input  logic               trig_fiber,
  output logic               fiber_tx,
  input  logic               fiber_rx,
  // isolated digital I/O
  input  logic [15:0]        din,
  output logic [7:0]         dout,
  // ADC chips on the ADC card
  output logic               i_conv_start,
  input  logic               i_adc_valid,
  input  logic signed [17:0] i_adc_data,
  output logic               v_conv_start,
  input  logic               v_adc_valid,
  input  logic [15:0]        v_adc_data [4]
);

  // ---------------- boot ----------------
  boot_sequencer u_boot (
    .clk(clk), .rst_n(rst_n), .cpu0_boot_done(cpu0_boot_done),
    .cpu0_reset_n(cpu0_reset_n), .cpu1_reset_n(cpu1_reset_n),
    .cpu0_reset_addr(cpu0_reset_addr), .cpu1_reset_addr(cpu1_reset_addr)
  );

  // ---------------- floating-point multipliers ----------------
  fp_mul u_fpm0 (.clk(clk), .rst_n(rst_n), .start(cpu0_ci_start), .dataa(cpu0_ci_dataa),
                 .datab(cpu0_ci_datab), .done(cpu0_ci_done), .result(cpu0_ci_result));
  fp_mul u_fpm1 (.clk(clk), .rst_n(rst_n), .start(cpu1_ci_start), .dataa(cpu1_ci_dataa),
                 .datab(cpu1_ci_datab), .done(cpu1_ci_done), .result(cpu1_ci_result));

  // ---------------- bus decode ----------------
  logic        c0_ram, c1_ram, c0_ram_q, c1_ram_q;
  logic [31:0] ram0_rdata, ram1_rdata, reg0_rdata, reg1_rdata;
  assign c0_ram = (cpu0_addr[11:SHARED_AW] == '0);
  assign c1_ram = (cpu1_addr[11:SHARED_AW] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0_ram_q <= 1'b0;
      c1_ram_q <= 1'b0;
    end else begin
      c0_ram_q <= c0_ram;
      c1_ram_q <= c1_ram;
    end
  end

  assign cpu0_rdata = c0_ram_q ? ram0_rdata : reg0_rdata;
  assign cpu1_rdata = c1_ram_q ? ram1_rdata : reg1_rdata;

  dual_port_ram #(.AW(SHARED_AW), .DW(32)) u_shared (
    .clk(clk), .rst_n(rst_n),
    .a_addr(cpu0_addr[SHARED_AW-1:0]), .a_we(cpu0_we && c0_ram), .a_wdata(cpu0_wdata),
    .a_rdata(ram0_rdata), .a_wr_denied(cpu0_wr_denied),
    .b_addr(cpu1_addr[SHARED_AW-1:0]), .b_we(cpu1_we && c1_ram), .b_wdata(cpu1_wdata),
    .b_rdata(ram1_rdata), .b_wr_denied(cpu1_wr_denied)
  );

  // ---------------- control processor registers ----------------
  logic pwm_enable, wave_run;
  wave_mode_e wave_mode;
  logic [PWM_CNT_W-1:0] pwm_period;
  logic [PWM_CNT_W+PWM_FRAC_W-1:0] pwm_duty;
  logic [PWM_CNT_W-1:0] pwm_phase [PWM_NCH];
  logic [PWM_CNT_W-1:0] pwm_count;
  logic [15:0] wave_div;
  logic [31:0] wave_ref;
  logic [WAVE_AW-1:0] wave_index;
  logic wave_data_trig, wave_period_trig;
  logic [7:0]  dout_reg;
  logic [15:0] ilk_mask, ilk_latched, din_db;
  logic        ilk_clear, interlock;
  adc_frame_t  adc_frame;
  logic        adc_valid, adc_err;

  ctrl_regs u_cregs (
    .clk(clk), .rst_n(rst_n),
    .bus_addr(cpu0_addr[4:0]), .bus_we(cpu0_we && !c0_ram), .bus_wdata(cpu0_wdata),
    .bus_rdata(reg0_rdata), .irq(cpu0_irq),
    .pwm_enable(pwm_enable), .pwm_period(pwm_period), .pwm_duty(pwm_duty), .pwm_phase(pwm_phase),
    .adc_frame(adc_frame), .adc_valid(adc_valid), .adc_err(adc_err),
    .wave_run(wave_run), .wave_mode(wave_mode), .wave_div(wave_div),
    .wave_ref(wave_ref), .wave_index(14'(wave_index)),
    .wave_data_trig(wave_data_trig), .wave_period_trig(wave_period_trig),
    .din(din_db), .dout_reg(dout_reg), .ilk_mask(ilk_mask), .ilk_clear(ilk_clear),
    .ilk_latched(ilk_latched), .interlock(interlock)
  );

  // ---------------- PWM and cascade sync ----------------
  logic period_start, sync_rise;
  sync_edge u_sync_in (.clk(clk), .rst_n(rst_n), .d(sync_in), .rise(sync_rise));

  pwm_gen #(.CNT_W(PWM_CNT_W), .FRAC_W(PWM_FRAC_W), .NCH(PWM_NCH)) u_pwm (
    .clk(clk), .rst_n(rst_n), .enable(pwm_enable && !interlock),
    .period(pwm_period), .duty(pwm_duty), .phase(pwm_phase), .sync_in(sync_rise),
    .pwm(pwm), .period_start(period_start), .count(pwm_count)
  );

  // Stretched period-start marker for the cascade output and the ADC card.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_out <= 1'b0;
    else        sync_out <= (pwm_count < PWM_CNT_W'(SYNC_W));
  end

  // ---------------- interlock ----------------
  interlock_io #(.NIN(16), .NOUT(8), .DEB(DEB)) u_ilk (
    .clk(clk), .rst_n(rst_n), .din(din), .mask(ilk_mask), .clear(ilk_clear),
    .dout_reg(dout_reg), .din_db(din_db), .latched(ilk_latched),
    .interlock(interlock), .dout(dout)
  );

  // ---------------- waveform ----------------
  logic trig_rise;
  sync_edge u_sync_trig (.clk(clk), .rst_n(rst_n), .d(trig_fiber), .rise(trig_rise));

  logic               w_wr_en, w_load_done, w_active, w_pending, w_playing;
  logic [WAVE_AW-1:0] w_wr_addr;
  logic [31:0]        w_wr_data;
  logic [WAVE_AW:0]   w_load_len;

  waveform_ctrl #(.AW(WAVE_AW), .DW(32), .DIV_W(16)) u_wave (
    .clk(clk), .rst_n(rst_n), .pwm_period_start(period_start),
    .run(wave_run), .mode(wave_mode), .remote_trig(trig_rise), .data_div(wave_div),
    .wr_en(w_wr_en), .wr_addr(w_wr_addr), .wr_data(w_wr_data),
    .load_len(w_load_len), .load_done(w_load_done),
    .ref_value(wave_ref), .data_trig(wave_data_trig), .period_trig(wave_period_trig),
    .active_bank(w_active), .pending(w_pending), .playing(w_playing), .index(wave_index)
  );

  // ---------------- communication processor registers and fiber link ----------------
  link_mode_e link_mode;
  logic       tx_start, tx_busy, rx_valid, rx_err;
  logic [7:0] tx_data, rx_data;
  logic       u_busy, u_txd, u_rx_valid, u_rx_err;
  logic       m_busy, m_txd, m_rx_valid, m_rx_err;
  logic [7:0] u_rx_data, m_rx_data;

  comm_regs #(.AW(WAVE_AW)) u_mregs (
    .clk(clk), .rst_n(rst_n),
    .bus_addr(cpu1_addr[4:0]), .bus_we(cpu1_we && !c1_ram), .bus_wdata(cpu1_wdata),
    .bus_rdata(reg1_rdata), .irq(cpu1_irq),
    .wave_wr_en(w_wr_en), .wave_wr_addr(w_wr_addr), .wave_wr_data(w_wr_data),
    .wave_load_len(w_load_len), .wave_load_done(w_load_done),
    .wave_active_bank(w_active), .wave_pending(w_pending), .wave_playing(w_playing),
    .link_mode(link_mode), .tx_start(tx_start), .tx_data(tx_data), .tx_busy(tx_busy),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_err(rx_err)
  );

  uart #(.CLK_DIV(UART_DIV)) u_uart (
    .clk(clk), .rst_n(rst_n),
    .tx_start(tx_start && link_mode == LINK_RS232), .tx_data(tx_data), .tx_busy(u_busy), .txd(u_txd),
    .rxd(link_mode == LINK_RS232 ? fiber_rx : 1'b1),
    .rx_data(u_rx_data), .rx_valid(u_rx_valid), .rx_err(u_rx_err)
  );

  manchester_codec #(.BIT_DIV(MAN_DIV)) u_man (
    .clk(clk), .rst_n(rst_n),
    .tx_start(tx_start && link_mode == LINK_MANCHESTER), .tx_data(tx_data), .tx_busy(m_busy), .tx_line(m_txd),
    .rx_line(link_mode == LINK_MANCHESTER ? fiber_rx : 1'b0),
    .rx_data(m_rx_data), .rx_valid(m_rx_valid), .rx_err(m_rx_err)
  );

  always_comb begin
    if (link_mode == LINK_MANCHESTER) begin
      fiber_tx = m_txd;  tx_busy = m_busy;  rx_data = m_rx_data;
      rx_valid = m_rx_valid; rx_err = m_rx_err;
    end else begin
      fiber_tx = u_txd;  tx_busy = u_busy;  rx_data = u_rx_data;
      rx_valid = u_rx_valid; rx_err = u_rx_err;
    end
  end

  // ---------------- backplane and ADC card ----------------
  logic bp_sclk, bp_cs_n, bp_sdo;

  adc_card_ctrl #(.SAMPLE_DIV(SAMPLE_DIV), .MARGIN(MARGIN), .SCLK_DIV(SCLK_DIV)) u_adc_card (
    .clk(clk), .rst_n(rst_n), .pwm_sync(sync_out),
    .i_conv_start(i_conv_start), .i_adc_valid(i_adc_valid), .i_adc_data(i_adc_data),
    .v_conv_start(v_conv_start), .v_adc_valid(v_adc_valid), .v_adc_data(v_adc_data),
    .sclk(bp_sclk), .cs_n(bp_cs_n), .sdo(bp_sdo)
  );

  adc_link_rx #(.FRAME_W(ADC_FRAME_W)) u_link_rx (
    .clk(clk), .rst_n(rst_n), .sclk(bp_sclk), .cs_n(bp_cs_n), .sdi(bp_sdo),
    .frame(adc_frame), .frame_valid(adc_valid), .frame_err(adc_err)
  );

endmodule
