// pwm_gen: multi-channel PWM generator with rounding correction and phase shift.
//
// A period counter counts 150 MHz clock steps (6.67 ns) from 0 to period-1, so
// the PWM frequency is 150 MHz / period: 1 kHz at period = 150000, 100 kHz at
// period = 1500. Each channel compares a phase-shifted copy of the count with
// the duty: channel k is high while ((count - phase[k]) mod period) < duty.
// The duty carries a 14-bit fraction of a step; rounding_corrector turns it
// into a whole number of steps per period whose average is the exact duty.
//
// Period, duty and phases are sampled into shadow registers at the end of each
// period, so a write never cuts a period short. sync_in restarts the counter
// at zero: wired to the period_start of a master controller it lines up the
// counters of several controllers, and with per-channel phase offsets the
// chopper legs of all controllers are interleaved (four legs at 90 degrees
// give an output ripple at four times the switching frequency).
//
// period_start is high in the cycle the counter is 0. pwm is registered: it
// follows the count with one cycle of delay. enable = 0 holds the outputs low
// while the counter keeps running, so the ADC sync never stops. A period below
// 2 is taken as 2; a phase not below the period is taken as 0. The shadowing,
// the clamping and the synchronous restart are this design's choices.
module pwm_gen #(
  parameter int CNT_W  = 18,
  parameter int FRAC_W = 14,
  parameter int NCH    = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic [CNT_W-1:0]        period,
  input  logic [CNT_W+FRAC_W-1:0] duty,
  input  logic [CNT_W-1:0]        phase [NCH],
  input  logic                    sync_in,
  output logic [NCH-1:0]          pwm,
  output logic                    period_start,
  output logic [CNT_W-1:0]        count
);

  logic [CNT_W-1:0] cnt_q, period_q;
  logic [CNT_W-1:0] phase_q [NCH];
  logic             en_q;
  logic             wrap;
  logic [CNT_W-1:0] duty_int;

  assign wrap = sync_in || (cnt_q >= period_q - 1'b1);

  rounding_corrector #(.INT_W(CNT_W), .FRAC_W(FRAC_W)) u_rc (
    .clk      (clk),
    .rst_n    (rst_n),
    .update   (wrap),
    .duty_in  (duty),
    .duty_out (duty_int)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      period_q <= CNT_W'(2);
      en_q     <= 1'b0;
      for (int k = 0; k < NCH; k++) phase_q[k] <= '0;
    end else if (wrap) begin
      cnt_q    <= '0;
      period_q <= (period < CNT_W'(2)) ? CNT_W'(2) : period;
      en_q     <= enable;
      for (int k = 0; k < NCH; k++)
        phase_q[k] <= (phase[k] < period) ? phase[k] : '0;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (!enable) en_q <= 1'b0;   // switching off acts at once
    end
  end

  // Phase-shifted count per channel and registered comparison.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm <= '0;
    end else begin
      for (int k = 0; k < NCH; k++) begin
        logic [CNT_W-1:0] pc;
        pc = (cnt_q >= phase_q[k]) ? cnt_q - phase_q[k]
                                   : cnt_q + (period_q - phase_q[k]);
        pwm[k] <= en_q && enable && (pc < duty_int);
      end
    end
  end

  assign period_start = (cnt_q == '0);
  assign count        = cnt_q;

endmodule
