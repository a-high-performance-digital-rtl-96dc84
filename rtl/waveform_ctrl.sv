// waveform_ctrl: programmable waveform playback with ping-pong banks.
//
// A magnet waveform (up to 2^AW points of DW bits, e.g. IEEE single current
// references) is played one point per "data trigger"; a data trigger occurs
// every data_div PWM periods. A "period trigger" restarts the waveform from
// point 0. Two banks hold waveforms: one plays while the communication
// processor writes the next waveform into the other. Committing the loaded
// bank (load_done with its length) makes it pending; it takes over at the next
// period trigger, so a new waveform always starts cleanly at the start of a
// waveform period while the old one is never disturbed.
//
// Trigger modes (mode_remote):
//   local  - the controller makes the period trigger itself: when run rises,
//            and again right after the last point, so the waveform repeats
//            with no gap or phase jump;
//   remote - the period trigger is remote_trig (from the trigger fiber); after
//            the last point the last value is held until the next trigger.
// Triggers act at PWM period starts: a period trigger requested between period
// starts is served at the next one, where point 0 is read. ref_value is valid
// in the cycle data_trig is high (one cycle after the PWM period start) and
// holds until the next data trigger.
//
// Writes (wr_en, wr_addr, wr_data) always go to the bank that is not playing.
// Holding the last point in remote mode, serving triggers at PWM period starts
// and the commit handshake are this design's choices.
module waveform_ctrl
  import ctrl_pkg::*;
#(
  parameter int AW    = 14,
  parameter int DW    = 32,
  parameter int DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pwm_period_start,
  input  logic             run,
  input  wave_mode_e       mode,
  input  logic             remote_trig,
  input  logic [DIV_W-1:0] data_div,
  // loading port (bank not playing)
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [DW-1:0]    wr_data,
  input  logic [AW:0]      load_len,
  input  logic             load_done,
  // playback
  output logic [DW-1:0]    ref_value,
  output logic             data_trig,
  output logic             period_trig,
  output logic             active_bank,
  output logic             pending,
  output logic             playing,
  output logic [AW-1:0]    index
);

  logic [DW-1:0] mem [2**(AW+1)];

  logic [AW:0]      len_q, pend_len;
  logic [DIV_W-1:0] div_cnt;
  logic             start_req, run_q, rd_en;
  logic [AW:0]      rd_addr;
  logic [AW-1:0]    idx;
  logic             div_end;

  // Last PWM period of a data-trigger interval (data_div = 0 acts as 1).
  assign div_end = ({1'b0, div_cnt} + 1'b1 >= {1'b0, data_div});

  // Loading writes.
  always_ff @(posedge clk) begin
    if (wr_en) mem[{!active_bank, wr_addr}] <= wr_data;
  end

  // Playback read, one cycle after the request.
  always_ff @(posedge clk) begin
    if (rd_en) ref_value <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_bank <= 1'b0;
      pending     <= 1'b0;
      pend_len    <= '0;
      len_q       <= '0;
      div_cnt     <= '0;
      start_req   <= 1'b0;
      run_q       <= 1'b0;
      playing     <= 1'b0;
      idx         <= '0;
      rd_en       <= 1'b0;
      rd_addr     <= '0;
      data_trig   <= 1'b0;
      period_trig <= 1'b0;
    end else begin
      logic do_start;
      run_q       <= run;
      rd_en       <= 1'b0;
      data_trig   <= rd_en;
      period_trig <= 1'b0;

      if (load_done) begin
        pending  <= 1'b1;
        pend_len <= load_len;
      end

      // Period trigger requests.
      if (run && ((mode == WAVE_LOCAL && !run_q) || (mode == WAVE_REMOTE && remote_trig)))
        start_req <= 1'b1;
      if (!run) begin
        start_req <= 1'b0;
        playing   <= 1'b0;
      end

      if (run && pwm_period_start) begin
        // A local waveform restarts right after its last point.
        // An idle local controller also starts as soon as a bank is committed.
        do_start = start_req ||
                   (playing && mode == WAVE_LOCAL && div_end && {1'b0, idx} + 1'b1 >= len_q) ||
                   (!playing && mode == WAVE_LOCAL && pending && !load_done);
        if (do_start) begin
          logic         bank;
          logic [AW:0]  len;
          bank = active_bank;
          len  = len_q;
          if (pending && !load_done) begin
            bank     = !active_bank;
            len      = pend_len;
            pending  <= 1'b0;
          end
          active_bank <= bank;
          len_q       <= len;
          start_req   <= 1'b0;
          div_cnt     <= '0;
          idx         <= '0;
          period_trig <= 1'b1;
          if (len != '0) begin
            playing <= 1'b1;
            rd_en   <= 1'b1;
            rd_addr <= {bank, {AW{1'b0}}};
          end else begin
            playing <= 1'b0;
          end
        end else if (playing) begin
          if (div_end) begin
            div_cnt <= '0;
            if ({1'b0, idx} + 1'b1 < len_q) begin
              idx     <= idx + 1'b1;
              rd_en   <= 1'b1;
              rd_addr <= {active_bank, idx + 1'b1};
            end else begin
              playing <= 1'b0;          // remote mode: hold the last point
            end
          end else begin
            div_cnt <= div_cnt + 1'b1;
          end
        end
      end
    end
  end

  assign index = idx;

endmodule
