// current_oversampler: synchronous oversampling of the current channel.
//
// The current ADC is converted at a fixed rate (one conversion every
// SAMPLE_DIV clocks, 1 MS/s by default) that is much higher than the PWM
// frequency. The averaging window is one PWM period: at each period_start the
// window restarts, and conversions are started only while the conversion and
// its result fit before the window deadline, which is the length of the last
// PWM period minus MARGIN clocks kept free for sending the frame. The number of
// samples per window is therefore chosen at the start of each period from the
// PWM frequency. At the deadline the sum and the number of samples are
// presented with result_valid for one cycle; the mean is sum / count.
//
// Before two period starts have been seen the period length is unknown and no
// result is given. adc_data is a signed 18-bit sample delivered with adc_valid
// at most SAMPLE_DIV clocks after conv_start. The fixed rate, the margin and
// giving sum and count instead of a quotient are this design's choices.
module current_oversampler #(
  parameter int SAMPLE_DIV = 150,
  parameter int MARGIN     = 600,
  parameter int DW         = 18,
  parameter int PER_W      = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 period_start,
  output logic                 conv_start,
  input  logic                 adc_valid,
  input  logic signed [DW-1:0] adc_data,
  output logic                 result_valid,
  output logic signed [31:0]   sum,
  output logic [15:0]          count
);

  logic [PER_W-1:0] elapsed, last_period, deadline;
  logic             have_period, seen_start, window_open;
  logic [PER_W-1:0] next_conv;        // time of the next conversion start
  logic signed [31:0] acc;
  logic [15:0]        n;

  assign deadline = (last_period > PER_W'(MARGIN)) ? last_period - PER_W'(MARGIN) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elapsed      <= '0;
      last_period  <= '0;
      have_period  <= 1'b0;
      seen_start   <= 1'b0;
      window_open  <= 1'b0;
      next_conv    <= '0;
      acc          <= '0;
      n            <= '0;
      conv_start   <= 1'b0;
      result_valid <= 1'b0;
      sum          <= '0;
      count        <= '0;
    end else begin
      conv_start   <= 1'b0;
      result_valid <= 1'b0;
      if (period_start) begin
        if (seen_start) begin
          last_period <= elapsed + 1'b1;
          have_period <= 1'b1;
        end
        seen_start  <= 1'b1;
        elapsed     <= '0;
        window_open <= 1'b1;
        next_conv   <= '0;
        acc         <= '0;
        n           <= '0;
      end else begin
        if (elapsed != '1) elapsed <= elapsed + 1'b1;
        if (adc_valid && window_open) begin
          acc <= acc + 32'(adc_data);
          n   <= n + 1'b1;
        end
        if (window_open && have_period && elapsed == deadline) begin
          window_open  <= 1'b0;
          result_valid <= 1'b1;
          sum          <= acc + ((adc_valid) ? 32'(adc_data) : 32'sd0);
          count        <= n + 16'(adc_valid);
        end
      end
      // Start a conversion when its result is sure to arrive before the deadline.
      if (window_open && have_period && !period_start && elapsed == next_conv &&
          {1'b0, elapsed} + (PER_W+1)'(SAMPLE_DIV) <= {1'b0, deadline}) begin
        conv_start <= 1'b1;
        next_conv  <= next_conv + PER_W'(SAMPLE_DIV);
      end
    end
  end

endmodule
