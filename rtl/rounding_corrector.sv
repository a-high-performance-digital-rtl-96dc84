// rounding_corrector: rounding correction of a fixed-point PWM duty.
//
// The PWM can only place an edge on a whole 6.67 ns step, but the control law
// asks for a duty with a fraction of a step. Each PWM period this block outputs
// the integer part of the duty and adds the dropped fraction to an accumulator;
// when the accumulator passes one whole step, that period's duty gets one extra
// step and the accumulator keeps the remainder. Averaged over periods the
// output duty equals the requested one (the rounding-correction method of the
// design). The accumulator width and the saturation at the top of the integer
// range are this design's choices.
//
// Interface: duty_in is unsigned INT_W.FRAC_W fixed point in steps; on each
// update pulse duty_out is registered (valid the cycle after update).
module rounding_corrector #(
  parameter int INT_W  = 18,
  parameter int FRAC_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    update,
  input  logic [INT_W+FRAC_W-1:0] duty_in,
  output logic [INT_W-1:0]        duty_out
);

  logic [FRAC_W-1:0] acc_q;
  logic [FRAC_W:0]   acc_sum;
  logic [INT_W-1:0]  int_part;
  logic [INT_W:0]    int_corr;

  always_comb begin
    int_part = duty_in[INT_W+FRAC_W-1:FRAC_W];
    acc_sum  = {1'b0, acc_q} + {1'b0, duty_in[FRAC_W-1:0]};
    int_corr = {1'b0, int_part} + {{INT_W{1'b0}}, acc_sum[FRAC_W]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= '0;
      duty_out <= '0;
    end else if (update) begin
      acc_q    <= acc_sum[FRAC_W-1:0];
      duty_out <= int_corr[INT_W] ? '1 : int_corr[INT_W-1:0];
    end
  end

endmodule
