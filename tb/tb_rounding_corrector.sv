// tb_rounding_corrector: checks the rounding-correction sequence.
//
// For a duty of I + f/2^F steps and an accumulator starting at zero, the n-th
// update must output I + floor(n*f/2^F) - floor((n-1)*f/2^F), so the sum of n
// outputs is n*I + floor(n*f/2^F). Several random and edge duties are run for
// 64 updates each, and saturation at the top of the integer range is checked.
module tb_rounding_corrector;
  localparam int INT_W = 18, FRAC_W = 14;
  logic clk = 0, rst_n = 0, update = 0;
  logic [INT_W+FRAC_W-1:0] duty_in;
  logic [INT_W-1:0] duty_out;
  int checks = 0, failures = 0;

  rounding_corrector #(.INT_W(INT_W), .FRAC_W(FRAC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_duty(input longint ip, input longint fr);
    longint exp_o;
    rst_n = 0; update = 0;
    duty_in = {INT_W'(ip), FRAC_W'(fr)};
    @(posedge clk); #1 rst_n = 1;
    for (longint n = 1; n <= 64; n++) begin
      @(negedge clk) update = 1;
      @(negedge clk) update = 0;
      exp_o = ip + (n * fr) / (1 << FRAC_W) - ((n - 1) * fr) / (1 << FRAC_W);
      checks++;
      if (longint'(duty_out) != exp_o) begin
        failures++;
        $display("FAIL duty %0d+%0d/2^14 n=%0d out=%0d exp=%0d", ip, fr, n, duty_out, exp_o);
      end
    end
  endtask

  initial begin
    run_duty(30, 4096);          // 30.25
    run_duty(1000, 1);           // tiny fraction
    run_duty(7, 16383);          // almost one
    run_duty(0, 8192);           // 0.5
    run_duty(12345, 0);          // integer
    for (int k = 0; k < 10; k++) run_duty($urandom_range(0, 150000), $urandom_range(0, 16383));
    // Saturation: all-ones integer part with a carry stays at all-ones.
    rst_n = 0; duty_in = {{INT_W{1'b1}}, FRAC_W'(16383)};
    @(posedge clk); #1 rst_n = 1;
    repeat (3) begin
      @(negedge clk) update = 1;
      @(negedge clk) update = 0;
      checks++;
      if (duty_out != '1) begin failures++; $display("FAIL saturation %0d", duty_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
