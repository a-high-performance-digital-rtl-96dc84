// tb_current_oversampler: checks the PWM-synchronous oversampling window.
//
// With a fixed conversion interval D and a reserved margin M, the window of a
// PWM period is set by the length L of the period before it: it must give
// floor((L - M) / D) samples, their exact sum (summed here from the ADC
// model's outputs) and a result L - M + 3 clocks after the period start (as
// counted here). Several PWM periods are run; the first period after reset
// gives no result because no length is known yet, and a period much shorter
// than the one before it gives none because its window does not fit.
module tb_current_oversampler;
  localparam int D = 20, M = 50;
  logic clk = 0, rst_n = 0, period_start = 0;
  logic conv_start, adc_valid, result_valid;
  logic signed [17:0] adc_data;
  logic signed [31:0] sum;
  logic [15:0] count;
  int checks = 0, failures = 0;

  current_oversampler #(.SAMPLE_DIV(D), .MARGIN(M), .DW(18)) dut (.*);
  adc_model #(.W(18), .LAT(10), .LEVEL(-3000)) adc (.clk(clk), .conv_start(conv_start),
                                                   .valid(adc_valid), .data(adc_data));
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Runs one PWM period of P clocks and checks what it produced.
  task automatic period(input int P, input int L, input bit expect_result);
    longint s; int n, t, t_res, nres;
    s = 0; n = 0; t_res = -1; nres = 0;
    @(negedge clk) period_start = 1;
    @(negedge clk) period_start = 0;
    for (t = 1; t < P; t++) begin
      if (adc_valid) begin s += adc_data; n++; end
      if (result_valid) begin
        nres++; t_res = t;
        if (expect_result) begin
          chk(count == 16'((L - M) / D), $sformatf("P=%0d count %0d exp %0d", P, count, (L - M) / D));
          chk(n == (L - M) / D, $sformatf("P=%0d samples seen %0d", P, n));
          chk(longint'(sum) == s, $sformatf("P=%0d sum %0d exp %0d", P, sum, s));
        end
      end
      @(negedge clk);
    end
    chk(nres == (expect_result ? 1 : 0), $sformatf("P=%0d %0d results", P, nres));
    if (expect_result)
      chk(t_res == L - M + 3, $sformatf("P=%0d result at %0d exp %0d", P, t_res, L - M + 3));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    period(400, 0, 0);        // length unknown yet
    period(400, 400, 1);
    period(400, 400, 1);
    period(1000, 400, 1);     // window still from the 400-clock period
    period(1000, 1000, 1);
    period(1000, 1000, 1);
    period(173, 1000, 0);     // window of 950 clocks does not fit
    period(173, 173, 1);
    period(1500, 173, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
