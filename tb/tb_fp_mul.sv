// tb_fp_mul: checks the single-precision multiplier against real arithmetic.
//
// Operands are random normal numbers. The reference widens both to double
// (exact), multiplies in double (exact, 48 significant bits) and rounds the
// double to single with round-to-nearest-even on its bit pattern. Special
// cases (zero, infinity, NaN, overflow, underflow) are checked against fixed
// expected values. Latency must be two cycles, one result per cycle.
module tb_fp_mul;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] dataa, datab, result;
  logic done;
  int checks = 0, failures = 0;

  fp_mul dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && (|d[27:0] || d[29])) m = m + 1'b1;
    if (m[24]) begin m = m >> 1; e++; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  logic [31:0] expq [$];
  int issued = 0, got = 0;

  // Collect results in issue order; check latency of two cycles.
  logic [2:0] start_hist;
  always @(posedge clk) begin
    start_hist <= {start_hist[1:0], start};
    if (rst_n) begin
      if (done !== start_hist[1]) begin
        checks++; failures++; $display("FAIL latency: done=%b", done);
      end
      if (done) begin
        logic [31:0] e;
        e = expq.pop_front();
        checks++; got++;
        if (result !== e) begin
          failures++;
          $display("FAIL result %h expected %h", result, e);
        end
      end
    end
  end

  task automatic issue(input logic [31:0] a, input logic [31:0] b, input logic [31:0] e);
    @(negedge clk);
    dataa = a; datab = b; start = 1;
    expq.push_back(e);
    issued++;
  endtask

  function automatic logic [31:0] rnd_float(input int emin, input int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  initial begin
    start_hist = '0;
    dataa = '0; datab = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // back-to-back random operations
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] a, b;
      a = rnd_float(70, 184);
      b = rnd_float(70, 184);
      issue(a, b, to_single(to_real(a) * to_real(b)));
    end
    // exact small cases
    issue(32'h3F80_0000, 32'h4049_0FDB, 32'h4049_0FDB);        // 1 * pi
    issue(32'h4000_0000, 32'hC040_0000, 32'hC0C0_0000);        // 2 * -3 = -6
    issue(32'h3FC0_0001, 32'h4049_0FDB, 32'h4096_CBE5);        // rounding case
    // special values
    issue(32'h0000_0000, 32'h4049_0FDB, 32'h0000_0000);        // 0 * x
    issue(32'h8000_0000, 32'h4049_0FDB, 32'h8000_0000);        // -0 * x
    issue(32'h7F80_0000, 32'h4000_0000, 32'h7F80_0000);        // inf * 2
    issue(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);        // inf * 0 = NaN
    issue(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);        // NaN * 1
    issue(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);        // overflow
    issue(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);        // underflow
    issue(32'h0000_0001, 32'h7F00_0000, 32'h0000_0000);        // subnormal in, flushed
    @(negedge clk) start = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != issued) begin failures++; $display("FAIL %0d results for %0d ops", got, issued); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
