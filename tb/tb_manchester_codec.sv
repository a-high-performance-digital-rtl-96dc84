// tb_manchester_codec: Manchester transmitter, line format and receiver.
//
// The transmitter's line is checked half bit by half bit against the coding
// rule (0 = high then low, 1 = low then high, start bit 0, LSB first, idle
// low). In loopback every byte must be received once. A frame driven by the
// testbench with a missing mid-bit transition must give rx_err, and the
// receiver must then accept the next good frame.
module tb_manchester_codec;
  localparam int BIT = 20;
  logic clk = 0, rst_n = 0, tx_start = 0, rx_line;
  logic [7:0] tx_data, rx_data;
  logic tx_busy, tx_line, rx_valid, rx_err;
  logic drv = 0, use_drv = 0;
  int checks = 0, failures = 0;

  assign rx_line = use_drv ? drv : tx_line;
  manchester_codec #(.BIT_DIV(BIT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [7:0] rq [$];
  int nerr = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) rq.push_back(rx_data);
    if (rx_err) nerr++;
  end

  task automatic drive_bits(input logic [8:0] bits, input int bad_bit);
    for (int i = 0; i < 9; i++) begin
      drv = !bits[i];
      repeat (BIT / 2) @(negedge clk);
      drv = (i == bad_bit) ? !bits[i] : bits[i];
      repeat (BIT / 2) @(negedge clk);
    end
    drv = 0; repeat (2 * BIT) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 30; i++) begin
      logic [7:0] b;
      logic [8:0] f;
      b = (i == 0) ? 8'hFF : (i == 1) ? 8'h00 : 8'($urandom);
      f = {b, 1'b0};
      @(negedge clk) tx_data = b; tx_start = 1;
      @(negedge clk) tx_start = 0;
      // line is one clock behind the bit counter; sample at quarter points
      for (int k = 0; k < 9; k++) begin
        repeat (BIT / 4) @(negedge clk);
        chk(tx_line == !f[k], $sformatf("byte %h bit %0d first half", b, k));
        repeat (BIT / 2) @(negedge clk);
        chk(tx_line == f[k], $sformatf("byte %h bit %0d second half", b, k));
        repeat (BIT - BIT / 4 - BIT / 2) @(negedge clk);
      end
      while (tx_busy) begin @(negedge clk); chk(tx_line == 0, "idle after frame"); end
      repeat (BIT) @(negedge clk);
      chk(rq.size() == 1 && rq[0] == b, $sformatf("loopback %h", b));
      rq = {};
    end
    use_drv = 1;
    drive_bits({8'h96, 1'b0}, 4);
    chk(nerr >= 1, $sformatf("missing transition flagged (%0d errors)", nerr));
    chk(!(rq.size() == 1 && rq[0] == 8'h96), "bad frame not delivered");
    rq = {};
    drive_bits({8'h69, 1'b0}, -1);
    chk(rq.size() == 1 && rq[0] == 8'h69, "recovers after error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
