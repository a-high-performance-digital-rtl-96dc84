// tb_uart: RS232 transmitter against receiver, plus a testbench-driven line.
//
// Random bytes are sent by the transmitter in loopback to the receiver; each
// must come back once, and a frame must take 10 bit times. The testbench's own
// serial driver checks that the receiver decodes a frame written bit by bit,
// and that a frame with a low stop bit gives rx_err.
module tb_uart;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0, tx_start = 0, rxd;
  logic [7:0] tx_data, rx_data;
  logic tx_busy, txd, rx_valid, rx_err;
  logic drv = 1, use_drv = 0;
  int checks = 0, failures = 0;

  assign rxd = use_drv ? drv : txd;
  uart #(.CLK_DIV(DIV)) dut (.*);
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

  task automatic drive_frame(input logic [7:0] b, input bit stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin drv = f[i]; repeat (DIV) @(negedge clk); end
    drv = 1; repeat (2 * DIV) @(negedge clk);
  endtask

  initial begin
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 30; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      @(negedge clk) tx_data = b; tx_start = 1;
      @(negedge clk) tx_start = 0;
      t = 1;
      while (tx_busy) begin @(negedge clk); t++; end
      chk(t == 10 * DIV + 1, $sformatf("frame time %0d", t));
      repeat (DIV) @(negedge clk);
      chk(rq.size() == 1 && rq[0] == b, $sformatf("loopback %h", b));
      rq = {};
    end
    use_drv = 1;
    drive_frame(8'h3C, 1);
    chk(rq.size() == 1 && rq[0] == 8'h3C, "driven frame");
    rq = {};
    drive_frame(8'hC3, 0);
    chk(rq.size() == 0 && nerr == 1, "framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
