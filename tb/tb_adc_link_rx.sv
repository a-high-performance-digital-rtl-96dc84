// tb_adc_link_rx: checks frame reception on the control card.
//
// The testbench drives sclk, cs_n and sdi in SPI mode 0 with a clock period
// of 6 and, for some frames, 11 system clocks (not a multiple, as from a
// separate oscillator), MSB first. Each correct frame must appear once on
// frame with frame_valid; frames one bit short or long must give frame_err and
// leave frame unchanged.
module tb_adc_link_rx;
  localparam int FRAME_W = 80;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, cs_n = 1, sdi = 0;
  logic [FRAME_W-1:0] frame;
  logic frame_valid, frame_err;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;

  adc_link_rx #(.FRAME_W(FRAME_W)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (frame_valid) nvalid++;
    if (frame_err) nerr++;
  end

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

  // half_ns: half an sclk period in ns
  task automatic send(input logic [FRAME_W+1:0] data, input int nb, input int half_ns);
    #3 cs_n = 0;
    for (int i = nb - 1; i >= 0; i--) begin
      sdi = data[i];
      #(half_ns) sclk = 1;
      #(half_ns) sclk = 0;
    end
    #(half_ns) cs_n = 1;
    #200;
  endtask

  initial begin
    logic [FRAME_W-1:0] last;
    repeat (2) @(negedge clk);
    rst_n = 1;
    last = '0;
    for (int f = 0; f < 30; f++) begin
      logic [FRAME_W-1:0] fr;
      int v0, e0, half;
      fr = {$urandom, $urandom, 16'($urandom)};
      half = (f % 3 == 0) ? 55 : 30;
      v0 = nvalid; e0 = nerr;
      if (f % 7 == 3) begin
        send({2'b0, fr}, FRAME_W - 1, half);
        chk(nerr == e0 + 1 && nvalid == v0, "short frame flagged");
        chk(frame == last, "short frame kept out");
      end else if (f % 7 == 5) begin
        send({2'b0, fr}, FRAME_W + 1, half);
        chk(nerr == e0 + 1 && nvalid == v0, "long frame flagged");
        chk(frame == last, "long frame kept out");
      end else begin
        send({2'b0, fr}, FRAME_W, half);
        chk(nvalid == v0 + 1 && nerr == e0, "frame accepted once");
        chk(frame == fr, $sformatf("frame %h exp %h", frame, fr));
        last = fr;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
