// tb_dual_port_ram: checks the ownership split of the shared RAM.
//
// Port A writes the lower half and port B the upper half, both at the same
// time; each port then reads back the whole RAM and must see both halves.
// Writes into the other port's half must be dropped (contents unchanged) and
// flagged one cycle later. Read latency is one cycle. A model array kept by
// the testbench gives the expected contents.
module tb_dual_port_ram;
  localparam int AW = 6, DW = 32, N = 1 << AW;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] a_addr, b_addr;
  logic a_we = 0, b_we = 0;
  logic [DW-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic a_wr_denied, b_wr_denied;
  logic [DW-1:0] model [N];
  int checks = 0, failures = 0;

  dual_port_ram #(.AW(AW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic read_all();
    for (int i = 0; i < N; i++) begin
      @(negedge clk); a_addr = AW'(i); b_addr = AW'(N - 1 - i);
      @(negedge clk);
      chk(a_rdata == model[i], $sformatf("A read %0d: %h exp %h", i, a_rdata, model[i]));
      chk(b_rdata == model[N-1-i], $sformatf("B read %0d: %h exp %h", N-1-i, b_rdata, model[N-1-i]));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // each port fills its own half, simultaneously
    for (int i = 0; i < N / 2; i++) begin
      @(negedge clk);
      a_addr = AW'(i);         a_wdata = $urandom; a_we = 1;
      b_addr = AW'(N / 2 + i); b_wdata = $urandom; b_we = 1;
      model[i] = a_wdata; model[N/2+i] = b_wdata;
    end
    @(negedge clk) a_we = 0; b_we = 0;
    read_all();
    // writes into the other half are dropped and flagged
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      a_addr = AW'(N / 2 + i); a_wdata = 32'hDEAD_0000 + i; a_we = 1;
      b_addr = AW'(i);         b_wdata = 32'hBEEF_0000 + i; b_we = 1;
      @(negedge clk);
      a_we = 0; b_we = 0;
      chk(a_wr_denied && b_wr_denied, "denied flags");
    end
    @(negedge clk);
    chk(!a_wr_denied && !b_wr_denied, "denied flags clear");
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
