// tb_comm_regs: register map of the communication processor.
//
// Waveform loading: after MR_WAVE_ADDR, each MR_WAVE_DATA write must give one
// wave_wr_en pulse at the next address; MR_WAVE_COMMIT must pulse
// wave_load_done with the length. Link: mode register, a MR_LINK_TX write must
// pulse tx_start only when the link is idle, received bytes and errors must
// set sticky status bits and irq, cleared by write-1.
module tb_comm_regs;
  import ctrl_pkg::*;
  localparam int AW = 14;
  logic clk = 0, rst_n = 0;
  logic [4:0] bus_addr = '0;
  logic bus_we = 0;
  logic [31:0] bus_wdata, bus_rdata;
  logic irq, wave_wr_en, wave_load_done, tx_start;
  logic [AW-1:0] wave_wr_addr;
  logic [31:0] wave_wr_data;
  logic [AW:0] wave_load_len;
  logic wave_active_bank = 1, wave_pending = 0, wave_playing = 1;
  link_mode_e link_mode;
  logic [7:0] tx_data, rx_data = 0;
  logic tx_busy = 0, rx_valid = 0, rx_err = 0;
  int checks = 0, failures = 0;

  comm_regs #(.AW(AW)) dut (.*);
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

  // log of waveform writes
  logic [AW-1:0] wa [$];
  logic [31:0]   wd [$];
  int ntx = 0, ndone = 0;
  always @(posedge clk) if (rst_n) begin
    if (wave_wr_en) begin wa.push_back(wave_wr_addr); wd.push_back(wave_wr_data); end
    if (tx_start) ntx++;
    if (wave_load_done) ndone++;
  end

  task automatic wr(input comm_reg_e a, input logic [31:0] d);
    @(negedge clk) bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk) bus_we = 0;
  endtask

  task automatic rd(input comm_reg_e a, output logic [31:0] d);
    @(negedge clk) bus_addr = a;
    @(negedge clk) d = bus_rdata;
  endtask

  initial begin
    logic [31:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(MR_WAVE_ADDR, 100);
    for (int i = 0; i < 20; i++) wr(MR_WAVE_DATA, 32'h4000_0000 + i);
    @(negedge clk);
    chk(wa.size() == 20, $sformatf("%0d point writes", wa.size()));
    for (int i = 0; i < 20; i++)
      chk(wa[i] == AW'(100 + i) && wd[i] == 32'h4000_0000 + i, $sformatf("point %0d", i));
    rd(MR_WAVE_ADDR, r); chk(r == 120, "address advanced");
    wr(MR_WAVE_COMMIT, 16000);
    @(negedge clk);
    chk(ndone == 1 && wave_load_len == 15'd16000, "commit");
    rd(MR_WAVE_STATUS, r); chk(r[2:0] == 3'b101, "wave status");
    // link
    wr(MR_LINK_CTRL, 1); chk(link_mode == LINK_MANCHESTER, "link mode");
    rd(MR_LINK_CTRL, r); chk(r == 1, "link mode read");
    wr(MR_LINK_TX, 8'h5A); @(negedge clk); chk(ntx == 1 && tx_data == 8'h5A, "tx start");
    tx_busy = 1;
    wr(MR_LINK_TX, 8'h11); chk(ntx == 1 && tx_data == 8'h5A, "tx dropped while busy");
    rd(MR_LINK_STATUS, r); chk(r[2] == 1, "busy visible");
    tx_busy = 0;
    chk(!irq, "no irq yet");
    @(negedge clk) rx_data = 8'hC3; rx_valid = 1;
    @(negedge clk) rx_valid = 0; rx_data = 8'h00;
    rd(MR_LINK_RX, r); chk(r == 8'hC3, "rx byte held");
    rd(MR_LINK_STATUS, r); chk(r[1:0] == 2'b01 && irq, "rx new");
    @(negedge clk) rx_err = 1;
    @(negedge clk) rx_err = 0;
    rd(MR_LINK_STATUS, r); chk(r[1:0] == 2'b11, "rx err");
    wr(MR_LINK_STATUS, 3);
    rd(MR_LINK_STATUS, r); chk(r[1:0] == 2'b00 && !irq, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
