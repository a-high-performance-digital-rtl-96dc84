// boot_sequencer: boots the two processors one after the other.
//
// Both processors boot from the same parallel flash, each from its own reset
// address, so their boot copiers must not run at the same time. After the
// board reset the first processor is released (after RST_STRETCH cycles of
// reset) while the second is held in reset. When the first processor signals
// that its boot copy is finished (cpu0_boot_done, a level), the second
// processor is released and runs its own boot copier. The reset addresses are
// handed to the processors as boot vectors.
//
// States: HOLD_ALL (stretching reset) -> BOOT0 (first processor copying) ->
// BOOT1 (second processor running). The stretch length, the boot-done level
// and the two addresses are this design's choices.
module boot_sequencer #(
  parameter logic [31:0] CPU0_RESET_ADDR = 32'h0000_0000,
  parameter logic [31:0] CPU1_RESET_ADDR = 32'h0020_0000,
  parameter int          RST_STRETCH     = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpu0_boot_done,
  output logic        cpu0_reset_n,
  output logic        cpu1_reset_n,
  output logic [31:0] cpu0_reset_addr,
  output logic [31:0] cpu1_reset_addr
);

  typedef enum logic [1:0] {HOLD_ALL = 2'd0, BOOT0 = 2'd1, BOOT1 = 2'd2} state_e;
  state_e st;
  logic [$clog2(RST_STRETCH+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= HOLD_ALL;
      cnt <= '0;
    end else begin
      unique case (st)
        HOLD_ALL: if (cnt == RST_STRETCH[$bits(cnt)-1:0] - 1'b1) st <= BOOT0;
                  else cnt <= cnt + 1'b1;
        BOOT0:    if (cpu0_boot_done) st <= BOOT1;
        BOOT1:    st <= BOOT1;
        default:  st <= HOLD_ALL;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu0_reset_n <= 1'b0;
      cpu1_reset_n <= 1'b0;
    end else begin
      cpu0_reset_n <= (st != HOLD_ALL);
      cpu1_reset_n <= (st == BOOT1);
    end
  end

  assign cpu0_reset_addr = CPU0_RESET_ADDR;
  assign cpu1_reset_addr = CPU1_RESET_ADDR;

  // The second processor never leaves reset before the first.
  assert property (@(posedge clk) disable iff (!rst_n) cpu1_reset_n |-> cpu0_reset_n);

endmodule
