// interlock_io: isolated digital inputs and outputs for the interlock chain.
//
// The 16 inputs come through optocouplers. Each is synchronised and debounced:
// its debounced value changes only after the raw input has held a new level
// for DEB consecutive clocks (10 us by default). An input enabled in mask that
// is debounced high is a fault; faults are latched per input until clear is
// pulsed and the input has returned low. interlock is high while any fault is
// latched; the top uses it to switch the PWM off. The 8 outputs drive the
// optocoupled outputs from dout_reg and are all forced low while an interlock
// is latched. Debounce time, active level, latching and the safe output state
// are this design's choices.
module interlock_io #(
  parameter int NIN  = 16,
  parameter int NOUT = 8,
  parameter int DEB  = 1500
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NIN-1:0]  din,
  input  logic [NIN-1:0]  mask,
  input  logic            clear,
  input  logic [NOUT-1:0] dout_reg,
  output logic [NIN-1:0]  din_db,
  output logic [NIN-1:0]  latched,
  output logic            interlock,
  output logic [NOUT-1:0] dout
);

  localparam int CW = $clog2(DEB + 1);
  logic [NIN-1:0] s1, s2;
  logic [CW-1:0]  cnt [NIN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; din_db <= '0; latched <= '0;
      for (int i = 0; i < NIN; i++) cnt[i] <= '0;
    end else begin
      s1 <= din;
      s2 <= s1;
      for (int i = 0; i < NIN; i++) begin
        if (s2[i] == din_db[i]) begin
          cnt[i] <= '0;
        end else if (cnt[i] == CW'(DEB - 1)) begin
          cnt[i]    <= '0;
          din_db[i] <= s2[i];
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
        if (mask[i] && din_db[i])  latched[i] <= 1'b1;
        else if (clear)            latched[i] <= 1'b0;
      end
    end
  end

  assign interlock = |latched;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= interlock ? '0 : dout_reg;
  end

endmodule
