// uart: RS232-format serial port (8 data bits, no parity, 1 stop bit).
//
// Used on the fiber link when it runs in RS232-compatible mode. The bit time
// is CLK_DIV clocks (115200 baud at 150 MHz by default). Transmitter: tx_start
// with tx_data while tx_busy is low sends start bit (0), data LSB first and
// stop bit (1); txd idles high. Receiver: rxd is synchronised; a falling edge
// starts a frame, each bit is sampled at its middle, a start bit that is not
// still low at its middle is ignored as a glitch, and a low stop bit sets
// rx_err for one cycle instead of rx_valid. Frame format and rate are this
// design's choices.
module uart #(
  parameter int CLK_DIV = 1302
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_start,
  input  logic [7:0] tx_data,
  output logic       tx_busy,
  output logic       txd,
  input  logic       rxd,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_err
);

  localparam int CW = $clog2(CLK_DIV + 1);

  // ---------------- transmitter ----------------
  logic [9:0]    tx_sh;
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh <= '1; tx_bits <= '0; tx_cnt <= '0; tx_busy <= 1'b0;
    end else if (!tx_busy) begin
      if (tx_start) begin
        tx_sh   <= {1'b1, tx_data, 1'b0};
        tx_bits <= 4'd10;
        tx_cnt  <= '0;
        tx_busy <= 1'b1;
      end
    end else if (tx_cnt == CW'(CLK_DIV - 1)) begin
      tx_cnt <= '0;
      tx_sh  <= {1'b1, tx_sh[9:1]};
      tx_bits <= tx_bits - 1'b1;
      if (tx_bits == 4'd1) tx_busy <= 1'b0;
    end else begin
      tx_cnt <= tx_cnt + 1'b1;
    end
  end

  assign txd = tx_busy ? tx_sh[0] : 1'b1;

  // ---------------- receiver ----------------
  logic [2:0]    rs;
  logic          rx_act;
  logic [3:0]    rx_bits;
  logic [CW-1:0] rx_cnt;
  logic [7:0]    rx_sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= '1; rx_act <= 1'b0; rx_bits <= '0; rx_cnt <= '0; rx_sh <= '0;
      rx_data <= '0; rx_valid <= 1'b0; rx_err <= 1'b0;
    end else begin
      rs       <= {rs[1:0], rxd};
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      if (!rx_act) begin
        if (rs[2] && !rs[1]) begin            // falling edge: start bit
          rx_act  <= 1'b1;
          rx_cnt  <= CW'(CLK_DIV / 2);
          rx_bits <= '0;
        end
      end else if (rx_cnt == CW'(CLK_DIV - 1)) begin
        rx_cnt <= '0;
        if (rx_bits == 4'd0 && rs[1]) begin
          rx_act <= 1'b0;                      // glitch, not a start bit
        end else if (rx_bits == 4'd9) begin
          rx_act <= 1'b0;
          if (rs[1]) begin
            rx_data  <= rx_sh;
            rx_valid <= 1'b1;
          end else begin
            rx_err <= 1'b1;
          end
        end else begin
          if (rx_bits != 4'd0) rx_sh <= {rs[1], rx_sh[7:1]};
          rx_bits <= rx_bits + 1'b1;
        end
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
      end
    end
  end

endmodule
