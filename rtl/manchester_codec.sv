// manchester_codec: Manchester-coded byte link for the optical fiber.
//
// Manchester coding puts a transition in the middle of every bit, so the
// receiver needs no shared clock and the optical link carries no DC level.
// Coding follows IEEE 802.3: a 0 is sent as high-then-low, a 1 as
// low-then-high, each half lasting BIT_DIV/2 clocks (2.5 Mbit/s at 150 MHz by
// default). The line idles low. A frame is a start bit (0, so the frame
// begins with a rising edge), eight data bits LSB first, then at least one
// bit time of idle low.
//
// Transmitter: tx_start with tx_data while tx_busy is low. Receiver: rx_line
// is synchronised; the first rising edge after idle marks the start of a frame
// and every half bit is sampled at its middle (1/4 and 3/4 of each bit). A bit
// whose two halves are equal, or a wrong start bit, ends the frame with a
// one-cycle rx_err; a good frame gives rx_data with a one-cycle rx_valid.
// The receiver then waits for the line to go low again and aligns on the next
// rising edge, which after an error may fall inside the damaged frame. Frame format, idle
// level and rate are this design's choices.
module manchester_codec #(
  parameter int BIT_DIV = 60
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_start,
  input  logic [7:0] tx_data,
  output logic       tx_busy,
  output logic       tx_line,
  input  logic       rx_line,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_err
);

  localparam int CW = $clog2(BIT_DIV + 1);
  localparam int Q1 = BIT_DIV / 4;
  localparam int Q3 = (3 * BIT_DIV) / 4;

  // ---------------- transmitter ----------------
  logic [9:0]    tx_sh;      // {idle, d7..d0, start}
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh <= '0; tx_bits <= '0; tx_cnt <= '0; tx_busy <= 1'b0; tx_line <= 1'b0;
    end else begin
      if (!tx_busy) begin
        tx_line <= 1'b0;
        if (tx_start) begin
          tx_sh   <= {1'b0, tx_data, 1'b0};
          tx_bits <= 4'd10;
          tx_cnt  <= '0;
          tx_busy <= 1'b1;
        end
      end else begin
        // first half: inverted bit, second half: bit; last slot is idle low
        if (tx_bits == 4'd1)               tx_line <= 1'b0;
        else if (tx_cnt < CW'(BIT_DIV / 2)) tx_line <= !tx_sh[0];
        else                               tx_line <= tx_sh[0];
        if (tx_cnt == CW'(BIT_DIV - 1)) begin
          tx_cnt  <= '0;
          tx_sh   <= tx_sh >> 1;
          tx_bits <= tx_bits - 1'b1;
          if (tx_bits == 4'd1) tx_busy <= 1'b0;
        end else begin
          tx_cnt <= tx_cnt + 1'b1;
        end
      end
    end
  end

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {R_IDLE, R_BITS, R_WAITLOW} rst_e;
  rst_e          rst_q;
  logic [2:0]    rs;
  logic [CW-1:0] ph;
  logic [3:0]    k;
  logic          h1;
  logic [6:0]    sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= '0; rst_q <= R_WAITLOW; ph <= '0; k <= '0; h1 <= 1'b0; sh <= '0;
      rx_data <= '0; rx_valid <= 1'b0; rx_err <= 1'b0;
    end else begin
      rs       <= {rs[1:0], rx_line};
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      unique case (rst_q)
        R_WAITLOW: if (!rs[1]) rst_q <= R_IDLE;
        R_IDLE: if (rs[1] && !rs[2]) begin
          rst_q <= R_BITS;
          ph    <= CW'(1);
          k     <= '0;
        end
        R_BITS: begin
          ph <= (ph == CW'(BIT_DIV - 1)) ? '0 : ph + 1'b1;
          if (ph == CW'(Q1)) h1 <= rs[1];
          if (ph == CW'(Q3)) begin
            if (h1 == rs[1] || (k == 4'd0 && rs[1])) begin
              rx_err <= 1'b1;                  // no mid-bit transition / bad start
              rst_q  <= R_WAITLOW;
            end else if (k == 4'd8) begin
              rx_data  <= {rs[1], sh};
              rx_valid <= 1'b1;
              rst_q    <= R_WAITLOW;
            end else begin
              if (k != 4'd0) sh <= {rs[1], sh[6:1]};
              k <= k + 1'b1;
            end
          end
        end
        default: rst_q <= R_WAITLOW;
      endcase
    end
  end

endmodule
