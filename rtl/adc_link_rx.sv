// adc_link_rx: control-card end of the backplane SPI link.
//
// The link comes from the ADC card, which has its own oscillator, so sclk,
// cs_n and sdi are brought in through two-flop synchronisers and sampled with
// the 150 MHz clock (sclk must be at most clk / 4). sdi is shifted in on each
// rising sclk edge while cs_n is low. When cs_n rises, a frame of exactly
// FRAME_W bits is presented on frame with a one-cycle frame_valid; any other
// bit count gives a one-cycle frame_err and frame keeps its last good value.
// frame_valid comes 3-4 clocks after cs_n rises. The error check is this
// design's choice.
module adc_link_rx #(
  parameter int FRAME_W = 80
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sclk,
  input  logic               cs_n,
  input  logic               sdi,
  output logic [FRAME_W-1:0] frame,
  output logic               frame_valid,
  output logic               frame_err
);

  logic [2:0] sclk_s, cs_s;
  logic [1:0] sdi_s;
  logic [FRAME_W-1:0] sh;
  logic [$clog2(FRAME_W+2)-1:0] bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; sdi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      sdi_s  <= {sdi_s[0], sdi};
    end
  end

  logic sclk_rise, cs_fall, cs_rise;
  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign cs_fall   = !cs_s[1] && cs_s[2];
  assign cs_rise   = cs_s[1] && !cs_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; bits <= '0; frame <= '0; frame_valid <= 1'b0; frame_err <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
      if (cs_fall) begin
        bits <= '0;
      end else if (!cs_s[1] && sclk_rise) begin
        sh <= {sh[FRAME_W-2:0], sdi_s[1]};
        if (bits != '1) bits <= bits + 1'b1;
      end else if (cs_rise) begin
        if (bits == ($bits(bits))'(FRAME_W)) begin
          frame       <= sh;
          frame_valid <= 1'b1;
        end else begin
          frame_err   <= 1'b1;
        end
      end
    end
  end

endmodule
