// adc_link_tx: ADC-card end of the backplane SPI link.
//
// Sends one FRAME_W-bit frame, most significant bit first, in SPI mode 0: cs_n
// goes low, sdo changes while sclk is low and is stable at each rising sclk
// edge. sclk runs at clk / (2 * SCLK_DIV), 25 MHz by default, so an 80-bit
// frame takes 80 * 6 = 480 clocks (3.2 us) plus one clock on each side, well
// inside the shortest PWM period of 10 us.
//
// send is taken when busy is low; frame is captured then. busy stays high
// until cs_n has returned high. Clock rate, mode and bit order are this
// design's choices.
module adc_link_tx #(
  parameter int SCLK_DIV = 3,
  parameter int FRAME_W  = 80
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               send,
  input  logic [FRAME_W-1:0] frame,
  output logic               sclk,
  output logic               cs_n,
  output logic               sdo,
  output logic               busy
);

  logic [FRAME_W-1:0]             sh;
  logic [$clog2(FRAME_W+1)-1:0]   bits;
  logic [$clog2(SCLK_DIV+1)-1:0]  div;
  typedef enum logic [1:0] {IDLE, SETUP, SHIFT, DONE} st_e;
  st_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; sh <= '0; bits <= '0; div <= '0;
      sclk <= 1'b0; cs_n <= 1'b1; sdo <= 1'b0;
    end else begin
      unique case (st)
        IDLE: if (send) begin
          sh   <= frame;
          cs_n <= 1'b0;
          sdo  <= frame[FRAME_W-1];
          bits <= '0;
          div  <= '0;
          st   <= SETUP;
        end
        SETUP: begin                       // sclk low half of the current bit
          if (div == SCLK_DIV[$bits(div)-1:0] - 1'b1) begin
            div  <= '0;
            sclk <= 1'b1;
            st   <= SHIFT;
          end else div <= div + 1'b1;
        end
        SHIFT: begin                       // sclk high half
          if (div == SCLK_DIV[$bits(div)-1:0] - 1'b1) begin
            div  <= '0;
            sclk <= 1'b0;
            bits <= bits + 1'b1;
            sh   <= sh << 1;
            sdo  <= sh[FRAME_W-2];
            st   <= (bits == ($bits(bits))'(FRAME_W - 1)) ? DONE : SETUP;
          end else div <= div + 1'b1;
        end
        DONE: begin
          cs_n <= 1'b1;
          sdo  <= 1'b0;
          st   <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

endmodule
