// comm_regs: register block on the communication processor's bus.
//
// The communication processor receives waveforms from the network and loads
// them into the idle waveform bank: it sets MR_WAVE_ADDR, writes points to
// MR_WAVE_DATA (the address then advances by one) and finally writes the
// number of points to MR_WAVE_COMMIT, which makes the bank pending; it takes
// over at the next waveform period. It also drives the fiber link: the link
// mode (RS232 or Manchester), bytes to send and bytes received.
//
// Bus as in ctrl_regs: bus_rdata one cycle after bus_addr, reads without side
// effects. MR_LINK_STATUS bits 0 (byte received) and 1 (receive error) are
// sticky and cleared by writing 1; irq is high while either is set. A byte
// written to MR_LINK_TX while the transmitter is busy is dropped. The register
// map is this design's choice.
module comm_regs
  import ctrl_pkg::*;
#(
  parameter int AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [4:0]    bus_addr,
  input  logic          bus_we,
  input  logic [31:0]   bus_wdata,
  output logic [31:0]   bus_rdata,
  output logic          irq,
  // waveform loading
  output logic          wave_wr_en,
  output logic [AW-1:0] wave_wr_addr,
  output logic [31:0]   wave_wr_data,
  output logic [AW:0]   wave_load_len,
  output logic          wave_load_done,
  input  logic          wave_active_bank,
  input  logic          wave_pending,
  input  logic          wave_playing,
  // fiber link
  output link_mode_e    link_mode,
  output logic          tx_start,
  output logic [7:0]    tx_data,
  input  logic          tx_busy,
  input  logic [7:0]    rx_data,
  input  logic          rx_valid,
  input  logic          rx_err
);

  comm_reg_e  a;
  logic [1:0] lstat;
  logic [7:0] rx_q;
  logic [AW-1:0] waddr;
  assign a = comm_reg_e'(bus_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr <= '0; wave_wr_en <= 1'b0; wave_wr_addr <= '0; wave_wr_data <= '0;
      wave_load_len <= '0; wave_load_done <= 1'b0;
      link_mode <= LINK_RS232; tx_start <= 1'b0; tx_data <= '0;
      lstat <= '0; rx_q <= '0;
    end else begin
      wave_wr_en     <= 1'b0;
      wave_load_done <= 1'b0;
      tx_start       <= 1'b0;
      if (rx_valid) begin
        rx_q <= rx_data;
        lstat[LS_RX_NEW] <= 1'b1;
      end
      if (rx_err) lstat[LS_RX_ERR] <= 1'b1;
      if (bus_we) begin
        unique case (a)
          MR_WAVE_ADDR: waddr <= bus_wdata[AW-1:0];
          MR_WAVE_DATA: begin
            wave_wr_en   <= 1'b1;
            wave_wr_addr <= waddr;
            wave_wr_data <= bus_wdata;
            waddr        <= waddr + 1'b1;
          end
          MR_WAVE_COMMIT: begin
            wave_load_len  <= bus_wdata[AW:0];
            wave_load_done <= 1'b1;
          end
          MR_LINK_CTRL:   link_mode <= link_mode_e'(bus_wdata[0]);
          MR_LINK_TX: if (!tx_busy && !tx_start) begin
            tx_data  <= bus_wdata[7:0];
            tx_start <= 1'b1;
          end
          MR_LINK_STATUS: lstat <= lstat & ~bus_wdata[1:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata <= '0;
    end else begin
      unique case (a)
        MR_WAVE_ADDR:   bus_rdata <= 32'(waddr);
        MR_WAVE_STATUS: bus_rdata <= {29'd0, wave_playing, wave_pending, wave_active_bank};
        MR_LINK_CTRL:   bus_rdata <= {31'd0, link_mode};
        MR_LINK_RX:     bus_rdata <= {24'd0, rx_q};
        MR_LINK_STATUS: bus_rdata <= {29'd0, tx_busy || tx_start, lstat};
        default:        bus_rdata <= '0;
      endcase
    end
  end

  assign irq = |lstat;

endmodule
