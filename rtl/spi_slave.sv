// spi_slave - 3-wire SPI slave of one Bolt data channel (SPI A or SPI C).
//
// The attached processor is always the master and supplies SCK, so each
// processor transfers at its own clock rate. Mode 0 is used (SCK idles low,
// both sides sample on the rising edge and change data on the falling edge),
// most significant bit first; there is no chip select, the channel is framed
// by the REQ/ACK handshake and enabled by `en`. While `en` is low the bit
// counter and both shift registers are cleared.
//
// SCK and MOSI are oversampled: they go through two-flop synchronizers and
// SCK edges are detected in the Bolt clock domain, so SCK must stay below
// one eighth of the Bolt clock. Receive: after the eighth rising edge the byte
// is put on rx_data with a one-cycle rx_valid strobe (the DMA trigger).
// Transmit: a one-byte buffer is written by the DMA with tx_we; tx_empty asks
// for the next byte. Between bytes (bit counter 0, SCK low) a full buffer is
// moved into the shift register, so the most significant bit is on MISO
// before the master's next rising edge; a byte that is not ready in time is
// sent as zero. Mode 0, bit order and oversampling are this design's choices:
// the design only fixes a master/slave bus with a processor-owned clock.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  // SPI pins
  input  logic       sck,
  input  logic       mosi,
  output logic       miso,
  // DMA side
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic [7:0] tx_data,
  input  logic       tx_we,
  output logic       tx_empty
);
  logic       sck_s, sck_q, mosi_s;
  logic       rise, fall;
  logic [2:0] bitcnt;
  logic [7:0] rx_sh, tx_sh, tx_buf;
  logic       tx_full, loaded;

  bolt_sync u_sync_sck  (.clk, .rst_n, .d(sck),  .q(sck_s));
  bolt_sync u_sync_mosi (.clk, .rst_n, .d(mosi), .q(mosi_s));

  assign rise     = en && !sck_q && sck_s;
  assign fall     = en && sck_q && !sck_s;
  assign miso     = tx_sh[7];
  assign tx_empty = en && !tx_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_q    <= 1'b0;
      bitcnt   <= '0;
      rx_sh    <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      tx_sh    <= '0;
      tx_buf   <= '0;
      tx_full  <= 1'b0;
      loaded   <= 1'b0;
    end else begin
      sck_q    <= sck_s;
      rx_valid <= 1'b0;
      if (!en) begin
        bitcnt  <= '0;
        rx_sh   <= '0;
        tx_sh   <= '0;
        tx_full <= 1'b0;
        loaded  <= 1'b0;
      end else begin
        if (tx_we) begin
          tx_buf  <= tx_data;
          tx_full <= 1'b1;
        end
        if (rise) begin
          rx_sh  <= {rx_sh[6:0], mosi_s};
          bitcnt <= bitcnt + 3'd1;
          if (bitcnt == 3'd0 && !loaded) begin
            tx_sh  <= '0;          // underrun: this byte goes out as zero
            loaded <= 1'b1;
          end
          if (bitcnt == 3'd7) begin
            rx_data  <= {rx_sh[6:0], mosi_s};
            rx_valid <= 1'b1;
            loaded   <= 1'b0;
          end
        end else if (fall) begin
          if (bitcnt != 3'd0) tx_sh <= {tx_sh[6:0], 1'b0};
        end else if (bitcnt == 3'd0 && !sck_s && !loaded && tx_full && !tx_we) begin
          tx_sh   <= tx_buf;
          tx_full <= 1'b0;
          loaded  <= 1'b1;
        end
      end
    end
  end
endmodule
