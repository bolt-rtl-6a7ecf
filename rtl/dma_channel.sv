// dma_channel - moves one message between an SPI module and its FRAM slot.
//
// DMA0 serves SPI A and DMA1 serves SPI C. The controller arms the channel
// with a dma_cfg_t record when it grants a transfer and disarms it at commit;
// disarming clears all counters.
//
// Write (cfg.rd = 0): each byte the SPI receives (rx_valid) becomes one bus
// request that stores it at cfg.base + wr_count; wr_count, the number of
// bytes stored so far, becomes the message length at commit. Bytes beyond
// MSG_BYTES are dropped.
// Read (cfg.rd = 1): whenever the SPI transmit buffer is empty the channel
// fills it. The first byte sent is the message length cfg.len, followed by
// the cfg.len payload bytes fetched from cfg.base onward over the bus. The
// channel counts finished SPI frames and sets `done` (its interrupt request)
// once the length byte and all payload bytes have been shifted out; `done`
// stays set until the channel is disarmed.
// Bus requests are held until `bdone`, which comes with read data. Sending
// the length first is this design's choice: the design lets messages have
// variable length but does not say how a reader learns it.
module dma_channel #(
  parameter int MSG_BYTES = 128,
  parameter int AW        = bolt_pkg::FRAM_AW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  bolt_pkg::dma_cfg_t  cfg,
  // SPI side
  input  logic [7:0]          rx_data,
  input  logic                rx_valid,
  input  logic                tx_empty,
  output logic [7:0]          tx_data,
  output logic                tx_we,
  // memory bus side (through the DMA controller)
  output logic                breq,
  output logic                bwe,
  output logic [AW-1:0]       baddr,
  output logic [7:0]          bwdata,
  input  logic                bdone,
  input  logic [7:0]          brdata,
  // status
  output logic [7:0]          wr_count,
  output logic                done
);
  logic [8:0] idx;      // read: next byte to hand to the SPI, 0 = length byte
  logic [8:0] frames;   // read: SPI frames completed
  logic [7:0] wbyte;

  assign bwe    = !cfg.rd;
  assign bwdata = wbyte;
  assign baddr  = cfg.rd ? AW'(cfg.base + AW'(idx) - AW'(1)) : AW'(cfg.base + AW'(wr_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx      <= '0;
      frames   <= '0;
      wbyte    <= '0;
      wr_count <= '0;
      breq     <= 1'b0;
      tx_we    <= 1'b0;
      tx_data  <= '0;
      done     <= 1'b0;
    end else begin
      tx_we <= 1'b0;
      if (!cfg.en) begin
        idx      <= '0;
        frames   <= '0;
        wr_count <= '0;
        breq     <= 1'b0;
        done     <= 1'b0;
      end else if (!cfg.rd) begin
        // SPI -> FRAM
        if (rx_valid && !breq && 32'(wr_count) < MSG_BYTES) begin
          wbyte <= rx_data;
          breq  <= 1'b1;
        end
        if (bdone) begin
          breq     <= 1'b0;
          wr_count <= wr_count + 8'd1;
        end
      end else begin
        // FRAM -> SPI
        if (tx_empty && !tx_we && !breq && idx <= 9'(cfg.len)) begin
          if (idx == 9'd0) begin
            tx_data <= cfg.len;
            tx_we   <= 1'b1;
            idx     <= 9'd1;
          end else begin
            breq <= 1'b1;
          end
        end
        if (bdone) begin
          breq    <= 1'b0;
          tx_data <= brdata;
          tx_we   <= 1'b1;
          idx     <= idx + 9'd1;
        end
        if (rx_valid) frames <= frames + 9'd1;
        if (frames == 9'(cfg.len) + 9'd1) done <= 1'b1;
      end
    end
  end

  // bus rule: a request stays up, with a stable address, until it is served
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
                               breq && !bdone && cfg.en |=> breq && $stable(baddr));
endmodule
