// bolt_top - Bolt, a stateful interconnect between two processors A and C.
//
// Each processor writes messages into Bolt and reads messages out of it on
// its own schedule, at its own SPI clock and in its own power state; Bolt
// buffers undelivered messages in two FIFO queues (A->C and C->A) kept in
// non-volatile memory, so neither processor ever waits on the other.
//
// Per processor p (index 0 = A, 1 = C) there is a control channel
//   rw[p]  in   1 = read a message, 0 = write a message
//   req[p] in   request; a write ends when REQ falls
//   ack[p] out  data channel granted (not raised if the queue is
//               full for a write or empty for a read)
//   ind[p] out  at least one message is waiting for p
// and a 3-wire SPI data channel (sck, mosi, miso) on which p is master.
// Write: set rw=0, raise req, wait for ack, shift the message bytes in on
// MOSI, drop req, wait for ack to fall. Read: set rw=1, raise req, wait for
// ack, shift out one length byte and then that many payload bytes on MISO,
// wait for ack to fall, drop req.
//
// Inside: gpio_port (PORT3/PORT4), spi_slave (SPI A/SPI C), dma_channel
// (DMA0/DMA1), dma_controller, fram, two message_queue and the
// message_controller, wired as in the prototype's block diagram. All logic
// runs on clk; processor inputs are synchronised. rst_n is the power-on
// reset; it does not clear FRAM or queue state. nv_clear empties both
// queues (first-time initialisation of the non-volatile memory).
// power_mode reports LPM4 / LPM0 / ACTIVE of the controller core. The
// per-port state, queue counts and running handler are internal nets kept
// for observation in simulation; they drive no output.
module bolt_top
  import bolt_pkg::*;
#(
  parameter int MSG_BYTES   = 128,
  parameter int QUEUE_DEPTH = 148,
  parameter int FRAM_BYTES  = 65536,
  parameter int T_LPM4      = 48,
  parameter int T_LPM0      = 4,
  parameter int T_DMA       = 7,
  parameter int T1          = 172,
  parameter int T2          = 48,
  parameter int T3          = 149,
  parameter int T4          = 58,
  parameter int T5          = 117,
  parameter int T6          = 59
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        nv_clear,
  // control channels
  input  logic [1:0]  rw,
  input  logic [1:0]  req,
  output logic [1:0]  ack,
  output logic [1:0]  ind,
  // data channels
  input  logic [1:0]  sck,
  input  logic [1:0]  mosi,
  output logic [1:0]  miso,
  // status
  output power_mode_e power_mode
);
  localparam int QBYTES = QUEUE_DEPTH * MSG_BYTES;

  if (2 * QBYTES > FRAM_BYTES) begin : g_bad_size
    $error("two queues of QUEUE_DEPTH x MSG_BYTES do not fit in FRAM_BYTES");
  end

  // GPIO <-> controller
  logic [1:0] ifg, ifg_clr, ies_fall, req_lvl, rw_lvl, ack_we, ack_d, ind_we, ind_d;
  // SPI <-> DMA
  logic [1:0] spi_en, rx_valid, tx_we, tx_empty;
  logic [7:0] rx_data [2];
  logic [7:0] tx_data [2];
  // DMA
  dma_cfg_t             dma_cfg  [2];
  logic [1:0]           dma_done, breq, bwe, bdone;
  logic [FRAM_AW-1:0]   baddr    [2];
  logic [7:0]           bwdata   [2];
  logic [7:0]           wr_count [2];
  logic [7:0]           brdata;
  logic                 halt;
  // FRAM
  logic                 mem_en, mem_we;
  logic [FRAM_AW-1:0]   mem_addr;
  logic [7:0]           mem_wdata, mem_rdata;
  // queues
  logic [1:0]           q_empty, q_full, q_push, q_pop;
  logic [FRAM_AW-1:0]   q_head_addr [2];
  logic [FRAM_AW-1:0]   q_tail_addr [2];
  logic [7:0]           q_head_len  [2];
  logic [7:0]           q_push_len  [2];
  logic [15:0]          q_count     [2];
  port_state_e          port_state  [2];
  handler_e             cur_handler;
  logic                 cur_port;

  for (genvar p = 0; p < 2; p++) begin : g_port
    gpio_port u_gpio (
      .clk, .rst_n,
      .rw_pin(rw[p]), .req_pin(req[p]), .ack_pin(ack[p]), .ind_pin(ind[p]),
      .ies_fall(ies_fall[p]), .ifg_clr(ifg_clr[p]), .ifg(ifg[p]),
      .req_lvl(req_lvl[p]), .rw_lvl(rw_lvl[p]),
      .ack_we(ack_we[p]), .ack_d(ack_d[p]), .ind_we(ind_we[p]), .ind_d(ind_d[p])
    );

    spi_slave u_spi (
      .clk, .rst_n, .en(spi_en[p]),
      .sck(sck[p]), .mosi(mosi[p]), .miso(miso[p]),
      .rx_data(rx_data[p]), .rx_valid(rx_valid[p]),
      .tx_data(tx_data[p]), .tx_we(tx_we[p]), .tx_empty(tx_empty[p])
    );

    dma_channel #(.MSG_BYTES(MSG_BYTES)) u_dma (
      .clk, .rst_n, .cfg(dma_cfg[p]),
      .rx_data(rx_data[p]), .rx_valid(rx_valid[p]), .tx_empty(tx_empty[p]),
      .tx_data(tx_data[p]), .tx_we(tx_we[p]),
      .breq(breq[p]), .bwe(bwe[p]), .baddr(baddr[p]), .bwdata(bwdata[p]),
      .bdone(bdone[p]), .brdata(brdata),
      .wr_count(wr_count[p]), .done(dma_done[p])
    );

    // queue p holds the messages written by processor p
    message_queue #(.DEPTH(QUEUE_DEPTH), .MSG_BYTES(MSG_BYTES), .BASE(p * QBYTES)) u_queue (
      .clk, .nv_clear,
      .push(q_push[p]), .push_len(q_push_len[p]), .pop(q_pop[p]),
      .empty(q_empty[p]), .full(q_full[p]), .count(q_count[p]),
      .head_addr(q_head_addr[p]), .tail_addr(q_tail_addr[p]), .head_len(q_head_len[p])
    );
  end

  dma_controller u_dmactl (
    .clk, .rst_n,
    .req(breq), .we(bwe), .addr(baddr), .wdata(bwdata),
    .done(bdone), .rdata(brdata), .halt,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  fram #(.SIZE_BYTES(FRAM_BYTES)) u_fram (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  message_controller #(
    .T_LPM4(T_LPM4), .T_LPM0(T_LPM0), .T_DMA(T_DMA),
    .T1(T1), .T2(T2), .T3(T3), .T4(T4), .T5(T5), .T6(T6)
  ) u_ctrl (
    .clk, .rst_n,
    .ifg, .rw_lvl, .ies_fall, .ifg_clr, .ack_we, .ack_d, .ind_we, .ind_d,
    .spi_en, .dma_cfg, .dma_done, .wr_count, .halt,
    .q_empty, .q_full, .q_head_addr, .q_tail_addr, .q_head_len, .q_push, .q_push_len, .q_pop,
    .power_mode, .port_state, .cur_handler, .cur_port
  );
endmodule
