// bolt_pkg - types and constants shared by the Bolt interconnect.
//
// Bolt connects two processors, A and C. Each has its own control channel
// (R/W, REQ, ACK, IND) and SPI data channel. Port A is served by GPIO PORT3,
// SPI A and DMA channel 0; port C by PORT4, SPI C and DMA channel 1. Two FIFO
// queues hold undelivered messages: queue 0 carries A->C, queue 1 carries C->A.
// The per-port state names follow the controller state diagram of the design
// (IDLE, REQUEST, MESSAGE TRANSFER, COMMIT WRITE, COMMIT READ); the encodings
// and the DMA configuration record are this implementation's own.
package bolt_pkg;

  localparam int FRAM_AW = 16;  // 64 KB non-volatile memory, byte addressed

  // Per-port controller state (one instance of the state diagram per port).
  typedef enum logic [2:0] {
    PS_IDLE     = 3'd0,
    PS_REQUEST  = 3'd1,
    PS_TRANSFER = 3'd2,
    PS_COMMIT_W = 3'd3,
    PS_COMMIT_R = 3'd4
  } port_state_e;

  // Power mode of the controller core: deep sleep while no transfer is open,
  // light sleep while DMA and SPI are moving a message, active in a handler.
  typedef enum logic [1:0] {
    PM_LPM4   = 2'd0,
    PM_LPM0   = 2'd1,
    PM_ACTIVE = 2'd2
  } power_mode_e;

  // Interrupt handlers of the controller.
  typedef enum logic [1:0] {
    H_NONE     = 2'd0,
    H_REQ_RISE = 2'd1,   // GPIO: REQ rose in IDLE       -> request phase
    H_REQ_FALL = 2'd2,   // GPIO: REQ fell in TRANSFER   -> commit write / abort
    H_DMA_DONE = 2'd3    // DMA: last byte of a read out -> commit read
  } handler_e;

  // DMA channel configuration written by the request handler.
  typedef struct packed {
    logic               en;    // channel armed
    logic               rd;    // 1: FRAM -> SPI (message read), 0: SPI -> FRAM
    logic [7:0]         len;   // read: stored message length in bytes
    logic [FRAM_AW-1:0] base;  // first byte of the message slot
  } dma_cfg_t;

endpackage
