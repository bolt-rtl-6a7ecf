// dma_controller - shares the FRAM bus between the two DMA channels.
//
// Channel 0 (SPI A) has priority over channel 1 (SPI C). A granted byte
// transfer takes exactly two clock cycles: in the first the address, write
// strobe and data of the chosen channel drive the FRAM, in the second the
// read data is returned and `done` of that channel pulses. While a transfer
// is in progress `halt` is high: the controller core is stopped and its
// handler time does not advance, as the processor core is halted while the
// DMA owns the bus. After each transfer the bus is free for at least one
// cycle before the next grant. A transfer, once started, is not preempted.
module dma_controller #(
  parameter int AW = bolt_pkg::FRAM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    req,
  input  logic [1:0]    we,
  input  logic [AW-1:0] addr  [2],
  input  logic [7:0]    wdata [2],
  output logic [1:0]    done,
  output logic [7:0]    rdata,
  output logic          halt,
  // FRAM port
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  input  logic [7:0]    mem_rdata
);
  typedef enum logic [1:0] {D_IDLE, D_XFER1, D_XFER2} dstate_e;
  dstate_e st;
  logic    sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= D_IDLE;
      sel <= 1'b0;
    end else begin
      unique case (st)
        D_IDLE: if (req[0]) begin
                  sel <= 1'b0;
                  st  <= D_XFER1;
                end else if (req[1]) begin
                  sel <= 1'b1;
                  st  <= D_XFER1;
                end
        D_XFER1: st <= D_XFER2;
        D_XFER2: st <= D_IDLE;
        default: st <= D_IDLE;
      endcase
    end
  end

  assign halt      = (st != D_IDLE);
  assign mem_en    = (st == D_XFER1);
  assign mem_we    = we[sel];
  assign mem_addr  = addr[sel];
  assign mem_wdata = wdata[sel];
  assign rdata     = mem_rdata;
  assign done[0]   = (st == D_XFER2) && !sel;
  assign done[1]   = (st == D_XFER2) && sel;

  // a transfer is only started for a requesting channel
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n)
                                st == D_XFER1 |-> req[sel]);
endmodule
