// fram - non-volatile byte memory holding the Bolt message queues.
//
// The prototype keeps messages, queue state and program in 64 KB of on-chip
// FRAM behind a shared bus. This module is that memory as a synchronous
// single-port array: one access per cycle, write when en && we, read data
// registered and valid one cycle after an access with en && !we.
// The array has no reset on purpose: its contents model storage that
// survives a power loss. Byte-wide data and a 16-bit address are this
// design's choices (the prototype bus is 16 bits wide with 20-bit address);
// DMA moves single bytes, so a byte port is all the queues need.
module fram #(
  parameter int SIZE_BYTES = 65536,
  parameter int AW         = 16
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [SIZE_BYTES];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
