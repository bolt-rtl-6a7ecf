// bolt_sync - two-flop synchronizer for one asynchronous input.
//
// Brings the processor-driven control and SPI lines into the Bolt clock
// domain. Output lags the input by two clock edges. Reset value is a
// parameter so idle-high and idle-low lines both start quiet.
module bolt_sync #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
