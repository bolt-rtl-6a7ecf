// tb_proc_model - behavioural model of a processor attached to Bolt.
//
// Plays the processor side of one control channel and one SPI data channel
// (the processor is SPI master, mode 0, MSB first, SCK half period HALF
// cycles of clk). Tasks:
//   write_msg : rw=0, raise REQ, wait for ACK, shift the bytes out, drop REQ,
//               wait for ACK to fall.
//   read_msg  : rw=1, raise REQ, wait for ACK, shift in the length byte and
//               the payload, wait for ACK to fall, drop REQ. With `abort_at`
//               >= 0 it drops REQ after that many payload bytes instead.
// Both give up and drop REQ if ACK does not rise within GRANT_WAIT cycles
// (Bolt does not grant a write to a full or a read from an empty queue).
// Times are counted in clk cycles: t_req from REQ rise to ACK rise, t_commit
// from REQ fall (write) or from the last SCK edge (read) to ACK fall.
module tb_proc_model #(
  parameter int HALF       = 5,
  parameter int GRANT_WAIT = 3000
) (
  input  logic clk,
  input  logic rst_n,     // Bolt's reset: handshake rules do not hold across it
  output logic rw,
  output logic req,
  output logic sck,
  output logic mosi,
  input  logic ack,
  input  logic ind,
  input  logic miso
);
  int unsigned cyc;
  initial begin
    rw = 1'b0; req = 1'b0; sck = 1'b0; mosi = 1'b0; cyc = 0;
  end
  always @(posedge clk) cyc <= cyc + 1;

  // handshake rules seen from the processor: ACK only rises on a request,
  // and a write is only acknowledged as finished after REQ has fallen
  a_ack_on_req:  assert property (@(posedge clk) disable iff (!rst_n) $rose(ack) |-> req);
  a_write_end:   assert property (@(posedge clk) disable iff (!rst_n) $fell(ack) && !rw |-> !req);

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic xfer_byte(input logic [7:0] tx, output logic [7:0] rx);
    for (int i = 7; i >= 0; i--) begin
      mosi = tx[i];
      wait_cycles(HALF);
      sck = 1'b1;
      rx[i] = miso;
      wait_cycles(HALF);
      sck = 1'b0;
    end
  endtask

  // wait for ACK to reach `level`, at most `limit` cycles; returns cycles waited or -1
  task automatic wait_ack(input logic level, input int limit, output int t);
    int n = 0;
    while (ack !== level && n < limit) begin
      @(posedge clk);
      n++;
    end
    t = (ack === level) ? n : -1;
  endtask

  task automatic write_msg(input logic [7:0] data[], input int n,
                           output bit granted, output int t_req, output int t_commit);
    logic [7:0] dummy;
    @(posedge clk);
    rw  = 1'b0;
    @(posedge clk);
    req = 1'b1;
    wait_ack(1'b1, GRANT_WAIT, t_req);
    granted  = (t_req >= 0);
    t_commit = -1;
    if (!granted) begin
      req = 1'b0;
      wait_cycles(4);
      return;
    end
    wait_cycles(HALF);
    for (int i = 0; i < n; i++) xfer_byte(data[i], dummy);
    wait_cycles(HALF);
    req = 1'b0;
    wait_ack(1'b0, GRANT_WAIT, t_commit);
  endtask

  task automatic read_msg(input int abort_at, output bit granted, output logic [7:0] data[],
                          output int len, output int t_req, output int t_commit);
    logic [7:0] b;
    @(posedge clk);
    rw  = 1'b1;
    @(posedge clk);
    req = 1'b1;
    wait_ack(1'b1, GRANT_WAIT, t_req);
    granted  = (t_req >= 0);
    t_commit = -1;
    len      = 0;
    if (!granted) begin
      req = 1'b0;
      wait_cycles(4);
      return;
    end
    wait_cycles(HALF);
    xfer_byte(8'h00, b);
    len  = int'(b);
    data = new[len];
    for (int i = 0; i < len; i++) begin
      if (abort_at >= 0 && i == abort_at) break;
      xfer_byte(8'h00, data[i]);
    end
    if (abort_at >= 0 && abort_at < len) begin
      wait_cycles(HALF);
      req = 1'b0;
      wait_ack(1'b0, GRANT_WAIT, t_commit);
      return;
    end
    wait_ack(1'b0, GRANT_WAIT, t_commit);
    wait_cycles(HALF);
    req = 1'b0;
    wait_cycles(2);
  endtask
endmodule
