// message_queue - bookkeeping of one Bolt FIFO message queue.
//
// Messages live in FRAM in DEPTH fixed slots of MSG_BYTES bytes starting at
// BASE; this module keeps which slots are in use. It holds the head and tail
// slot numbers, the number of stored messages and the length of each stored
// message, and gives the FRAM address of the head slot (next to read) and of
// the tail slot (next to write). `push` appends a message of `push_len` bytes
// whose payload the DMA has already put in the tail slot; `pop` drops the head
// message. Both act at the clock edge; pushing a full queue or popping an
// empty one is ignored. `full` is the state the controller calls Q=Omega and
// `empty` the state Q=0.
//
// Like the FRAM, this state is non-volatile: it is not touched by the
// power-on reset of the rest of Bolt, so undelivered messages survive power
// loss and a message is only added or removed by a completed commit. Only
// `nv_clear` (first-time initialisation of the memory) empties the queue.
// Fixed-size slots and a length table per slot are this design's choice;
// the default depth and slot size (148 messages of 128 bytes) are the
// largest message size the design was characterised with.
module message_queue #(
  parameter int DEPTH     = 148,
  parameter int MSG_BYTES = 128,
  parameter int AW        = bolt_pkg::FRAM_AW,
  parameter int BASE      = 0
) (
  input  logic          clk,
  input  logic          nv_clear,
  input  logic          push,
  input  logic [7:0]    push_len,
  input  logic          pop,
  output logic          empty,
  output logic          full,
  output logic [15:0]   count,
  output logic [AW-1:0] head_addr,
  output logic [AW-1:0] tail_addr,
  output logic [7:0]    head_len
);
  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [IW-1:0] head, tail;
  logic [7:0]    len_mem [DEPTH];
  logic          do_push, do_pop;

  assign empty   = (count == 16'd0);
  assign full    = (count == 16'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [IW-1:0] next_slot(input logic [IW-1:0] s);
    return (32'(s) == DEPTH - 1) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (nv_clear) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_push) begin
        len_mem[tail] <= push_len;
        tail          <= next_slot(tail);
      end
      if (do_pop) head <= next_slot(head);
      case ({do_push, do_pop})
        2'b10:   count <= count + 16'd1;
        2'b01:   count <= count - 16'd1;
        default: ;
      endcase
    end
  end

  assign head_addr = AW'(BASE + 32'(head) * MSG_BYTES);
  assign tail_addr = AW'(BASE + 32'(tail) * MSG_BYTES);
  assign head_len  = len_mem[head];

  if (MSG_BYTES > 255) begin : g_bad_len
    $error("MSG_BYTES must fit the 8-bit length field");
  end
  if (DEPTH > 65535) begin : g_bad_depth
    $error("DEPTH must fit the 16-bit count");
  end
endmodule
