// tb_message_queue - random push/pop of a small message queue against a model.
// DEPTH 5, 16-byte slots from address 100. Each cycle a random push (with a
// random length) and/or pop is applied; a SystemVerilog queue of
// (slot, length) pairs predicts empty, full, count, head/tail addresses and
// head length. Pushing a full queue and popping an empty one must be
// ignored; both happen many times. Finally nv_clear must empty the queue.
module tb_message_queue;
  localparam int DEPTH = 5, MSGB = 16, BASE = 100;
  logic        clk = 1'b0;
  logic        nv_clear = 1'b1, push = 1'b0, pop = 1'b0;
  logic [7:0]  push_len = '0;
  logic        empty, full;
  logic [15:0] count, head_addr, tail_addr;
  logic [7:0]  head_len;
  int checks = 0, failures = 0;
  int q_len[$];
  int head, tail, n_full_push, n_empty_pop;

  always #5 clk = ~clk;
  message_queue #(.DEPTH(DEPTH), .MSG_BYTES(MSGB), .BASE(BASE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    nv_clear = 1'b0;
    head = 0; tail = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (q_len.size() == 0), "empty");
      check(full == (q_len.size() == DEPTH), "full");
      check(int'(count) == q_len.size(), $sformatf("count %0d vs %0d", count, q_len.size()));
      check(int'(head_addr) == BASE + head * MSGB, "head address");
      check(int'(tail_addr) == BASE + tail * MSGB, "tail address");
      if (q_len.size() > 0) check(int'(head_len) == q_len[0], "head length");
      push = ($urandom_range(99) < 50);
      pop  = ($urandom_range(99) < 45);
      push_len = 8'($urandom_range(1, MSGB));
      // model update for this edge
      begin
        bit dp, dq;
        dp = push && q_len.size() < DEPTH;
        dq = pop && q_len.size() > 0;
        if (push && !dp) n_full_push++;
        if (pop && !dq) n_empty_pop++;
        if (dq) begin void'(q_len.pop_front()); head = (head + 1) % DEPTH; end
        if (dp) begin q_len.push_back(int'(push_len)); tail = (tail + 1) % DEPTH; end
      end
    end
    @(negedge clk);
    push = 1'b0; pop = 1'b0; nv_clear = 1'b1;
    @(negedge clk);
    nv_clear = 1'b0;
    check(empty && count == 0 && head_addr == BASE && tail_addr == BASE, "nv_clear empties the queue");
    check(n_full_push > 0 && n_empty_pop > 0, "push-when-full and pop-when-empty exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
