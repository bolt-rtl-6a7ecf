// tb_bolt_top - end-to-end test of Bolt at its default size.
//
// Two processor models (A on port 0 with SCK = clk/10, C on port 1 with
// SCK = clk/20) exchange messages through bolt_top with all parameters at
// their defaults (128-byte slots, 148 messages per queue, prototype handler
// timing). A scoreboard per direction holds the messages written and not yet
// read; every read is compared with it. The test covers, in order:
//   power-on with empty queues, a read from an empty queue (no grant),
//   a single write and a single read with ACK timing against the
//   single-operation bounds (request 220, write commit 153, read commit 124
//   cycles), a write with no data (discarded), a read abandoned half way
//   (message kept), a power loss in the middle of a write (committed
//   message kept, partial one dropped, IND restored), simultaneous traffic
//   from both processors (40 rounds of 4 writes and up to 4 reads each)
//   with request/commit times checked against the
//   worst-case bounds (request 418 on port A and 466 on port C, commit 397),
//   and filling a queue with 148 full-size messages until a write is
//   refused, then draining it.
// Each mechanism is counted; one that never happened is a failure.
module tb_bolt_top;
  import bolt_pkg::*;

  localparam int MSG   = 128;
  localparam int DEPTH = 148;
  localparam int SLACK = 2;   // cycles of SPI/handshake phase uncertainty

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       nv_clear = 1'b1;
  logic [1:0] rw, req, ack, ind, sck, mosi, miso;
  power_mode_e power_mode;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bolt_top dut (.*);

  tb_proc_model #(.HALF(5))  u_pa (.clk, .rst_n, .rw(rw[0]), .req(req[0]), .sck(sck[0]), .mosi(mosi[0]),
                                   .ack(ack[0]), .ind(ind[0]), .miso(miso[0]));
  tb_proc_model #(.HALF(10)) u_pc (.clk, .rst_n, .rw(rw[1]), .req(req[1]), .sck(sck[1]), .mosi(mosi[1]),
                                   .ack(ack[1]), .ind(ind[1]), .miso(miso[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- scoreboards: sb[0] holds A->C messages, sb[1] C->A
  typedef logic [7:0] msg_t[];
  msg_t sb0[$], sb1[$];
  int   seed_byte = 1;

  function automatic msg_t make_msg(input int n);
    msg_t m = new[n];
    for (int i = 0; i < n; i++) begin
      seed_byte = (seed_byte * 1103515245 + 12345) & 32'h7fffffff;
      m[i] = seed_byte[23:16];
    end
    return m;
  endfunction

  // ---------------- mechanism counters (observed inside the design)
  int n_commit_w, n_commit_r, n_reject_w, n_reject_r, n_empty_w, n_abort_r;
  int n_wake_lpm4, n_wake_lpm0, n_wake_dma, n_back2back, n_halt_in_isr;
  int n_dma_both, n_gpio_both, n_both_busy, n_power_loss;
  int max_treq[2], max_tcom[2];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.start_now && dut.u_ctrl.phase == 3'd4) n_back2back++;
    if (dut.u_ctrl.phase == 3'd1 && dut.u_ctrl.any_pend) begin
      if (dut.u_ctrl.dma_pend != 0)        n_wake_dma++;
      else if (power_mode == PM_LPM0)      n_wake_lpm0++;
      else                                 n_wake_lpm4++;
    end
    if (dut.halt && (dut.u_ctrl.phase == 3'd3 || dut.u_ctrl.phase == 3'd4)) n_halt_in_isr++;
    if (dut.breq == 2'b11) n_dma_both++;
    if (dut.u_ctrl.gpio_pend == 2'b11 || (dut.u_ctrl.dma_pend != 0 && dut.u_ctrl.gpio_pend != 0)) n_gpio_both++;
    if (dut.port_state[0] != PS_IDLE && dut.port_state[1] != PS_IDLE) n_both_busy++;
    if (|dut.q_push) n_commit_w++;
    if (|dut.q_pop)  n_commit_r++;
  end

  // ---------------- helpers
  task automatic do_write(input int p, input msg_t m, input bit expect_grant,
                          output int treq, output int tcom);
    bit g;
    if (p == 0) u_pa.write_msg(m, m.size(), g, treq, tcom);
    else        u_pc.write_msg(m, m.size(), g, treq, tcom);
    check(g == expect_grant, $sformatf("port %0d write grant %0b expected %0b", p, g, expect_grant));
    if (g && m.size() > 0) begin
      if (p == 0) sb0.push_back(m); else sb1.push_back(m);
    end
    if (!g) n_reject_w++;
    if (g && m.size() == 0) n_empty_w++;
    if (g) begin
      if (treq > max_treq[p]) max_treq[p] = treq;
      if (tcom > max_tcom[p]) max_tcom[p] = tcom;
    end
  endtask

  task automatic do_read(input int p, input bit expect_grant, input int abort_at,
                         output int treq, output int tcom);
    bit g;
    msg_t d, e;
    int len;
    if (p == 0) u_pa.read_msg(abort_at, g, d, len, treq, tcom);
    else        u_pc.read_msg(abort_at, g, d, len, treq, tcom);
    check(g == expect_grant, $sformatf("port %0d read grant %0b expected %0b", p, g, expect_grant));
    if (!g) begin
      n_reject_r++;
      return;
    end
    e = (p == 0) ? sb1[0] : sb0[0];
    check(len == e.size(), $sformatf("port %0d read length %0d expected %0d", p, len, e.size()));
    if (abort_at >= 0) begin
      n_abort_r++;
      for (int i = 0; i < abort_at && i < len; i++)
        check(d[i] == e[i], $sformatf("port %0d partial byte %0d", p, i));
      return;
    end
    for (int i = 0; i < len && i < e.size(); i++)
      check(d[i] == e[i], $sformatf("port %0d byte %0d got %h expected %h", p, i, d[i], e[i]));
    if (p == 0) void'(sb1.pop_front()); else void'(sb0.pop_front());
    if (treq > max_treq[p]) max_treq[p] = treq;
    if (tcom > max_tcom[p]) max_tcom[p] = tcom;
  endtask

  // ---------------- concurrent traffic of one processor: k writes, then read all
  task automatic traffic(input int p, input int rounds, input int k, input int len);
    int tr, tc;
    for (int r = 0; r < rounds; r++) begin
      for (int i = 0; i < k; i++) begin
        if (p == 0) u_pa.wait_cycles($urandom_range(600)); else u_pc.wait_cycles($urandom_range(600));
        do_write(p, make_msg(len), 1'b1, tr, tc);
      end
      // read what the other side has written so far
      for (int i = 0; i < k; i++) begin
        if (p == 0) u_pa.wait_cycles($urandom_range(600)); else u_pc.wait_cycles($urandom_range(600));
        if (((p == 0) ? sb1.size() : sb0.size()) > 0 && ind[p]) do_read(p, 1'b1, -1, tr, tc);
      end
    end
  endtask

  initial begin : main
    int tr, tc;
    msg_t m;
    int   t_wr;
    rw = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    nv_clear = 1'b0;
    repeat (5) @(posedge clk);
    check(ind == 2'b00, "IND low after power-on with empty queues");
    check(power_mode == PM_LPM4, "deep sleep when idle");

    // read from an empty queue: no grant
    do_read(1, 1'b0, -1, tr, tc);

    // single write A->C, then single read by C, ACK timing against the bounds
    do_write(0, make_msg(48), 1'b1, tr, tc);
    t_wr = tr + tc;
    $display("single write: T_w1=%0d T_w2=%0d", tr, tc);
    check(tr <= 220 + SLACK && tr >= 220 - SLACK, $sformatf("T_w1 %0d vs 220", tr));
    check(tc <= 153 + SLACK && tc >= 153 - SLACK, $sformatf("T_w2 %0d vs 153", tc));
    repeat (300) @(posedge clk);
    check(ind == 2'b10, "IND to C set after write by A");
    do_read(1, 1'b1, -1, tr, tc);
    $display("single read:  T_r1=%0d T_r2=%0d", tr, tc + 10);
    check(tr <= 220 + SLACK && tr >= 220 - SLACK, $sformatf("T_r1 %0d vs 220", tr));
    check(tc + 10 <= 124 + SLACK && tc + 10 >= 124 - SLACK, $sformatf("T_r2 %0d vs 124", tc + 10));
    // handshake overhead of a read is 29 cycles below that of a write
    check(t_wr - (tr + tc + 10) <= 29 + SLACK && t_wr - (tr + tc + 10) >= 29 - SLACK,
          $sformatf("write minus read overhead %0d vs 29", t_wr - (tr + tc + 10)));
    repeat (300) @(posedge clk);
    check(ind == 2'b00, "IND cleared after the read");

    // write with no data is discarded
    m = new[0];
    do_write(1, m, 1'b1, tr, tc);
    repeat (300) @(posedge clk);
    check(ind == 2'b00, "empty write leaves no message");
    check(dut.q_count[1] == 0, "empty write not queued");

    // read abandoned after 5 bytes keeps the message
    do_write(1, make_msg(20), 1'b1, tr, tc);
    repeat (300) @(posedge clk);
    do_read(0, 1'b1, 5, tr, tc);
    repeat (300) @(posedge clk);
    check(ind[0] == 1'b1 && dut.q_count[1] == 1, "abandoned read keeps the message");
    do_read(0, 1'b1, -1, tr, tc);
    repeat (300) @(posedge clk);
    check(dut.q_count[1] == 0, "message removed after a complete read");

    // power loss during a write
    do_write(0, make_msg(30), 1'b1, tr, tc);
    repeat (300) @(posedge clk);
    fork
      begin
        bit g; int a, b;
        m = make_msg(60);
        u_pa.write_msg(m, 60, g, a, b);
      end
      begin
        wait (ack[0] == 1'b1);
        repeat (2000) @(posedge clk);   // some bytes are in FRAM by now
        rst_n = 1'b0;
        n_power_loss++;
        repeat (20) @(posedge clk);
        rst_n = 1'b1;
      end
    join_any
    wait (rst_n == 1'b1);
    disable fork;
    u_pa.req = 1'b0;
    u_pa.sck = 1'b0;
    repeat (20) @(posedge clk);
    check(ind == 2'b10, "IND restored from the kept queue after power loss");
    check(dut.q_count[0] == 1, "partial write dropped, committed message kept");
    do_read(1, 1'b1, -1, tr, tc);
    repeat (300) @(posedge clk);
    check(ind == 2'b00 && sb0.size() == 0 && sb1.size() == 0, "queues empty before concurrent phase");

    // simultaneous traffic: A writes 48-byte messages, C 24-byte ones
    max_treq = '{0, 0};
    max_tcom = '{0, 0};
    fork
      traffic(0, 40, 4, 48);
      traffic(1, 40, 4, 24);
    join
    // drain
    while (sb0.size() > 0) do_read(1, 1'b1, -1, tr, tc);
    while (sb1.size() > 0) do_read(0, 1'b1, -1, tr, tc);
    $display("concurrent: max T_request A=%0d C=%0d, max T_commit A=%0d C=%0d",
             max_treq[0], max_treq[1], max_tcom[0], max_tcom[1]);
    check(max_treq[0] <= 418 + SLACK, $sformatf("T_request port A %0d <= 418", max_treq[0]));
    check(max_treq[1] <= 466 + SLACK, $sformatf("T_request port C %0d <= 466", max_treq[1]));
    check(max_tcom[0] <= 397 + SLACK && max_tcom[1] <= 397 + 10 + SLACK,
          "T_commit <= 397");
    repeat (300) @(posedge clk);
    check(ind == 2'b00, "all messages delivered");

    // fill queue A->C with full-size messages until a write is refused
    for (int i = 0; i < DEPTH; i++) do_write(0, make_msg(MSG), 1'b1, tr, tc);
    check(dut.q_full[0], "queue full after 148 messages");
    do_write(0, make_msg(MSG), 1'b0, tr, tc);
    for (int i = 0; i < DEPTH; i++) do_read(1, 1'b1, -1, tr, tc);
    repeat (300) @(posedge clk);
    check(ind == 2'b00 && sb0.size() == 0, "queue drained");

    // every mechanism must have happened
    $display("commit_w=%0d commit_r=%0d reject_w=%0d reject_r=%0d empty_w=%0d abort_r=%0d power_loss=%0d",
             n_commit_w, n_commit_r, n_reject_w, n_reject_r, n_empty_w, n_abort_r, n_power_loss);
    $display("wake lpm4=%0d lpm0=%0d dma=%0d back2back=%0d halt_in_isr=%0d dma_both=%0d irq_both=%0d both_busy=%0d",
             n_wake_lpm4, n_wake_lpm0, n_wake_dma, n_back2back, n_halt_in_isr, n_dma_both, n_gpio_both, n_both_busy);
    check(n_commit_w > 0, "commit write happened");
    check(n_commit_r > 0, "commit read happened");
    check(n_reject_w > 0, "write to full queue refused");
    check(n_reject_r > 0, "read from empty queue refused");
    check(n_empty_w > 0, "empty write happened");
    check(n_abort_r > 0, "abandoned read happened");
    check(n_power_loss > 0, "power loss happened");
    check(n_wake_lpm4 > 0, "wake from LPM4 happened");
    check(n_wake_lpm0 > 0, "wake from LPM0 happened");
    check(n_wake_dma > 0, "DMA wake happened");
    check(n_back2back > 0, "back-to-back handlers happened");
    check(n_halt_in_isr > 0, "DMA halted a running handler");
    check(n_dma_both > 0, "both DMA channels requested at once");
    check(n_gpio_both > 0, "two interrupts pending at once");
    check(n_both_busy > 0, "both ports busy at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
