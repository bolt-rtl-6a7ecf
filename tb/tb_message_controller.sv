// tb_message_controller - the handler engine and per-port state machines.
// The testbench plays the GPIO flags, the DMA done lines, the halt line and
// two queue counters (depth 2). Counted from the testbench setting a flag to
// it seeing ACK change, two cycles of flag and ACK registering are added.
// With the default timing it checks:
//   a write request from deep sleep raises ACK W_LPM4 + T1 = 216 cycles
//   after the flag (the 4 pin-path cycles of the 48-cycle wake-up are in
//   the port), with the DMA armed for a write at the queue tail;
//   the REQ fall of that write commits the byte count with no wake-up delay,
//   updates the queue before IND and IND before ACK, ACK falling T3 = 149
//   cycles after the handler starts;
//   a read of an empty queue and a write to a full queue are refused
//   (no ACK, state back to IDLE);
//   a read is granted, its DMA done commits it and removes the message;
//   two requests in one cycle are served port A first, then port C straight
//   after with no wake-up; a DMA done beats a GPIO flag;
//   halt cycles during a handler delay its ACK by the same number of cycles.
module tb_message_controller;
  import bolt_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  ifg = '0, rw_lvl = '0, ies_fall, ifg_clr, ack_we, ack_d, ind_we, ind_d;
  logic [1:0]  spi_en, dma_done = '0, q_empty, q_full, q_push, q_pop;
  dma_cfg_t    dma_cfg [2];
  logic [7:0]  wr_count [2] = '{8'd0, 8'd0};
  logic        halt = 1'b0;
  logic [15:0] q_head_addr [2], q_tail_addr [2];
  logic [7:0]  q_head_len [2], q_push_len [2];
  power_mode_e power_mode;
  port_state_e port_state [2];
  handler_e    cur_handler;
  logic        cur_port;
  int checks = 0, failures = 0, cyc = 0;
  int qn[2] = '{0, 0};
  int t_push, t_ind, t_ack;
  logic [1:0] ack = '0;

  always #5 clk = ~clk;
  message_controller dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // queue and pin models
  always_comb for (int q = 0; q < 2; q++) begin
    q_empty[q]     = (qn[q] == 0);
    q_full[q]      = (qn[q] == 2);
    q_head_addr[q] = 16'(q * 1000);
    q_tail_addr[q] = 16'(q * 1000 + 128 * qn[q]);
    q_head_len[q]  = 8'd33;
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int q = 0; q < 2; q++) begin
      if (q_push[q]) begin qn[q] <= qn[q] + 1; t_push <= cyc; end
      if (q_pop[q])  qn[q] <= qn[q] - 1;
      if (ifg_clr[q]) ifg[q] <= 1'b0;
      if (ack_we[q]) begin ack[q] <= ack_d[q]; t_ack <= cyc; end
    end
    if (|ind_we) t_ind <= cyc;
  end

  task automatic raise(input int p);
    @(negedge clk);
    ifg[p] = 1'b1;
  endtask

  // wait for ACK of port p to become `level`; returns cycles from now
  task automatic wait_ack(input int p, input logic level, input int limit, output int n);
    n = 0;
    while (ack[p] !== level && n < limit) begin @(posedge clk); n++; end
    if (ack[p] !== level) n = -1;
  endtask

  initial begin
    int n, c0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(power_mode == PM_LPM4, "deep sleep after reset");

    // 1. write request on A from deep sleep
    rw_lvl[0] = 1'b0;
    raise(0);
    wait_ack(0, 1'b1, 1000, n);
    check(n == 44 + 172 + 2, $sformatf("write grant after %0d cycles", n));
    check(port_state[0] == PS_TRANSFER && dma_cfg[0].en && !dma_cfg[0].rd && dma_cfg[0].base == 16'd0,
          "write transfer armed at the queue tail");
    repeat (60) @(posedge clk);
    check(power_mode == PM_LPM0, "light sleep during transfer");

    // 2. REQ fall commits 10 bytes
    wr_count[0] = 8'd10;
    raise(0);
    wait_ack(0, 1'b0, 1000, n);
    check(n == 149 + 2, $sformatf("write commit after %0d cycles", n));
    check(qn[0] == 1 && dut.q_push_len[0] == 8'd10, "message of 10 bytes queued");
    check(t_push < t_ind && t_ind < t_ack, "queue, then IND, then ACK");
    repeat (2) @(posedge clk);
    check(ind_d == 2'b10, "IND for C set, for A clear");
    wr_count[0] = 8'd0;
    repeat (100) @(posedge clk);
    check(port_state[0] == PS_IDLE && !spi_en[0], "port A idle again");

    // 3. refused read (queue C->A empty) and refused write (A->C full)
    rw_lvl[0] = 1'b1;
    raise(0);
    wait_ack(0, 1'b1, 600, n);
    check(n == -1 && port_state[0] == PS_IDLE, "read of empty queue refused");
    qn[0] = 2;
    rw_lvl[0] = 1'b0;
    raise(0);
    wait_ack(0, 1'b1, 600, n);
    check(n == -1 && port_state[0] == PS_IDLE, "write to full queue refused");
    qn[0] = 1;

    // 4. read on C, committed by DMA done
    rw_lvl[1] = 1'b1;
    raise(1);
    wait_ack(1, 1'b1, 1000, n);
    check(n > 0 && dma_cfg[1].rd && dma_cfg[1].len == 8'd33 && dma_cfg[1].base == 16'd0, "read armed at the queue head");
    repeat (100) @(posedge clk);
    @(negedge clk) dma_done[1] = 1'b1;
    wait_ack(1, 1'b0, 1000, n);
    dma_done[1] = 1'b0;
    check(n == 1 + 117 + 2, $sformatf("read commit after %0d cycles", n));
    check(qn[0] == 0, "message removed by the read commit");

    // 5. simultaneous requests: A before C, C without wake-up
    repeat (100) @(posedge clk);
    rw_lvl = 2'b00;
    @(negedge clk) ifg = 2'b11;
    c0 = cyc;
    wait_ack(0, 1'b1, 1000, n);
    check(n == 44 + 172 + 2, "port A served first");
    wait_ack(1, 1'b1, 1000, n);
    check(cyc - c0 == 44 + 172 + 48 + 172 + 1, $sformatf("port C right after A (%0d)", cyc - c0));
    repeat (100) @(posedge clk);
    // DMA over GPIO: C in a read transfer; end A's write (flag) and C's read (DMA) together
    qn[1] = 0;
    @(negedge clk) ifg[1] = 1'b1;   // end C's write with no bytes: back to idle
    wait_ack(1, 1'b0, 1000, n);
    check(qn[1] == 0, "write with no bytes not queued");
    qn[0] = 1;
    rw_lvl[1] = 1'b1;
    repeat (100) @(posedge clk);
    raise(1);
    wait_ack(1, 1'b1, 1000, n);
    repeat (100) @(posedge clk);
    wr_count[0] = 8'd5;
    @(negedge clk) begin ifg[0] = 1'b1; dma_done[1] = 1'b1; end
    wait_ack(1, 1'b0, 1000, n);
    dma_done[1] = 1'b0;
    check(ack[0] == 1'b1, "DMA done handled before the GPIO flag");
    wait_ack(0, 1'b0, 1000, n);
    check(n > 0 && qn[0] == 1, "GPIO handler after the DMA handler");
    wr_count[0] = 8'd0;

    // 6. halt stretches a handler
    repeat (200) @(posedge clk);
    qn = '{0, 0};
    rw_lvl[0] = 1'b0;
    raise(0);
    repeat (100) @(posedge clk);
    @(negedge clk) halt = 1'b1;
    repeat (30) @(negedge clk);
    halt = 1'b0;
    wait_ack(0, 1'b1, 1000, n);
    check(n == 44 + 172 + 2 - 100, $sformatf("30 halt cycles delay the grant (%0d)", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
