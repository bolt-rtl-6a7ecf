// message_controller - the Bolt message controller.
//
// It runs one instance of the Bolt state machine per port:
//   IDLE --REQ rose--> REQUEST --ACK raised--> MESSAGE TRANSFER
//   REQUEST --(write and queue full) or (read and queue empty)--> IDLE, no ACK
//   MESSAGE TRANSFER --REQ fell, bytes received--> COMMIT WRITE --> IDLE
//   MESSAGE TRANSFER --REQ fell, nothing received--> IDLE
//   MESSAGE TRANSFER --DMA done (read)--> COMMIT READ --> IDLE
// A REQ fall during a read, before the DMA is done, ends the transfer without
// removing the message (a partly read message stays queued).
//
// The state machines are advanced by interrupt handlers that run on one shared
// handler engine, one at a time (the binary semaphore of the design). Pending
// sources are served in fixed priority: DMA0 done, DMA1 done, PORT3 (A),
// PORT4 (C). When no handler runs the engine sleeps: in deep sleep (LPM4)
// when no transfer is open, in light sleep (LPM0) while one is. Leaving
// sleep costs T_LPM4 or T_LPM0 cycles, or T_DMA cycles when a DMA request
// woke it; a handler that becomes pending while another runs starts right
// after it with no wake-up delay. Each handler has a part before its ACK edge
// (T1 request, T3 write commit / abort, T5 read commit) and a part after it
// (T2, T4, T6). Handler cycles only count while `halt` is low: every DMA byte
// transfer stops the engine for two cycles, which stretches the handler as
// on the prototype. The default cycle counts are those measured on the
// prototype's microcontroller (worst case of the wake-up ranges), so ACK
// timing can be compared with the bounds derived there.
//
// In a commit handler the queue is updated three cycles before the ACK edge,
// both IND lines are rewritten two cycles before (IND = the queue towards
// that processor is not empty), and ACK falls last, the order the signalling
// diagram shows. After reset an initialisation step writes both IND lines
// from the queue state, since queued messages survive power loss.
// The engine, cycle-count parameters and the ordering inside a handler are
// this design's own reading of the software controller of the prototype.
module message_controller
  import bolt_pkg::*;
#(
  parameter int T_LPM4 = 48,
  parameter int T_LPM0 = 4,
  parameter int T_DMA  = 7,
  parameter int T1     = 172,
  parameter int T2     = 48,
  parameter int T3     = 149,
  parameter int T4     = 58,
  parameter int T5     = 117,
  parameter int T6     = 59
) (
  input  logic                clk,
  input  logic                rst_n,
  // GPIO ports (index PORT_A / PORT_C)
  input  logic [1:0]          ifg,
  input  logic [1:0]          rw_lvl,
  output logic [1:0]          ies_fall,
  output logic [1:0]          ifg_clr,
  output logic [1:0]          ack_we,
  output logic [1:0]          ack_d,
  output logic [1:0]          ind_we,
  output logic [1:0]          ind_d,
  // SPI and DMA
  output logic [1:0]          spi_en,
  output dma_cfg_t            dma_cfg  [2],
  input  logic [1:0]          dma_done,
  input  logic [7:0]          wr_count [2],
  input  logic                halt,
  // queues: queue 0 carries A->C, queue 1 carries C->A
  input  logic [1:0]          q_empty,
  input  logic [1:0]          q_full,
  input  logic [FRAM_AW-1:0]  q_head_addr [2],
  input  logic [FRAM_AW-1:0]  q_tail_addr [2],
  input  logic [7:0]          q_head_len  [2],
  output logic [1:0]          q_push,
  output logic [7:0]          q_push_len  [2],
  output logic [1:0]          q_pop,
  // status
  output power_mode_e         power_mode,
  output port_state_e         port_state [2],
  output handler_e            cur_handler,
  output logic                cur_port
);
  typedef enum logic [2:0] {C_INIT, C_SLEEP, C_WAKE, C_PRE, C_POST} core_e;

  // Cycles between an interrupt-source pin and the engine seeing it pending:
  // REQ passes two synchronizer flops and the edge flag, then one cycle to
  // leave sleep; the last SPI bit passes the SPI synchronizer, the byte
  // strobe, the frame counter and the done flag. The wake-up delays are
  // counted from the pin, so these cycles are taken off them.
  localparam int GPIO_IN_LAT = 4;
  localparam int DMA_IN_LAT  = 6;
  localparam logic [15:0] W_LPM4 = 16'((T_LPM4 > GPIO_IN_LAT) ? T_LPM4 - GPIO_IN_LAT : 0);
  localparam logic [15:0] W_LPM0 = 16'((T_LPM0 > GPIO_IN_LAT) ? T_LPM0 - GPIO_IN_LAT : 0);
  localparam logic [15:0] W_DMA  = 16'((T_DMA  > DMA_IN_LAT)  ? T_DMA  - DMA_IN_LAT  : 0);

  core_e       phase;
  logic [15:0] cnt, wake_len, wake_need;
  logic [1:0]  rd_op;

  // ---------------- pending interrupt sources and priority
  logic [1:0] dma_pend, gpio_pend;
  logic       any_pend;
  handler_e   sel_h;
  logic       sel_p;

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      dma_pend[p]  = (port_state[p] == PS_TRANSFER) && rd_op[p] && dma_done[p];
      gpio_pend[p] = ifg[p] && ((port_state[p] == PS_IDLE) || (port_state[p] == PS_TRANSFER));
      ies_fall[p]  = (port_state[p] == PS_TRANSFER);
    end
    any_pend = |dma_pend || |gpio_pend;
    sel_h = H_NONE;
    sel_p = 1'b0;
    if (dma_pend[0])       begin sel_h = H_DMA_DONE; sel_p = 1'b0; end
    else if (dma_pend[1])  begin sel_h = H_DMA_DONE; sel_p = 1'b1; end
    else if (gpio_pend[0]) begin sel_h = (port_state[0] == PS_IDLE) ? H_REQ_RISE : H_REQ_FALL; sel_p = 1'b0; end
    else if (gpio_pend[1]) begin sel_h = (port_state[1] == PS_IDLE) ? H_REQ_RISE : H_REQ_FALL; sel_p = 1'b1; end
  end

  // ---------------- handler timing
  logic [15:0] t_pre, t_post;
  logic        run, pre_last, post_last, wake_last, start_now;
  logic        fire_commit, fire_ind, fire_ack;
  logic        cp;     // current port
  logic        reject;

  always_comb begin
    unique case (cur_handler)
      H_REQ_RISE: begin t_pre = 16'(T1); t_post = 16'(T2); end
      H_REQ_FALL: begin t_pre = 16'(T3); t_post = 16'(T4); end
      default:    begin t_pre = 16'(T5); t_post = 16'(T6); end
    endcase
    cp          = cur_port;
    run         = ((phase == C_PRE) || (phase == C_POST)) && !halt;
    pre_last    = run && (phase == C_PRE)  && (cnt == t_pre - 16'd1);
    post_last   = run && (phase == C_POST) && (cnt == t_post - 16'd1);
    if (|dma_pend)
      wake_need = W_DMA;
    else if (port_state[0] == PS_TRANSFER || port_state[1] == PS_TRANSFER)
      wake_need = W_LPM0;
    else
      wake_need = W_LPM4;
    wake_last   = (phase == C_WAKE) && (cnt >= wake_len - 16'd1);
    start_now   = (wake_last || post_last || (phase == C_SLEEP && wake_need == 16'd0)) && any_pend;
    fire_commit = run && (phase == C_PRE) && (cnt == t_pre - 16'd3) && (cur_handler != H_REQ_RISE);
    fire_ind    = run && (phase == C_PRE) && (cnt == t_pre - 16'd2) && (cur_handler != H_REQ_RISE);
    fire_ack    = pre_last;
    // request check: write needs room in this port's outgoing queue,
    // read needs a message in its incoming queue
    reject      = rw_lvl[cp] ? q_empty[!cp] : q_full[cp];
  end

  // ---------------- strobes to GPIO ports and queues
  always_comb begin
    ifg_clr    = '0;
    ack_we     = '0;
    ack_d      = '0;
    ind_we     = '0;
    ind_d      = '0;
    q_push     = '0;
    q_pop      = '0;
    q_push_len[0] = wr_count[0];
    q_push_len[1] = wr_count[1];
    for (int p = 0; p < 2; p++) ind_d[p] = !q_empty[1-p];
    if (phase == C_INIT) ind_we = 2'b11;
    if (start_now && sel_h != H_DMA_DONE) ifg_clr[sel_p] = 1'b1;
    if (fire_commit) begin
      if (cur_handler == H_DMA_DONE)                                 q_pop[!cp] = 1'b1;
      else if (port_state[cp] == PS_COMMIT_W)                       q_push[cp] = 1'b1;
    end
    if (fire_ind) ind_we = 2'b11;
    if (fire_ack) begin
      if (cur_handler == H_REQ_RISE) begin
        ack_we[cp] = !reject;
        ack_d[cp]  = 1'b1;
      end else begin
        ack_we[cp]  = 1'b1;
        ack_d[cp]   = 1'b0;
        ifg_clr[cp] = 1'b1;
      end
    end
  end

  // ---------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= C_INIT;
      cnt         <= '0;
      wake_len    <= '0;
      cur_handler <= H_NONE;
      cur_port    <= 1'b0;
      rd_op       <= '0;
      spi_en      <= '0;
      for (int p = 0; p < 2; p++) begin
        port_state[p] <= PS_IDLE;
        dma_cfg[p]    <= '0;
      end
    end else begin
      unique case (phase)
        C_INIT: phase <= C_SLEEP;
        C_SLEEP: if (any_pend) begin
          phase    <= C_WAKE;
          cnt      <= '0;
          wake_len <= wake_need;
        end
        C_WAKE: cnt <= cnt + 16'd1;
        C_PRE: if (run) begin
          cnt <= cnt + 16'd1;
          if (pre_last) begin
            phase <= C_POST;
            cnt   <= '0;
          end
        end
        C_POST: if (run) begin
          cnt <= cnt + 16'd1;
          if (post_last) begin
            phase       <= C_SLEEP;
            cur_handler <= H_NONE;
          end
        end
        default: phase <= C_SLEEP;
      endcase

      // state changes at the ACK edge of a handler
      if (fire_ack) begin
        if (cur_handler == H_REQ_RISE) begin
          if (reject) begin
            port_state[cp] <= PS_IDLE;
          end else begin
            port_state[cp]  <= PS_TRANSFER;
            rd_op[cp]       <= rw_lvl[cp];
            spi_en[cp]      <= 1'b1;
            dma_cfg[cp].en  <= 1'b1;
            dma_cfg[cp].rd  <= rw_lvl[cp];
            dma_cfg[cp].len <= q_head_len[!cp];
            dma_cfg[cp].base <= rw_lvl[cp] ? q_head_addr[!cp] : q_tail_addr[cp];
          end
        end else begin
          port_state[cp] <= PS_IDLE;
          spi_en[cp]     <= 1'b0;
          dma_cfg[cp].en <= 1'b0;
        end
      end

      // start of a handler (after wake-up, or straight after the previous one)
      if (start_now) begin
        phase       <= C_PRE;
        cnt         <= '0;
        cur_handler <= sel_h;
        cur_port    <= sel_p;
        unique case (sel_h)
          H_REQ_RISE: port_state[sel_p] <= PS_REQUEST;
          H_REQ_FALL: if (!rd_op[sel_p] && wr_count[sel_p] != 8'd0) port_state[sel_p] <= PS_COMMIT_W;
          H_DMA_DONE: port_state[sel_p] <= PS_COMMIT_R;
          default: ;
        endcase
      end else if (phase == C_WAKE && !any_pend) begin
        phase <= C_SLEEP;   // source went away during wake-up
      end
    end
  end

  always_comb begin
    if (phase == C_PRE || phase == C_POST)
      power_mode = PM_ACTIVE;
    else if (port_state[0] == PS_TRANSFER || port_state[1] == PS_TRANSFER)
      power_mode = PM_LPM0;
    else
      power_mode = PM_LPM4;
  end

  if (T1 < 3 || T3 < 3 || T5 < 3 || T2 < 1 || T4 < 1 || T6 < 1) begin : g_bad_t
    $error("handler times: T1, T3, T5 must be at least 3 and T2, T4, T6 at least 1");
  end

  // the single handler engine writes at most one ACK line per cycle
  property p_one_ack;
    @(posedge clk) disable iff (!rst_n) $onehot0(ack_we);
  endproperty
  a_one_ack: assert property (p_one_ack);

  // commits never push a full queue or pop an empty one
  for (genvar q = 0; q < 2; q++) begin : g_q_rules
    a_push_room: assert property (@(posedge clk) disable iff (!rst_n) q_push[q] |-> !q_full[q]);
    a_pop_msg:   assert property (@(posedge clk) disable iff (!rst_n) q_pop[q] |-> !q_empty[q]);
  end
endmodule
