// tb_bolt_workloads - queue capacity and write throughput per message length.
//
// Five Bolt instances are built with the slot size and queue depth of each
// characterised message length: 16/32/48/64/128 bytes with 1075/568/380/290/
// 148 messages per queue. For each, processor A fills its queue with
// messages of the full slot length; the write after the last must be
// refused. Processor C then reads every message back and compares it.
// From the writes the average handshake overhead (REQ rise to ACK rise plus
// REQ fall to ACK fall, in Bolt clock cycles) is measured. The write
// throughput at the characterised operating point (8 MHz Bolt clock, 4 MHz
// SPI) is then L*8 bits / (overhead / 8 MHz + L*8 / 4 MHz); it must not fall
// below the measured figures of 1.5/2.1/2.5/2.8/3.3 Mbit/s and not exceed
// them by more than 15 % (the reference figures include processor-side
// time between messages, which this model does not have). In simulation
// SCK runs at clk/10, since the SPI slave oversamples SCK.
module tb_bolt_workloads;
  import bolt_pkg::*;

  localparam int NCFG = 5;
  localparam int LEN   [NCFG] = '{16, 32, 48, 64, 128};
  localparam int DEPTH [NCFG] = '{1075, 568, 380, 290, 148};
  localparam real MBPS [NCFG] = '{1.5, 2.1, 2.5, 2.8, 3.3};

  logic clk = 1'b0, rst_n = 1'b0, nv_clear = 1'b1;
  int checks = 0, failures = 0;
  bit fin [NCFG];

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic [1:0] rw, req, ack, ind, sck, mosi, miso;
    power_mode_e power_mode;

    bolt_top #(.MSG_BYTES(LEN[g]), .QUEUE_DEPTH(DEPTH[g])) dut (
      .clk, .rst_n, .nv_clear, .rw, .req, .ack, .ind, .sck, .mosi, .miso, .power_mode);
    tb_proc_model #(.HALF(5)) u_pa (.clk, .rst_n, .rw(rw[0]), .req(req[0]), .sck(sck[0]), .mosi(mosi[0]),
                                    .ack(ack[0]), .ind(ind[0]), .miso(miso[0]));
    tb_proc_model #(.HALF(5)) u_pc (.clk, .rst_n, .rw(rw[1]), .req(req[1]), .sck(sck[1]), .mosi(mosi[1]),
                                    .ack(ack[1]), .ind(ind[1]), .miso(miso[1]));

    initial begin
      logic [7:0] m[];
      logic [7:0] d[];
      bit         gr;
      int         tr, tc, len, bad;
      longint     ovh;
      real        t_us, mbps;
      wait (rst_n && !nv_clear);
      repeat (10) @(posedge clk);
      ovh = 0;
      m = new[LEN[g]];
      for (int i = 0; i < DEPTH[g]; i++) begin
        for (int b = 0; b < LEN[g]; b++) m[b] = 8'(i * 3 + b * 7 + g);
        u_pa.write_msg(m, LEN[g], gr, tr, tc);
        if (!gr) begin
          check(1'b0, $sformatf("L=%0d write %0d refused", LEN[g], i));
          break;
        end
        ovh += tr + tc;
      end
      check(dut.q_full[0], $sformatf("L=%0d queue full after %0d messages", LEN[g], DEPTH[g]));
      u_pa.write_msg(m, LEN[g], gr, tr, tc);
      check(!gr, $sformatf("L=%0d write %0d refused", LEN[g], DEPTH[g] + 1));
      t_us = real'(ovh) / real'(DEPTH[g]) / 8.0 + real'(LEN[g] * 8) / 4.0;
      mbps = real'(LEN[g] * 8) / t_us;
      $display("L=%0d bytes: %0d messages stored, overhead %0d cycles/msg, throughput at 4 MHz SPI %0.2f Mbit/s (reference %0.1f)",
               LEN[g], DEPTH[g], ovh / DEPTH[g], mbps, MBPS[g]);
      check(mbps >= MBPS[g] && mbps <= MBPS[g] * 1.15, $sformatf("L=%0d throughput %0.2f", LEN[g], mbps));
      bad = 0;
      for (int i = 0; i < DEPTH[g]; i++) begin
        u_pc.read_msg(-1, gr, d, len, tr, tc);
        if (!gr || len != LEN[g]) bad++;
        else for (int b = 0; b < LEN[g]; b++) if (d[b] != 8'(i * 3 + b * 7 + g)) bad++;
      end
      check(bad == 0, $sformatf("L=%0d read back %0d bad", LEN[g], bad));
      repeat (300) @(posedge clk);
      check(ind == 2'b00, $sformatf("L=%0d queue drained", LEN[g]));
      fin[g] = 1'b1;
    end
  end

  initial begin
    fin = '{default: 1'b0};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    nv_clear = 1'b0;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
