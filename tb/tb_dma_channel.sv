// tb_dma_channel - one DMA channel between an SPI model and a memory model.
// Write: 20 bytes arrive as rx_valid strobes into a channel armed for a
// write at base 0x0200 with 16-byte slots; the first 16 must be stored at
// consecutive addresses, the rest dropped, and wr_count must end at 16.
// Read: a channel armed for a read of L bytes from base 0x0400 must hand the
// SPI model the length byte L followed by the L stored bytes, and raise
// `done` only after L+1 SPI frames. Disarming must clear the channel.
// The memory model answers a bus request two cycles later, like the DMA
// controller.
module tb_dma_channel;
  import bolt_pkg::*;
  localparam int MSGB = 16;
  logic        clk = 1'b0, rst_n = 1'b0;
  dma_cfg_t    cfg = '0;
  logic [7:0]  rx_data = '0, tx_data, brdata = '0, wr_count;
  logic        rx_valid = 1'b0, tx_empty, tx_we, breq, bwe, bdone = 1'b0, done;
  logic [15:0] baddr;
  logic [7:0]  bwdata;
  logic [7:0]  mem [65536];
  logic        txfull = 1'b0;
  logic [7:0]  got[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  dma_channel #(.MSG_BYTES(MSGB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model: two-cycle transfer
  int bphase = 0;
  always @(posedge clk) begin
    bdone <= 1'b0;
    if (bphase == 0 && breq && !bdone) bphase <= 1;
    else if (bphase == 1) begin
      if (bwe) mem[baddr] <= bwdata;
      else     brdata <= mem[baddr];
      bdone  <= 1'b1;
      bphase <= 0;
    end
  end

  // SPI transmit buffer model
  assign tx_empty = cfg.en && !txfull;
  always @(posedge clk) if (tx_we) begin
    txfull <= 1'b1;
    got.push_back(tx_data);
  end

  initial begin
    int L;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // ---- write
    mem[16'h0200 + MSGB] = 8'hEE;
    cfg <= '{en: 1'b1, rd: 1'b0, len: 8'd0, base: 16'h0200};
    for (int i = 0; i < 20; i++) begin
      repeat (15) @(posedge clk);
      rx_data  <= 8'(i * 7 + 3);
      rx_valid <= 1'b1;
      @(posedge clk);
      rx_valid <= 1'b0;
    end
    repeat (10) @(posedge clk);
    check(wr_count == MSGB, $sformatf("wr_count %0d", wr_count));
    for (int i = 0; i < MSGB; i++) check(mem[16'h0200 + i] == 8'(i * 7 + 3), $sformatf("stored byte %0d", i));
    check(mem[16'h0200 + MSGB] == 8'hEE, "bytes beyond the slot dropped");
    cfg <= '0;
    repeat (2) @(posedge clk);
    check(wr_count == 0, "disarm clears the byte count");
    // ---- read
    L = 11;
    for (int i = 0; i < L; i++) mem[16'h0400 + i] = 8'(8'hA0 + i);
    got.delete();
    cfg <= '{en: 1'b1, rd: 1'b1, len: 8'(L), base: 16'h0400};
    for (int f = 0; f < L + 1; f++) begin
      repeat (20) @(posedge clk);
      check(!done, $sformatf("done not before frame %0d ends", f + 1));
      txfull   <= 1'b0;      // byte moved to the shift register
      repeat (16) @(posedge clk);
      rx_valid <= 1'b1;      // frame complete
      @(posedge clk);
      rx_valid <= 1'b0;
    end
    repeat (3) @(posedge clk);
    check(done, "done after L+1 frames");
    check(got.size() >= L + 1, $sformatf("%0d bytes handed to SPI", got.size()));
    if (got.size() >= L + 1) begin
      check(got[0] == 8'(L), "length byte first");
      for (int i = 0; i < L; i++) check(got[i + 1] == 8'(8'hA0 + i), $sformatf("payload byte %0d", i));
    end
    cfg <= '0;
    repeat (2) @(posedge clk);
    check(!done, "disarm clears done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
