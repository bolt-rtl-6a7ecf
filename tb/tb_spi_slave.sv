// tb_spi_slave - SPI slave against a mode-0 master model.
// The master shifts 200 random bytes in (MOSI) while the testbench, acting as
// the DMA, refills the transmit buffer with another random sequence whenever
// tx_empty asks. Every rx_valid byte must equal the MOSI byte sent and every
// byte the master collects on MISO must equal the transmit sequence. SCK
// half period is 5 clk cycles (SCK = clk/10). Also checks that disabling
// the slave in the middle of a byte restarts the bit count.
module tb_spi_slave;
  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic       sck = 1'b0, mosi = 1'b0, miso;
  logic [7:0] rx_data, tx_data = '0;
  logic       rx_valid, tx_we = 1'b0, tx_empty;
  int checks = 0, failures = 0;
  logic [7:0] sent[$], txq[$], txs[$];
  localparam int HALF = 5;

  always #5 clk = ~clk;
  spi_slave dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DMA model: refill the transmit buffer from txq
  always @(posedge clk) begin
    tx_we <= 1'b0;
    if (tx_empty && !tx_we && txq.size() > 0) begin
      tx_data <= txq[0];
      txs.push_back(txq.pop_front());
      tx_we   <= 1'b1;
    end
  end

  // receive checker
  always @(posedge clk) if (rx_valid) begin
    check(sent.size() > 0 && rx_data == sent[0], $sformatf("rx %h expected %h", rx_data, sent.size() ? sent[0] : 8'h0));
    if (sent.size() > 0) void'(sent.pop_front());
  end

  task automatic xfer(input logic [7:0] tx, output logic [7:0] rx);
    for (int i = 7; i >= 0; i--) begin
      mosi = tx[i];
      repeat (HALF) @(posedge clk);
      sck = 1'b1;
      rx[i] = miso;
      repeat (HALF) @(posedge clk);
      sck = 1'b0;
    end
  endtask

  initial begin
    logic [7:0] b, r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) txq.push_back(8'($urandom));
    @(posedge clk);
    en = 1'b1;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      b = 8'($urandom);
      sent.push_back(b);
      xfer(b, r);
      check(r == txs[i], $sformatf("miso byte %0d %h expected %h", i, r, txs[i]));
    end
    repeat (10) @(posedge clk);
    check(sent.size() == 0, "all MOSI bytes received");
    // disable in mid-byte, then a fresh byte must be received whole
    for (int i = 7; i >= 4; i--) begin
      mosi = 1'b1; repeat (HALF) @(posedge clk); sck = 1'b1; repeat (HALF) @(posedge clk); sck = 1'b0;
    end
    en = 1'b0;
    repeat (5) @(posedge clk);
    en = 1'b1;
    repeat (5) @(posedge clk);
    sent.push_back(8'h5a);
    xfer(8'h5a, r);
    repeat (10) @(posedge clk);
    check(sent.size() == 0, "byte after re-enable received");
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
