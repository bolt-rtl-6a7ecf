// tb_dma_controller - bus arbitration between the two DMA channels.
// Both channels issue random reads and writes to a real fram behind the
// controller; each keeps its request up until its done pulse. Checked: every
// transfer lasts exactly two halted cycles, when both channels are waiting
// channel 0 is granted first, written data reads back correctly from a model
// memory, and halt is low whenever no transfer is running.
module tb_dma_controller;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  req = '0, we = '0, done;
  logic [15:0] addr [2];
  logic [7:0]  wdata [2];
  logic [7:0]  rdata;
  logic        halt, mem_en, mem_we;
  logic [15:0] mem_addr;
  logic [7:0]  mem_wdata, mem_rdata;
  logic [7:0]  model [int];
  int checks = 0, failures = 0, n_both = 0;

  always #5 clk = ~clk;
  dma_controller dut (.*);
  fram u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // priority and timing monitor
  int halt_run = 0;
  bit both_prev = 0;
  always @(posedge clk) if (rst_n) begin
    if (both_prev) check(dut.sel == 1'b0, "channel 0 first when both request");
    both_prev = (dut.st == 2'd0 && req == 2'b11);
    if (both_prev) n_both++;
    if (halt) halt_run++;
    else begin
      if (halt_run != 0) check(halt_run == 2, $sformatf("transfer of %0d cycles", halt_run));
      halt_run = 0;
    end
  end

  task automatic channel(input int c);
    for (int i = 0; i < 400; i++) begin
      logic [15:0] a;
      repeat ($urandom_range(3)) @(posedge clk);
      a = 16'($urandom_range(63)) + 16'(c * 64);
      addr[c]  <= a;
      we[c]    <= (i < 64) ? 1'b1 : 1'($urandom);
      wdata[c] <= 8'($urandom);
      req[c]   <= 1'b1;
      @(posedge clk);
      while (!done[c]) @(posedge clk);
      if (we[c]) model[int'(a)] = wdata[c];
      else if (model.exists(int'(a))) check(rdata == model[int'(a)], $sformatf("ch%0d read %h", c, a));
      req[c] <= 1'b0;
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      channel(0);
      channel(1);
    join
    check(n_both > 0, "simultaneous requests happened");
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
