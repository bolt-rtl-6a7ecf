// tb_fram - random writes and reads of the FRAM array against a model.
// Writes 2000 random bytes to random addresses (kept in an associative
// array), then reads every written address back and checks the registered
// read data one cycle later. Also checks that a cycle with en low changes
// neither the memory nor the read register.
module tb_fram;
  logic        clk = 1'b0;
  logic        en = 1'b0, we = 1'b0;
  logic [15:0] addr = '0;
  logic [7:0]  wdata = '0, rdata;
  logic [7:0]  model [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fram dut (.*);

  initial begin
    logic [7:0] held;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1;
      addr = 16'($urandom);
      wdata = 8'($urandom);
      model[int'(addr)] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    foreach (model[a]) begin
      addr = 16'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL: addr %h read %h expected %h", a, rdata, model[a]);
      end
    end
    // disabled cycle keeps the read register and the memory
    held = rdata;
    en = 1'b0; we = 1'b1; wdata = ~held;
    @(negedge clk);
    checks++;
    if (rdata !== held) begin failures++; $display("FAIL: read register changed while disabled"); end
    en = 1'b1; we = 1'b0;
    @(negedge clk);
    checks++;
    if (rdata !== model[int'(addr)]) begin failures++; $display("FAIL: write while disabled"); end
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
