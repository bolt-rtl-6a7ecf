// tb_gpio_port - control-channel port: synchronizers, edge flag, outputs.
// Checks that a REQ rise sets the interrupt flag exactly three cycles later
// when rising edges are selected and a fall does not, that with falling
// edges selected only the fall does, that ifg_clr clears the flag, that
// rw_lvl follows the pin two cycles late, and that ACK and IND change only
// on their write strobes.
module tb_gpio_port;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rw_pin = 1'b0, req_pin = 1'b0, ack_pin, ind_pin;
  logic ies_fall = 1'b0, ifg_clr = 1'b0, ifg, req_lvl, rw_lvl;
  logic ack_we = 1'b0, ack_d = 1'b0, ind_we = 1'b0, ind_d = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gpio_port dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic edge_test(input bit sel_fall, input bit rise);
    int n = 0;
    ies_fall = sel_fall;
    @(negedge clk);
    req_pin = rise;
    while (!ifg && n < 10) begin @(negedge clk); n++; end
    if (sel_fall != rise) check(ifg && n == 3, $sformatf("flag %0d cycles after selected edge", n));
    else                  check(!ifg, "flag stays clear on the other edge");
    ifg_clr = 1'b1;
    @(negedge clk);
    ifg_clr = 1'b0;
    check(!ifg, "flag cleared");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!ifg && !ack_pin && !ind_pin, "reset values");
    for (int k = 0; k < 10; k++) begin
      edge_test(1'b0, 1'b1);   // rising selected, rise
      edge_test(1'b0, 1'b0);   // rising selected, fall
      edge_test(1'b1, 1'b1);   // falling selected, rise
      edge_test(1'b1, 1'b0);   // falling selected, fall
    end
    // rw synchronizer latency
    rw_pin = 1'b1;
    @(negedge clk); check(!rw_lvl, "rw after 1 cycle");
    @(negedge clk); check(rw_lvl, "rw after 2 cycles");
    // output registers
    ack_d = 1'b1; ind_d = 1'b1;
    @(negedge clk); check(!ack_pin && !ind_pin, "outputs hold without strobe");
    ack_we = 1'b1;
    @(negedge clk); ack_we = 1'b0; check(ack_pin && !ind_pin, "ack strobe");
    ind_we = 1'b1;
    @(negedge clk); ind_we = 1'b0; check(ack_pin && ind_pin, "ind strobe");
    ack_d = 1'b0; ack_we = 1'b1;
    @(negedge clk); ack_we = 1'b0; check(!ack_pin && ind_pin, "ack low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
