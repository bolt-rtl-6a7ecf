// gpio_port - control channel of one processor (PORT3 for A, PORT4 for C).
//
// The processor drives R/W (1 = read, 0 = write) and REQ; Bolt drives ACK and
// IND. Both inputs pass through two-flop synchronizers. REQ can raise an
// interrupt flag on a rising or on a falling edge, chosen by `ies_fall`
// (0: rising, 1: falling), as a GPIO pin of the prototype's
// microcontroller can. The flag stays set until the controller clears it
// with `ifg_clr` (a set in the same cycle wins). ACK and IND are output
// registers loaded by the controller through ack_we/ack_d and ind_we/ind_d,
// so they change one cycle after the write strobe.
// The synchronizers and the strobe-style output registers are this design's
// choices; the line set and edge-triggered interrupts follow the design.
module gpio_port (
  input  logic clk,
  input  logic rst_n,
  // pins
  input  logic rw_pin,
  input  logic req_pin,
  output logic ack_pin,
  output logic ind_pin,
  // controller side
  input  logic ies_fall,
  input  logic ifg_clr,
  output logic ifg,
  output logic req_lvl,
  output logic rw_lvl,
  input  logic ack_we,
  input  logic ack_d,
  input  logic ind_we,
  input  logic ind_d
);
  logic req_q;   // previous synchronized REQ
  logic edge_hit;

  bolt_sync #(.RESET_VAL(1'b0)) u_sync_req (.clk, .rst_n, .d(req_pin), .q(req_lvl));
  bolt_sync #(.RESET_VAL(1'b0)) u_sync_rw  (.clk, .rst_n, .d(rw_pin),  .q(rw_lvl));

  assign edge_hit = ies_fall ? (req_q && !req_lvl) : (!req_q && req_lvl);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q   <= 1'b0;
      ifg     <= 1'b0;
      ack_pin <= 1'b0;
      ind_pin <= 1'b0;
    end else begin
      req_q <= req_lvl;
      if (edge_hit)     ifg <= 1'b1;
      else if (ifg_clr) ifg <= 1'b0;
      if (ack_we) ack_pin <= ack_d;
      if (ind_we) ind_pin <= ind_d;
    end
  end
endmodule
