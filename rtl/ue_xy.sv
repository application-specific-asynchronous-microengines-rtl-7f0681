// XY: the X and Y registers.
//
// At completion of a request the enabled registers latch: `sm`=0 loads
// X from Xport and Y from Yport, `sm`=1 loads either from ALU2. `enx` and
// `eny` choose which registers latch. The latch happens on the edge at which
// `ack` rises, DELAY clock cycles after `req`. Registers reset to zero.
// TWO_PHASE selects a transition-signalling handshake (see ue_bd_delay).
module ue_xy #(
  parameter int unsigned DELAY     = 1,
  parameter bit          TWO_PHASE = 1'b0   // transition-signalling handshake
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  output logic          ack,
  input  logic          sm,
  input  logic          enx,
  input  logic          eny,
  input  ue_pkg::data_t x_port,
  input  ue_pkg::data_t y_port,
  input  ue_pkg::data_t alu2,
  output ue_pkg::data_t x,
  output ue_pkg::data_t y
);
  logic fire;
  ue_bd_delay #(.DELAY(DELAY), .TWO_PHASE(TWO_PHASE)) u_delay (.clk, .rst_n, .req, .ack, .fire);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else if (fire) begin
      if (enx) x <= sm ? alu2 : x_port;
      if (eny) y <= sm ? alu2 : y_port;
    end
  end
endmodule
