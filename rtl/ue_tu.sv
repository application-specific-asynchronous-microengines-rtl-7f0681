// TU: the T and U registers.
//
// `en`=0 latches T from ALU1; `en`=1 latches U, from Uport when `sm`=1 or
// from ALU1 when `sm`=0. The latch happens on the edge at which `ack` rises,
// DELAY clock cycles after `req`. Registers reset to zero.
// TWO_PHASE selects a transition-signalling handshake (see ue_bd_delay).
module ue_tu #(
  parameter int unsigned DELAY     = 1,
  parameter bit          TWO_PHASE = 1'b0   // transition-signalling handshake
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  output logic          ack,
  input  logic          sm,
  input  logic          en,
  input  ue_pkg::data_t u_port,
  input  ue_pkg::data_t alu1,
  output ue_pkg::data_t t,
  output ue_pkg::data_t u
);
  logic fire;
  ue_bd_delay #(.DELAY(DELAY), .TWO_PHASE(TWO_PHASE)) u_delay (.clk, .rst_n, .req, .ack, .fire);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t <= '0;
      u <= '0;
    end else if (fire) begin
      if (en) u <= sm ? u_port : alu1;
      else    t <= alu1;
    end
  end
endmodule
