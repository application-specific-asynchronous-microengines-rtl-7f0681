// MUL2: multiplier of the y thread, U*DX with fixed operands.
//
// Combinational fixed-point product; `ack` follows `req` after DELAY clock
// cycles (bundled-data delay matched to the multiplier).
// TWO_PHASE selects a transition-signalling handshake (see ue_bd_delay).
module ue_mul2 #(
  parameter int unsigned DELAY     = 4,
  parameter bit          TWO_PHASE = 1'b0   // transition-signalling handshake
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  output logic          ack,
  input  ue_pkg::data_t u,
  input  ue_pkg::data_t dx,
  output ue_pkg::data_t p
);
  logic unused_fire;
  assign p = ue_pkg::fx_mul(u, dx);
  ue_bd_delay #(.DELAY(DELAY), .TWO_PHASE(TWO_PHASE)) u_delay (.clk, .rst_n, .req, .ack, .fire(unused_fire));
endmodule
