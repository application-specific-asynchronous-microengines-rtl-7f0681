// MUL1: multiplier of the y' thread.
//
// Input multiplexers set by `sm`: sm=0 computes X*U (first half of y'),
// sm=1 computes 3DX*T (second half). The product is combinational and
// fixed point (see ue_pkg); `ack` follows `req` after DELAY clock cycles,
// a bundled-data delay matched to the multiplier. Operand mapping follows
// the solver's datapath figure; the mux input numbering is read from it.
// TWO_PHASE selects a transition-signalling handshake (see ue_bd_delay).
module ue_mul1 #(
  parameter int unsigned DELAY     = 4,
  parameter bit          TWO_PHASE = 1'b0   // transition-signalling handshake
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  output logic          ack,
  input  logic          sm,
  input  ue_pkg::data_t x,
  input  ue_pkg::data_t dx3,
  input  ue_pkg::data_t u,
  input  ue_pkg::data_t t,
  output ue_pkg::data_t p
);
  logic unused_fire;
  assign p = ue_pkg::fx_mul(sm ? dx3 : x, sm ? t : u);
  ue_bd_delay #(.DELAY(DELAY), .TWO_PHASE(TWO_PHASE)) u_delay (.clk, .rst_n, .req, .ack, .fire(unused_fire));
endmodule
