// ALU2: adder of the y and x threads.
//
// Input multiplexers set by `sm`: sm=1 computes MUL2 + Y (new y), sm=0
// computes DX + X (new x). Combinational; `ack` follows `req` after DELAY
// clock cycles.
// TWO_PHASE selects a transition-signalling handshake (see ue_bd_delay).
module ue_alu2 #(
  parameter int unsigned DELAY     = 2,
  parameter bit          TWO_PHASE = 1'b0   // transition-signalling handshake
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  output logic          ack,
  input  logic          sm,
  input  ue_pkg::data_t dx,
  input  ue_pkg::data_t m,   // MUL2 product
  input  ue_pkg::data_t x,
  input  ue_pkg::data_t y,
  output ue_pkg::data_t r
);
  logic unused_fire;
  assign r = ue_pkg::data_t'((sm ? m : dx) + (sm ? y : x));
  ue_bd_delay #(.DELAY(DELAY), .TWO_PHASE(TWO_PHASE)) u_delay (.clk, .rst_n, .req, .ack, .fire(unused_fire));
endmodule
