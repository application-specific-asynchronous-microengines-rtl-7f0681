// ALU1: adder/subtractor of the y' thread.
//
// `op`=0 computes Y + MUL1 (first half of y', stored in T); `op`=1 computes
// U - MUL1 (new u). The op bit also drives the operand multiplexer (Y or U),
// since the unit has no separate set-mux field. Combinational; `ack` follows
// `req` after DELAY clock cycles.
// TWO_PHASE selects a transition-signalling handshake (see ue_bd_delay).
module ue_alu1 #(
  parameter int unsigned DELAY     = 2,
  parameter bit          TWO_PHASE = 1'b0   // transition-signalling handshake
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  output logic          ack,
  input  logic          op,
  input  ue_pkg::data_t m,   // MUL1 product
  input  ue_pkg::data_t y,
  input  ue_pkg::data_t u,
  output ue_pkg::data_t r
);
  logic unused_fire;
  assign r = op ? ue_pkg::data_t'(u - m) : ue_pkg::data_t'(y + m);
  ue_bd_delay #(.DELAY(DELAY), .TWO_PHASE(TWO_PHASE)) u_delay (.clk, .rst_n, .req, .ack, .fire(unused_fire));
endmodule
