// CMP: comparator for the loop condition X < A.
//
// On completion of a request the signed result of X < Aport is stored in a
// flag, `lt`, which is the condition input of the branch detection unit and
// stays valid until the unit executes again. `ack` rises DELAY clock cycles
// after `req`. The stored flag is this design's choice; it keeps the
// condition stable until the next global request samples it.
// TWO_PHASE selects a transition-signalling handshake (see ue_bd_delay).
module ue_cmp #(
  parameter int unsigned DELAY     = 1,
  parameter bit          TWO_PHASE = 1'b0   // transition-signalling handshake
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  output logic          ack,
  input  ue_pkg::data_t x,
  input  ue_pkg::data_t a,
  output logic          lt
);
  logic fire;
  ue_bd_delay #(.DELAY(DELAY), .TWO_PHASE(TWO_PHASE)) u_delay (.clk, .rst_n, .req, .ack, .fire);

  always_ff @(posedge clk) begin
    if (!rst_n)    lt <= 1'b0;
    else if (fire) lt <= (x < a);
  end
endmodule
