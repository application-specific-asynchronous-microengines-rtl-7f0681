// Bundled-data matched delay of a datapath unit.
//
// A datapath unit signals completion by an acknowledge that follows its
// request through a delay matched to the unit's worst-case logic delay. Here
// the design is emulated on a free-running clock `clk`.
//
// Four-phase (TWO_PHASE = 0): `ack` rises DELAY clock cycles after `req`
// rises and falls one cycle after `req` falls (return to zero, no work).
// Two-phase (TWO_PHASE = 1): every transition of `req` is a request; `ack`
// takes the new level of `req` DELAY cycles later, so a unit is idle when
// req == ack.
// `fire` is high in the single cycle at whose end `ack` completes a request;
// units that own registers latch their result on that edge, so the data is
// valid when the acknowledge is seen. Both protocols are the document's; the
// delay values and the counter form are this design's choice.
module ue_bd_delay #(
  parameter int unsigned DELAY     = 2,    // cycles from request to acknowledge, >= 1
  parameter bit          TWO_PHASE = 1'b0  // transition signalling
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  output logic ack,
  output logic fire
);

  logic [$clog2(DELAY+1)-1:0] cnt;
  logic pending;   // a request is waiting for its acknowledge

  assign pending = TWO_PHASE ? (req != ack) : (req && !ack);
  assign fire    = pending && (cnt == ($bits(cnt))'(DELAY - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack <= 1'b0;
      cnt <= '0;
    end else if (fire) begin
      ack <= req;
      cnt <= '0;
    end else if (pending) begin
      cnt <= cnt + 1'b1;
    end else if (!TWO_PHASE && !req) begin
      ack <= 1'b0;
      cnt <= '0;
    end
  end

  // Handshake rule: a request is held until it is acknowledged.
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    (pending && !fire) |=> (req == $past(req)));

endmodule
