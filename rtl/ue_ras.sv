// RAS block (request / acknowledge / sequence) for the four-phase protocol.
//
// Each datapath unit has one. Sequence logic: a complex gate that goes high
// when the global request `req` is high and every sequence request `sreq[i]`
// whose set-sequence bit `ss[i]` is set is high; bits with ss[i] low are
// bypassed. It is reset by req falling (parallel return to zero) and a keeper
// holds it high in between. A multiplexer chooses the sequence logic output
// when any ss bit is set (chained mode) and the global request otherwise
// (parallel mode). A blocker AND gate passes the chosen request to the unit
// only when set-execute `se` is high. When `se` is low a bypass multiplexer
// returns the global request as the acknowledge, so every RAS always
// acknowledges and all acknowledges stay in phase. `ack` is both the
// acknowledge to the execution control unit and the sequence request to the
// RAS blocks chained after this one.
//
// The keeper is emulated as a flip-flop on `clk`; everything else is
// combinational, so a chained request passes through a bypassed unit in the
// same cycle. Follows the document's four-phase RAS; the clocked keeper is
// this design's choice.
module ue_ras #(
  parameter int unsigned N_SEQ = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,      // global request (delayed to the datapath)
  input  logic             se,       // set-execute
  input  logic [N_SEQ-1:0] ss,       // set-sequence, one per sequence request
  input  logic [N_SEQ-1:0] sreq,     // sequence requests of earlier RAS blocks
  output logic             dpu_req,  // request to the datapath unit
  input  logic             dpu_ack,  // acknowledge from the datapath unit
  output logic             ack       // acknowledge / sequence request out
);

  logic seq_all;    // every selected sequence request has arrived
  logic seq_hold;   // keeper state of the sequence complex gate
  logic seq_out;    // sequence logic output
  logic chosen;     // output of the sequence-control multiplexer

  assign seq_all = &(sreq | ~ss);
  assign seq_out = req && (seq_all || seq_hold);
  assign chosen  = (|ss) ? seq_out : req;
  assign dpu_req = se && chosen;
  assign ack     = se ? dpu_ack : req;

  always_ff @(posedge clk) begin
    if (!rst_n)    seq_hold <= 1'b0;
    else if (!req) seq_hold <= 1'b0;
    else if (seq_out) seq_hold <= 1'b1;
  end

  // The unit acknowledges only a request it was given.
  a_ack_after_req : assert property (@(posedge clk) disable iff (!rst_n)
    ($rose(dpu_ack) && se) |-> $past(dpu_req));

endmodule
