// RAS block supporting decoupled execution.
//
// With decoupling the execution control unit ignores units that are not set
// to execute, so this RAS has no acknowledge bypass: `ack` is the unit's own
// acknowledge. The request to the unit is held by a keeper. It is set when the
// unit executes (`se`), every selected sequence request has arrived (ss/sreq
// as in the other RAS blocks) and either the global request is high or the
// unit is decoupled (`sd`): the sd path lets a sequence request travel along a
// decoupled chain whatever the global request is doing. It is reset only when
// both the global request and `sd` are low, so a decoupled unit keeps its
// request, and is not restarted by later global requests, until the
// microprogram clears sd to resynchronise with it.
//
// The keeper is a flip-flop on `clk`; set and reset act in the same cycle as
// their inputs. Behaviour follows the document's decoupled RAS gate.
module ue_ras_dec #(
  parameter int unsigned N_SEQ = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             se,
  input  logic             sd,       // set-decoupled
  input  logic [N_SEQ-1:0] ss,
  input  logic [N_SEQ-1:0] sreq,
  output logic             dpu_req,
  input  logic             dpu_ack,
  output logic             ack
);

  logic set_c, rst_c, held;

  assign set_c   = se && (req || sd) && (&(sreq | ~ss));
  assign rst_c   = !sd && !req;
  assign dpu_req = !rst_c && (held || set_c);
  assign ack     = dpu_ack;

  always_ff @(posedge clk) begin
    if (!rst_n) held <= 1'b0;
    else        held <= dpu_req;
  end

endmodule
