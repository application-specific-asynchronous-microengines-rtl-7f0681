// RAS block of the optimized four-phase microengine.
//
// Used when the microinstruction is latched on the falling global request,
// so se and ss are already stable when the request rises. The request path is
// a transmission gate: it is open when the unit executes (`se`) and either
// runs in parallel (no `ss` bit set) or every selected sequence request has
// arrived, and then the global request `req` passes straight to the unit; a
// closed gate leaves `dpu_req` pulled low. The falling request passes through
// the still-open gate, so all units return to zero in parallel. The
// acknowledge logic is a complex gate: ack = dpu_ack OR (NOT se AND req), i.e.
// the unit's acknowledge when it executes and the global request as a bypass
// when it does not, without a glitch when se changes while dpu_ack is low.
// Function follows the document's SEQ/REQ and ACK gates; the multi-input
// sequence combination is the AND over selected sequence requests.
module ue_ras_opt4 #(
  parameter int unsigned N_SEQ = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             se,
  input  logic [N_SEQ-1:0] ss,
  input  logic [N_SEQ-1:0] sreq,
  output logic             dpu_req,
  input  logic             dpu_ack,
  output logic             ack
);

  logic gate_open;

  assign gate_open = se && ((ss == '0) || (&(sreq | ~ss)));
  assign dpu_req   = req && gate_open;
  assign ack       = dpu_ack || (!se && req);

  // Control signals must not change while the unit's request is high.
  a_se_stable : assert property (@(posedge clk) disable iff (!rst_n)
    (dpu_req && $past(dpu_req)) |-> $stable(se));

endmodule
