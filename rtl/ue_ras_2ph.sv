// Request/acknowledge/sequence (RAS) block for the two-phase protocol.
//
// With transition signalling every event (either edge) on a request is a
// request, so the block must remember levels rather than test them:
//   sequence gate  a C-element over the global request and each selected
//                  sequence request: its output takes the level of `req` once
//                  every sequence request whose ss bit is set has reached that
//                  level too, and holds otherwise (keeper flop). Unselected
//                  sequence requests are bypassed.
//   ss multiplexer with no ss bit set the global request is passed on as is
//                  (parallel mode), otherwise the sequence gate's output.
//   SELECT element routes each event at the multiplexer output either to
//                  the datapath unit (`dpu_req` toggles) when se is 1, or to
//                  the bypass path when se is 0.
//   XOR            the acknowledge toggles on every event of the unit's
//                  acknowledge or of the bypass path, so all acknowledges
//                  stay in phase with the global request.
// `ack` doubles as the sequence request to later RAS blocks. Events are
// passed on in the clock cycle they arrive; the SELECT and keeper states
// update at the clock edge. Structure (C-element gate, ss mux, SELECT, XOR)
// follows the document; the clocked keeper and SELECT state are this
// design's choice.
module ue_ras_2ph #(
  parameter int unsigned N_SEQ = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,      // global request (transition signalling)
  input  logic             se,       // set-execute
  input  logic [N_SEQ-1:0] ss,       // set-sequence bits
  input  logic [N_SEQ-1:0] sreq,     // sequence requests of other RAS blocks
  output logic             dpu_req,  // request to the datapath unit
  input  logic             dpu_ack,  // acknowledge from the datapath unit
  output logic             ack       // acknowledge to the ECU and later RAS blocks
);

  logic seq_q, seq_c;          // sequence gate (C-element) state and output
  logic m;                     // ss multiplexer output
  logic m_q;                   // SELECT: last level of m routed
  logic dpu_req_q, byp_q;      // SELECT outputs (levels)
  logic event_m, byp;

  always_comb begin
    seq_c = seq_q;
    if ( req && &(sreq  | ~ss)) seq_c = 1'b1;
    if (!req && &(~sreq | ~ss)) seq_c = 1'b0;
  end

  assign m       = (|ss) ? seq_c : req;
  assign event_m = (m != m_q);
  assign dpu_req = dpu_req_q ^ (event_m &&  se);
  assign byp     = byp_q     ^ (event_m && !se);
  assign ack     = dpu_ack ^ byp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seq_q     <= 1'b0;
      m_q       <= 1'b0;
      dpu_req_q <= 1'b0;
      byp_q     <= 1'b0;
    end else begin
      seq_q     <= seq_c;
      m_q       <= m;
      dpu_req_q <= dpu_req;
      byp_q     <= byp;
    end
  end

  // No new event may reach the unit before it has acknowledged the last one.
  a_unit_idle : assert property (@(posedge clk) disable iff (!rst_n)
    (event_m && se) |-> (dpu_req_q == dpu_ack));

endmodule
