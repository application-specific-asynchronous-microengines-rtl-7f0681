// Execution control unit for the two-phase protocol.
//
// The same join as the four-phase ECU with transition signalling: a cycle is
// complete when every acknowledge (memory fetch and the RAS blocks that end a
// chain) has reached the level of the global request `req`; the next cycle is
// then started by toggling `req`. Because every RAS block always acknowledges
// (bypassing units that do not execute), all acknowledges stay in phase.
// The environment handshake is two-phase too: a toggle of `ext_req` starts a
// run, and when a cycle completes with the done bit of the executed word set
// the ECU toggles `ext_ack` instead of starting another cycle (the role of the
// document's SELECT element on the done signal).
// Emulation: a clocked machine; `req` toggles one clock after the join is
// complete. The event-driven behaviour follows the document; the clocked
// form is this design's choice.
module ue_ecu_2ph #(
  parameter int unsigned N_ACK = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ext_req,  // toggle: start a run
  output logic             ext_ack,  // toggle: run finished
  input  logic [N_ACK-1:0] acks,
  input  logic             done,     // done bit of the executed word
  output logic             req       // global request (transition signalling)
);

  logic running, joined;

  assign joined = (acks == {N_ACK{req}});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      req     <= 1'b0;
      ext_ack <= 1'b0;
    end else if (!running) begin
      if (ext_req != ext_ack && joined) begin
        req     <= ~req;
        running <= 1'b1;
      end
    end else if (joined) begin
      if (done) begin
        ext_ack <= ext_req;
        running <= 1'b0;
      end else begin
        req <= ~req;
      end
    end
  end

  // The environment makes no new request before the run is acknowledged.
  a_ext_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    running |-> (ext_req != ext_ack));

endmodule
