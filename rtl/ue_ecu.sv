// Execution control unit, four-phase.
//
// Generates the global request `req`. Quiescent after reset; a request from
// the environment (`ext_req`) raises req. req falls once every acknowledge in
// `acks` (the memory's fetch acknowledge and the RAS acknowledges) is high,
// and once they have all returned to zero a new cycle starts unless the
// latched microinstruction had its done bit set: then `ext_ack` is raised to
// the environment instead, and lowered after `ext_req` falls. Because every
// RAS always acknowledges, a plain "all high / all low" join suffices, which
// is what the document's burst-mode machine does; here it is written as a
// clocked state machine. The done/not-done choice stands in for the
// document's SELECT element.
module ue_ecu #(
  parameter int unsigned N_ACK = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ext_req,
  output logic             ext_ack,
  input  logic [N_ACK-1:0] acks,
  input  logic             done,
  output logic             req
);

  typedef enum logic [1:0] {IDLE, ACTIVE, RTZ, FINISH} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      req     <= 1'b0;
      ext_ack <= 1'b0;
    end else begin
      unique case (state)
        IDLE:
          if (ext_req && acks == '0) begin
            req   <= 1'b1;
            state <= ACTIVE;
          end
        ACTIVE:
          if (&acks) begin
            req   <= 1'b0;
            state <= RTZ;
          end
        RTZ:
          if (acks == '0) begin
            if (done) begin
              ext_ack <= 1'b1;
              state   <= FINISH;
            end else begin
              req   <= 1'b1;
              state <= ACTIVE;
            end
          end
        FINISH:
          if (!ext_req) begin
            ext_ack <= 1'b0;
            state   <= IDLE;
          end
        default: state <= IDLE;
      endcase
    end
  end

  // The environment holds its request until it is acknowledged.
  a_ext_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    (state == ACTIVE || state == RTZ) |-> ext_req);

endmodule
