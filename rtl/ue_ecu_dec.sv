// Execution control unit supporting decoupled execution (four-phase).
//
// Like ue_ecu it raises the global request `req`, waits for the
// acknowledges to rise, lowers req, waits for them to fall, and then either
// starts the next cycle or, when the executed microinstruction had its done
// bit set, acknowledges the environment. The join is programmable per
// acknowledge input i:
//   req falls once every ack[i] is high, or se[i] is low (unit not executing),
//       or sd[i] is high (unit decoupled);
//   req rises once every ack[i] is low, or sd[i] is high.
// A unit that does not execute keeps its acknowledge low, so it never blocks
// the second join. Acknowledges are therefore allowed out of phase, and a
// decoupled unit's acknowledge is ignored until the microprogram lowers its
// sd bit, after which the ECU waits for it. The memory's fetch acknowledge
// must be wired with se=1 and sd=0. Written as a clocked state machine; the
// joins are the document's transistor stacks with se and sd bypasses.
module ue_ecu_dec #(
  parameter int unsigned N_ACK = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ext_req,
  output logic             ext_ack,
  input  logic [N_ACK-1:0] acks,
  input  logic [N_ACK-1:0] se,
  input  logic [N_ACK-1:0] sd,
  input  logic             done,
  output logic             req
);

  typedef enum logic [1:0] {IDLE, ACTIVE, RTZ, FINISH} state_t;
  state_t state;
  logic   all_up, all_down;

  assign all_up   = &(acks | ~se | sd);
  assign all_down = &(~acks | sd);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      req     <= 1'b0;
      ext_ack <= 1'b0;
    end else begin
      unique case (state)
        IDLE:
          if (ext_req && all_down) begin
            req   <= 1'b1;
            state <= ACTIVE;
          end
        ACTIVE:
          if (all_up) begin
            req   <= 1'b0;
            state <= RTZ;
          end
        RTZ:
          if (all_down) begin
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

  a_ext_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    (state == ACTIVE || state == RTZ) |-> ext_req);

endmodule
