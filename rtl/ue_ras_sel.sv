// RAS block of the selected control architecture.
//
// Instantiates the RAS variant that matches ARCH: the basic four-phase RAS
// (ue_ras), the optimized four-phase RAS (ue_ras_opt4), the RAS with
// decoupled execution (ue_ras_dec) or the two-phase RAS (ue_ras_2ph). The
// set-decoupled input `sd` is used only by the decoupled variant. Same ports
// and timing as the chosen variant.
module ue_ras_sel #(
  parameter ue_pkg::arch_e ARCH  = ue_pkg::ARCH_BASIC,
  parameter int unsigned   N_SEQ = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             se,
  input  logic             sd,
  input  logic [N_SEQ-1:0] ss,
  input  logic [N_SEQ-1:0] sreq,
  output logic             dpu_req,
  input  logic             dpu_ack,
  output logic             ack
);

  if (ARCH == ue_pkg::ARCH_DECOUPLED) begin : g_dec
    ue_ras_dec #(.N_SEQ(N_SEQ)) u_ras (.clk, .rst_n, .req, .se, .sd, .ss, .sreq,
      .dpu_req, .dpu_ack, .ack);
  end else if (ARCH == ue_pkg::ARCH_TWO_PHASE) begin : g_2ph
    logic unused_sd;
    assign unused_sd = sd;
    ue_ras_2ph #(.N_SEQ(N_SEQ)) u_ras (.clk, .rst_n, .req, .se, .ss, .sreq,
      .dpu_req, .dpu_ack, .ack);
  end else if (ARCH == ue_pkg::ARCH_OPT4) begin : g_opt4
    logic unused_sd;
    assign unused_sd = sd;
    ue_ras_opt4 #(.N_SEQ(N_SEQ)) u_ras (.clk, .rst_n, .req, .se, .ss, .sreq,
      .dpu_req, .dpu_ack, .ack);
  end else begin : g_basic
    logic unused_sd;
    assign unused_sd = sd;
    ue_ras #(.N_SEQ(N_SEQ)) u_ras (.clk, .rst_n, .req, .se, .ss, .sreq,
      .dpu_req, .dpu_ack, .ack);
  end

endmodule
