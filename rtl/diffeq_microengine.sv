// Asynchronous microengine for the differential-equation solver.
//
// Solves y'' + 3xy' + 3y = 0 by forward Euler: while (x < a) { x += dx;
// u -= 3dx*(u*x + y); y += u*dx }, with x, y, u, dx, a and 3*dx on input
// ports and y on `yout_port`. Control is a microprogram of four 24-bit words
// (ue_pkg::DIFFEQ_PROGRAM): word 1 loads X, Y, U and tests x < a; words 2 and
// 3 form the loop body; word 4 reports completion and jumps back to word 1.
//
// Structure:
//   ECU        joins the acknowledges of the memory and of the RAS blocks of
//              XY, TU and CMP and issues the global request `req`.
//   memory     prefetches the next word during each cycle and latches it at
//              the next global request (ue_memory).
//   next addr  incremented address or next-addr, chosen by sel-addr.
//   BDU        tests the CMP flag against the predicted branch and clears a
//              wrongly prefetched word (one extra, empty cycle).
//   RAS + DPU  seven datapath units, each behind a RAS block that runs it in
//              parallel with the global request or chained after other
//              units' acknowledges, or bypasses it:
//                MUL2 (parallel) -> ALU2 (ss) -> XY (ss1: ALU2, ss2: ALU1) -> CMP
//                MUL1 (parallel) -> ALU1       -> TU
//              ALU1, TU and CMP are always chained, so their se bit doubles
//              as their ss bit; a bypassed predecessor passes the global
//              request straight on, which makes them start at once.
//
// Only XY, TU and CMP report to the ECU: MUL1, MUL2, ALU1 and ALU2 are never
// last in a chain. Handshakes are four-phase throughout.
//
// ARCH selects the control structure (see ue_pkg::arch_e): ARCH_BASIC latches
// each microinstruction when the global request rises and uses always-
// acknowledging RAS blocks; ARCH_OPT4 latches it when the request falls,
// overlapping the fetch with the return to zero (after reset the first cycle
// only fetches word 1); ARCH_DECOUPLED adds the ECU and RAS structures for
// decoupled execution, in which every unit reports to the ECU and
// non-executing units are masked by their se bits; ARCH_TWO_PHASE is the
// basic structure with transition signalling throughout (two-phase ECU, RAS
// with SELECT element and XOR bypass, a microinstruction latched at every
// request transition, and two-phase ext_req/ext_ack).
//
// Interface: four-phase `ext_req`/`ext_ack` with the environment; ports are
// read while ext_req is high and yout_port is valid when ext_ack rises.
// `prog_*` rewrites microprogram words while the engine is idle.
//
// Timing: the self-timed circuit is emulated on a free-running clock `clk`;
// each datapath unit's completion delay is a parameter in clock cycles
// (matched bundled-data delays). Synchronous active-low reset `rst_n`. The
// architecture, field layout and program follow the document; data widths,
// the fixed-point format and all delays are this design's choices.
module diffeq_microengine #(
  parameter ue_pkg::arch_e ARCH      = ue_pkg::ARCH_BASIC,
  parameter int unsigned MUL_DELAY   = 4,
  parameter int unsigned ALU_DELAY   = 2,
  parameter int unsigned REG_DELAY   = 1,
  parameter int unsigned CMP_DELAY   = 1,
  parameter int unsigned FETCH_DELAY = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ext_req,
  output logic                  ext_ack,
  input  ue_pkg::data_t         x_port,
  input  ue_pkg::data_t         y_port,
  input  ue_pkg::data_t         u_port,
  input  ue_pkg::data_t         dx_port,
  input  ue_pkg::data_t         dx3_port,   // 3*dx
  input  ue_pkg::data_t         a_port,
  output ue_pkg::data_t         yout_port,
  input  logic                  prog_we,
  input  ue_pkg::addr_t         prog_addr,
  input  ue_pkg::uinstr_t       prog_data
);
  import ue_pkg::*;

  logic     req, req_dp, mem_ack, clear, unused_branch;
  uinstr_t  ui;
  addr_t    curr_addr;

  // RAS outputs (acknowledge / sequence request) and datapath handshakes.
  logic ack_mul1, ack_mul2, ack_alu1, ack_alu2, ack_xy, ack_tu, ack_cmp;
  logic rq_mul1, rq_mul2, rq_alu1, rq_alu2, rq_xy, rq_tu, rq_cmp;
  logic dk_mul1, dk_mul2, dk_alu1, dk_alu2, dk_xy, dk_tu, dk_cmp;

  data_t p_mul1, p_mul2, r_alu1, r_alu2, x, y, t, u;
  logic  lt;

  // ---------------- control ----------------
  localparam bit LATCH_FALL = (ARCH == ARCH_OPT4) || (ARCH == ARCH_DECOUPLED);
  localparam bit DECOUPLED  = (ARCH == ARCH_DECOUPLED);
  localparam bit TWO_PHASE  = (ARCH == ARCH_TWO_PHASE);

  logic done_exec;      // done bit of the executing word, from the memory
  logic unused_done;
  assign unused_done = ui.done;

  if (DECOUPLED) begin : g_ecu_dec
    // Every unit reports; units that do not execute are bypassed by their se
    // bit. The solver's program has no set-decoupled field, so sd is 0.
    ue_ecu_dec #(.N_ACK(8)) u_ecu (
      .clk, .rst_n, .ext_req, .ext_ack,
      .acks({mem_ack, ack_mul2, ack_mul1, ack_alu2, ack_alu1, ack_xy, ack_tu, ack_cmp}),
      .se({1'b1, ui.mul2_se, ui.mul1_se, ui.alu2_se, ui.alu1_se, ui.xy_se, ui.tu_se, ui.cmp_se}),
      .sd('0), .done(done_exec), .req
    );
  end else if (TWO_PHASE) begin : g_ecu_2ph
    ue_ecu_2ph #(.N_ACK(4)) u_ecu (
      .clk, .rst_n, .ext_req, .ext_ack,
      .acks({mem_ack, ack_xy, ack_tu, ack_cmp}), .done(done_exec), .req
    );
  end else begin : g_ecu
    ue_ecu #(.N_ACK(4)) u_ecu (
      .clk, .rst_n, .ext_req, .ext_ack,
      .acks({mem_ack, ack_xy, ack_tu, ack_cmp}), .done(done_exec), .req
    );
  end

  ue_memory #(.LATCH_FALL(LATCH_FALL), .TWO_PHASE(TWO_PHASE), .FETCH_DELAY(FETCH_DELAY)) u_mem (
    .clk, .rst_n, .req, .curr_addr, .clear, .uinstr(ui), .ack(mem_ack), .req_dp,
    .done_exec, .prog_we, .prog_addr, .prog_data
  );

  ue_next_addr #(.AW(ADDR_W), .LATCH_FALL(LATCH_FALL), .TWO_PHASE(TWO_PHASE)) u_nxt (
    .clk, .rst_n, .req, .clear, .sel_addr(ui.sel_addr), .next_addr(ui.next_addr),
    .curr_addr
  );

  ue_bdu #(.N_COND(1)) u_bdu (
    .eval(ui.bdu), .cond(lt), .bra_pred(ui.bra_pred), .branch(unused_branch), .clear
  );

  // ---------------- RAS blocks ----------------
  // ALU1, TU and CMP use their se bit as ss. Without always-acknowledge
  // (decoupled variant) a unit that does not execute gives no sequence
  // request, so there they wait only for a predecessor that executes.
  logic alu1_ss, tu_ss, cmp_ss;
  assign alu1_ss = ui.alu1_se && (!DECOUPLED || ui.mul1_se);
  assign tu_ss   = ui.tu_se   && (!DECOUPLED || ui.alu1_se);
  assign cmp_ss  = ui.cmp_se  && (!DECOUPLED || ui.xy_se);

  ue_ras_sel #(.ARCH(ARCH), .N_SEQ(1)) u_ras_mul2 (.clk, .rst_n, .req(req_dp),
    .se(ui.mul2_se), .sd(1'b0), .ss(1'b0), .sreq(1'b0),
    .dpu_req(rq_mul2), .dpu_ack(dk_mul2), .ack(ack_mul2));
  ue_ras_sel #(.ARCH(ARCH), .N_SEQ(1)) u_ras_mul1 (.clk, .rst_n, .req(req_dp),
    .se(ui.mul1_se), .sd(1'b0), .ss(1'b0), .sreq(1'b0),
    .dpu_req(rq_mul1), .dpu_ack(dk_mul1), .ack(ack_mul1));
  ue_ras_sel #(.ARCH(ARCH), .N_SEQ(1)) u_ras_alu2 (.clk, .rst_n, .req(req_dp),
    .se(ui.alu2_se), .sd(1'b0), .ss(ui.alu2_ss), .sreq(ack_mul2),
    .dpu_req(rq_alu2), .dpu_ack(dk_alu2), .ack(ack_alu2));
  ue_ras_sel #(.ARCH(ARCH), .N_SEQ(1)) u_ras_alu1 (.clk, .rst_n, .req(req_dp),
    .se(ui.alu1_se), .sd(1'b0), .ss(alu1_ss), .sreq(ack_mul1),
    .dpu_req(rq_alu1), .dpu_ack(dk_alu1), .ack(ack_alu1));
  ue_ras_sel #(.ARCH(ARCH), .N_SEQ(2)) u_ras_xy (.clk, .rst_n, .req(req_dp),
    .se(ui.xy_se), .sd(1'b0), .ss({ui.xy_ss2, ui.xy_ss1}), .sreq({ack_alu1, ack_alu2}),
    .dpu_req(rq_xy), .dpu_ack(dk_xy), .ack(ack_xy));
  ue_ras_sel #(.ARCH(ARCH), .N_SEQ(1)) u_ras_tu (.clk, .rst_n, .req(req_dp),
    .se(ui.tu_se), .sd(1'b0), .ss(tu_ss), .sreq(ack_alu1),
    .dpu_req(rq_tu), .dpu_ack(dk_tu), .ack(ack_tu));
  ue_ras_sel #(.ARCH(ARCH), .N_SEQ(1)) u_ras_cmp (.clk, .rst_n, .req(req_dp),
    .se(ui.cmp_se), .sd(1'b0), .ss(cmp_ss), .sreq(ack_xy),
    .dpu_req(rq_cmp), .dpu_ack(dk_cmp), .ack(ack_cmp));

  // ---------------- datapath units ----------------
  ue_mul2 #(.DELAY(MUL_DELAY), .TWO_PHASE(TWO_PHASE)) u_mul2 (.clk, .rst_n, .req(rq_mul2), .ack(dk_mul2),
    .u, .dx(dx_port), .p(p_mul2));
  ue_mul1 #(.DELAY(MUL_DELAY), .TWO_PHASE(TWO_PHASE)) u_mul1 (.clk, .rst_n, .req(rq_mul1), .ack(dk_mul1),
    .sm(ui.mul1_sm), .x, .dx3(dx3_port), .u, .t, .p(p_mul1));
  ue_alu2 #(.DELAY(ALU_DELAY), .TWO_PHASE(TWO_PHASE)) u_alu2 (.clk, .rst_n, .req(rq_alu2), .ack(dk_alu2),
    .sm(ui.alu2_sm), .dx(dx_port), .m(p_mul2), .x, .y, .r(r_alu2));
  ue_alu1 #(.DELAY(ALU_DELAY), .TWO_PHASE(TWO_PHASE)) u_alu1 (.clk, .rst_n, .req(rq_alu1), .ack(dk_alu1),
    .op(ui.alu1_op), .m(p_mul1), .y, .u, .r(r_alu1));
  ue_xy #(.DELAY(REG_DELAY), .TWO_PHASE(TWO_PHASE)) u_xy (.clk, .rst_n, .req(rq_xy), .ack(dk_xy),
    .sm(ui.xy_sm), .enx(ui.xy_enx), .eny(ui.xy_eny), .x_port, .y_port,
    .alu2(r_alu2), .x, .y);
  ue_tu #(.DELAY(REG_DELAY), .TWO_PHASE(TWO_PHASE)) u_tu (.clk, .rst_n, .req(rq_tu), .ack(dk_tu),
    .sm(ui.tu_sm), .en(ui.tu_en), .u_port, .alu1(r_alu1), .t, .u);
  ue_cmp #(.DELAY(CMP_DELAY), .TWO_PHASE(TWO_PHASE)) u_cmp (.clk, .rst_n, .req(rq_cmp), .ack(dk_cmp),
    .x, .a(a_port), .lt);

  assign yout_port = y;

endmodule
