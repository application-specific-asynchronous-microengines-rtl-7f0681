// Runs the differential-equation microengine in its four control
// architectures side by side (basic, optimized four-phase, decoupled-capable,
// two-phase) on the same inputs and checks each against a reference Euler
// loop. The two-phase engine gets a transition-signalled start request and is
// counted in request transitions rather than rising edges. A fifth, basic
// engine with very different unit and fetch delays checks that results and
// cycle counts do not depend on the delays.
// Expected global-request cycles per run: 2*iterations + 3 for all four,
// plus one fetch-only cycle on the first run after reset for the two
// architectures that latch the microinstruction on the falling request.
// Also checks that the decoupled-capable ECU really completes cycles in
// which some units do not execute without their acknowledges (none is
// bypassed by the RAS there), and that the optimized variants show the
// fetch-only start-up cycle, and that the two-phase engine executes cycles on
// falling request transitions and acknowledges skipped units through the XOR
// bypass.
module tb_diffeq_arch;
  import ue_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ext_req = 1'b0;
  logic [4:0] ext_ack;
  logic ext_req2 = 1'b0;   // transition-signalled request of the two-phase engine
  data_t x_port = '0, y_port = '0, u_port = '0, dx_port = '0, dx3_port = '0, a_port = '0;
  data_t yout [5];
  int checks = 0, failures = 0;
  int cyc [5];
  int n_masked = 0, n_startup = 0, n_fall_events = 0, n_xor_bypass = 0;
  logic [4:0] req_q = '0;
  logic ack_mul2_q = 1'b0;
  bit first_run = 1'b1;

  always #5 clk = ~clk;

  diffeq_microengine #(.ARCH(ARCH_BASIC)) u0 (.clk, .rst_n, .ext_req, .ext_ack(ext_ack[0]),
    .x_port, .y_port, .u_port, .dx_port, .dx3_port, .a_port, .yout_port(yout[0]),
    .prog_we(1'b0), .prog_addr('0), .prog_data('0));
  diffeq_microengine #(.ARCH(ARCH_OPT4)) u1 (.clk, .rst_n, .ext_req, .ext_ack(ext_ack[1]),
    .x_port, .y_port, .u_port, .dx_port, .dx3_port, .a_port, .yout_port(yout[1]),
    .prog_we(1'b0), .prog_addr('0), .prog_data('0));
  diffeq_microengine #(.ARCH(ARCH_DECOUPLED)) u2 (.clk, .rst_n, .ext_req, .ext_ack(ext_ack[2]),
    .x_port, .y_port, .u_port, .dx_port, .dx3_port, .a_port, .yout_port(yout[2]),
    .prog_we(1'b0), .prog_addr('0), .prog_data('0));
  diffeq_microengine #(.ARCH(ARCH_TWO_PHASE)) u3 (.clk, .rst_n, .ext_req(ext_req2), .ext_ack(ext_ack[3]),
    .x_port, .y_port, .u_port, .dx_port, .dx3_port, .a_port, .yout_port(yout[3]),
    .prog_we(1'b0), .prog_addr('0), .prog_data('0));

  diffeq_microengine #(.ARCH(ARCH_BASIC), .MUL_DELAY(1), .ALU_DELAY(5), .REG_DELAY(3),
                       .CMP_DELAY(2), .FETCH_DELAY(9)) u4 (.clk, .rst_n, .ext_req,
    .ext_ack(ext_ack[4]), .x_port, .y_port, .u_port, .dx_port, .dx3_port, .a_port,
    .yout_port(yout[4]), .prog_we(1'b0), .prog_addr('0), .prog_data('0));

  always @(posedge clk) begin
    req_q <= {u4.req, u3.req, u2.req, u1.req, u0.req};
    if (u4.req && !req_q[4]) cyc[4]++;
    ack_mul2_q <= u3.ack_mul2;
    if (u3.req != req_q[3]) cyc[3]++;
    if (!u3.req && req_q[3]) n_fall_events++;
    // two-phase: MUL2 skipped, its acknowledge toggles through the bypass
    if (u3.ack_mul2 != ack_mul2_q && !u3.ui.mul2_se) n_xor_bypass++;
    if (u0.req && !req_q[0]) cyc[0]++;
    if (u1.req && !req_q[1]) cyc[1]++;
    if (u2.req && !req_q[2]) cyc[2]++;
    // decoupled-capable ECU drops req while a non-executing unit's ack is low
    if (!u2.req && req_q[2] && (!u2.ui.mul2_se || !u2.ui.mul1_se) && !u2.ack_mul2 && !u2.ack_mul1)
      n_masked++;
    // optimized variants: a cycle in which nothing executes before word 1
    if (u1.req && !req_q[1] && u1.ui == '0) n_startup++;
  end

  function automatic data_t fmul(data_t a, data_t b);
    int p;
    p = int'(a) * int'(b);
    return data_t'(p >>> 8);
  endfunction

  function automatic data_t ref_run(data_t x0, data_t y0, data_t u0_, data_t dx,
                                    data_t a, output int iters);
    data_t x = x0, y = y0, u = u0_, t;
    iters = 0;
    while (x < a && iters < 1000) begin
      t = data_t'(fmul(u, x) + y);
      y = data_t'(y + fmul(u, dx));
      u = data_t'(u - fmul(data_t'(3 * dx), t));
      x = data_t'(x + dx);
      iters++;
    end
    return y;
  endfunction

  task automatic run(data_t x0, data_t y0, data_t u0_, data_t dx, data_t a);
    data_t yref;
    int iters, e;
    x_port = x0; y_port = y0; u_port = u0_; dx_port = dx; dx3_port = data_t'(3 * dx); a_port = a;
    yref = ref_run(x0, y0, u0_, dx, a, iters);
    for (int i = 0; i < 5; i++) cyc[i] = 0;
    @(posedge clk); ext_req = 1'b1; ext_req2 = ~ext_req2;
    wait (ext_ack[2:0] == 3'b111 && ext_ack[4] && ext_ack[3] == ext_req2);
    @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      e = 2 * iters + 3 + ((i == 1 || i == 2) && first_run ? 1 : 0);
      checks += 2;
      if (yout[i] !== yref) begin failures++; $display("FAIL arch %0d y=%0d expected %0d", i, yout[i], yref); end
      if (cyc[i] != e) begin failures++; $display("FAIL arch %0d cycles %0d expected %0d", i, cyc[i], e); end
    end
    first_run = 1'b0;
    ext_req = 1'b0;
    wait (ext_ack[2:0] == 3'b000 && !ext_ack[4]);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run(16'sd0, 16'sd256, 16'sd0, 16'sd16, 16'sd256);
    run(16'sd300, 16'sd10, 16'sd5, 16'sd16, 16'sd256);
    for (int k = 0; k < 8; k++)
      run(data_t'($urandom_range(0, 512)) - 16'sd256, data_t'($urandom_range(0, 512)) - 16'sd256,
          data_t'($urandom_range(0, 512)) - 16'sd256, data_t'($urandom_range(8, 64)),
          data_t'($urandom_range(0, 512)) - 16'sd256);
    checks += 4;
    if (n_fall_events == 0) begin failures++; $display("FAIL no two-phase cycle on a falling transition"); end
    if (n_xor_bypass == 0) begin failures++; $display("FAIL no two-phase bypass acknowledge"); end
    if (n_masked == 0) begin failures++; $display("FAIL no masked acknowledge in decoupled ECU"); end
    if (n_startup == 0) begin failures++; $display("FAIL no fetch-only start-up cycle"); end
    $display("masked=%0d startup=%0d fall_events=%0d xor_bypass=%0d", n_masked, n_startup,
             n_fall_events, n_xor_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
