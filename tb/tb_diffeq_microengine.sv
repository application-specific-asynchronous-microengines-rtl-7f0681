// End-to-end test of the differential-equation microengine at its default
// parameters.
//
// Runs the solver for a set of fixed and random starting values and compares
// yout with a reference Euler loop computed here in plain integer fixed-point
// arithmetic. For each run it also checks the number of global request cycles:
// a correctly predicted branch costs nothing and a misprediction one empty
// cycle, so the default program takes 2*iterations + 3 cycles. It then
// rewrites word 3 of the program to predict "loop exit" (bra-pred 0, fall
// through to word 4), which must give the same answer in 3*iterations + 1
// cycles, and restores the original program. Mechanism counters (parallel
// start, chained start, cross-thread join, correct prediction, misprediction
// with cleared cycle, bypassed unit, done, reprogramming) must each be seen.
module tb_diffeq_microengine;
  import ue_pkg::*;

  localparam int F = 8;  // fraction bits of the reference arithmetic

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ext_req = 1'b0;
  logic ext_ack;
  data_t x_port = '0, y_port = '0, u_port = '0, dx_port = '0, dx3_port = '0, a_port = '0;
  data_t yout_port;
  logic prog_we = 1'b0;
  addr_t prog_addr = '0;
  uinstr_t prog_data = '0;

  int checks = 0, failures = 0;
  int cycles_run;
  int n_parallel = 0, n_chained = 0, n_cross = 0, n_pred_ok = 0, n_mispred = 0;
  int n_bypass = 0, n_done = 0, n_reprog = 0;

  always #5 clk = ~clk;

  diffeq_microengine dut (.*);

  // ---------------- mechanism monitors ----------------
  logic req_q, rq_xy_q, rq_any_q;
  logic [6:0] rq_now, rq_prev;
  assign rq_now = {dut.rq_mul1, dut.rq_mul2, dut.rq_alu1, dut.rq_alu2,
                   dut.rq_xy, dut.rq_tu, dut.rq_cmp};
  always @(posedge clk) begin
    req_q   <= dut.req;
    rq_prev <= rq_now;
    if (dut.req && !req_q) cycles_run <= cycles_run + 1;
    if (dut.req && !dut.req_dp) begin
      if (dut.clear) n_mispred++;
      else if (dut.ui.bdu) n_pred_ok++;
    end
    for (int i = 0; i < 7; i++) if (rq_now[i] && !rq_prev[i]) begin
      if (dut.req_dp && !$past(dut.req_dp)) n_parallel++;
      else n_chained++;
    end
    if (dut.rq_xy && !rq_prev[2] && dut.ui.xy_ss1 && dut.ui.xy_ss2) n_cross++;
    if (dut.req_dp && !dut.ui.xy_se && dut.ack_xy) n_bypass++;
    if (prog_we) n_reprog++;
  end

  // ---------------- reference ----------------
  function automatic data_t fmul(data_t a, data_t b);
    int p;
    p = int'(a) * int'(b);
    return data_t'(p >>> F);
  endfunction

  // Returns y; iters gets the number of loop iterations.
  function automatic data_t ref_run(data_t x0, data_t y0, data_t u0, data_t dx,
                                    data_t dx3, data_t a, output int iters);
    data_t x = x0, y = y0, u = u0, t;
    iters = 0;
    while (x < a && iters < 1000) begin
      t = data_t'(fmul(u, x) + y);
      y = data_t'(y + fmul(u, dx));
      u = data_t'(u - fmul(dx3, t));
      x = data_t'(x + dx);
      iters++;
    end
    return y;
  endfunction

  task automatic run(data_t x0, data_t y0, data_t u0, data_t dx, data_t a, bit taken_pred);
    data_t yref;
    int iters, exp_cycles;
    x_port = x0; y_port = y0; u_port = u0; dx_port = dx;
    dx3_port = data_t'(3 * dx); a_port = a;
    yref = ref_run(x0, y0, u0, dx, data_t'(3 * dx), a, iters);
    @(posedge clk);
    cycles_run = 0;
    ext_req = 1'b1;
    wait (ext_ack);
    @(posedge clk);
    n_done++;
    exp_cycles = taken_pred ? 2 * iters + 3 : (iters == 0 ? 3 : 3 * iters + 1);
    checks++;
    if (yout_port !== yref) begin
      failures++;
      $display("FAIL y: x0=%0d y0=%0d u0=%0d dx=%0d a=%0d got %0d expected %0d",
               x0, y0, u0, dx, a, yout_port, yref);
    end
    checks++;
    if (cycles_run != exp_cycles) begin
      failures++;
      $display("FAIL cycles: iters=%0d got %0d expected %0d", iters, cycles_run, exp_cycles);
    end
    ext_req = 1'b0;
    wait (!ext_ack);
    @(posedge clk);
  endtask

  task automatic write_word(addr_t a, uinstr_t w);
    @(posedge clk);
    prog_we <= 1'b1; prog_addr <= a; prog_data <= w;
    @(posedge clk);
    prog_we <= 1'b0;
  endtask

  uinstr_t w3;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // y'' + 3xy' + 3y = 0 from x=0, y=1, u=0, dx=1/16, to a=1
    run(16'sd0, 16'sd256, 16'sd0, 16'sd16, 16'sd256, 1'b1);
    run(16'sd0, 16'sd256, 16'sd128, 16'sd32, 16'sd128, 1'b1);
    run(16'sd300, 16'sd10, 16'sd5, 16'sd16, 16'sd256, 1'b1);   // loop never entered
    run(-16'sd256, -16'sd64, 16'sd64, 16'sd64, 16'sd0, 1'b1);
    for (int k = 0; k < 6; k++)
      run(data_t'($urandom_range(0, 512)) - 16'sd256, data_t'($urandom_range(0, 512)) - 16'sd256,
          data_t'($urandom_range(0, 512)) - 16'sd256, data_t'($urandom_range(8, 64)),
          data_t'($urandom_range(0, 512)) - 16'sd256, 1'b1);
    // word 3 predicting loop exit
    w3 = uinstr_t'(DIFFEQ_PROGRAM[2*UI_W +: UI_W]);
    w3.bra_pred = 1'b0;
    w3.sel_addr = 1'b0;
    write_word(2'd2, w3);
    run(16'sd0, 16'sd256, 16'sd0, 16'sd16, 16'sd128, 1'b0);
    run(16'sd300, 16'sd10, 16'sd5, 16'sd16, 16'sd256, 1'b0);
    write_word(2'd2, uinstr_t'(DIFFEQ_PROGRAM[2*UI_W +: UI_W]));
    run(16'sd0, 16'sd256, 16'sd0, 16'sd16, 16'sd64, 1'b1);

    checks += 8;
    if (n_parallel == 0) begin failures++; $display("FAIL no parallel start"); end
    if (n_chained  == 0) begin failures++; $display("FAIL no chained start"); end
    if (n_cross    == 0) begin failures++; $display("FAIL no cross-thread join"); end
    if (n_pred_ok  == 0) begin failures++; $display("FAIL no correct prediction"); end
    if (n_mispred  == 0) begin failures++; $display("FAIL no misprediction"); end
    if (n_bypass   == 0) begin failures++; $display("FAIL no bypassed unit"); end
    if (n_done     == 0) begin failures++; $display("FAIL no completion"); end
    if (n_reprog   == 0) begin failures++; $display("FAIL no reprogramming"); end
    $display("mechanisms: parallel=%0d chained=%0d cross=%0d pred_ok=%0d mispred=%0d bypass=%0d done=%0d reprog=%0d",
             n_parallel, n_chained, n_cross, n_pred_ok, n_mispred, n_bypass, n_done, n_reprog);
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
