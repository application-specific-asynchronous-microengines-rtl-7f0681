// Unit test of the execution control unit for decoupled execution with three
// acknowledge inputs. Responders in the testbench follow the global request
// after random delays when their se bit is set and stay low otherwise; a
// decoupled responder (unit 2) acknowledges only much later. Checks, on
// every cycle, that req falls only when each input is high, not executing or
// decoupled, and rises only when each is low or decoupled; that a run
// completes while unit 2 is decoupled and silent, and while unit 1 does not
// execute; and that once unit 2's sd bit is cleared the ECU waits for it.
module tb_ue_ecu_dec;
  localparam int N = 3;
  logic clk = 0, rst_n = 0, ext_req = 0, ext_ack, done, req;
  logic [N-1:0] acks = '0, se = '1, sd = '0;
  int checks = 0, failures = 0, ncyc = 0, target = 1;
  int cnt [N];
  int late = 0;
  bit u2_enable = 1'b1;
  logic req_q = 0;
  logic [N-1:0] acks_q = '0, se_q = '1, sd_q = '0;
  always #5 clk = ~clk;
  ue_ecu_dec #(.N_ACK(N)) dut (.*);
  assign done = (ncyc >= target);

  always @(posedge clk) begin
    for (int i = 0; i < 2; i++) begin
      if (acks[i] != (req && se[i])) begin
        if (cnt[i] == 0) begin acks[i] <= req && se[i]; cnt[i] <= int'($urandom_range(0, 3)); end
        else cnt[i] <= cnt[i] - 1;
      end
    end
    if (u2_enable && acks[2] != (req && se[2])) begin
      if (cnt[2] == 0) begin acks[2] <= req && se[2]; cnt[2] <= late; end
      else cnt[2] <= cnt[2] - 1;
    end
  end

  always @(posedge clk) begin
    req_q <= req; acks_q <= acks; se_q <= se; sd_q <= sd;
    if (ncyc > 0 && !req && req_q) begin
      checks++;
      if ((acks_q | ~se_q | sd_q) != '1) begin failures++; $display("FAIL req fell early"); end
    end
    if (rst_n && req && !req_q) begin
      ncyc <= ncyc + 1;
      checks++;
      if ((~acks_q | sd_q) != '1) begin failures++; $display("FAIL req rose early"); end
    end
  end

  task automatic do_run(int k, int limit);
    int t = 0;
    target = ncyc + k;
    @(posedge clk); ext_req <= 1;
    while (!ext_ack && t < limit) begin @(posedge clk); t++; end
    checks++;
    if (!ext_ack) begin
      failures++; $display("FAIL run did not complete");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
    end
    ext_req <= 0;
    while (ext_ack) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) cnt[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // all execute, none decoupled
    for (int r = 0; r < 4; r++) do_run(r + 1, 200);
    // unit 1 not executing
    se = 3'b101; do_run(4, 200);
    // unit 2 decoupled and silent: run must finish without it
    se = 3'b111; sd = 3'b100; u2_enable = 1'b0;
    do_run(5, 200);
    checks++; if (acks[2]) begin failures++; $display("FAIL unit 2 should be silent"); end
    // resynchronise: sd cleared, unit 2 answers after 40 cycles
    sd = 3'b000; u2_enable = 1'b1; late = 40;
    begin
      longint t0, t1;
      t0 = $time;
      do_run(1, 400);
      t1 = $time;
      checks++;
      if ((t1 - t0) < 400) begin failures++; $display("FAIL ECU did not wait for resynchronised unit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
