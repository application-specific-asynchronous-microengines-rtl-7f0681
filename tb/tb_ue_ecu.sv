// Unit test of the execution control unit with three acknowledge inputs.
// Each acknowledge is produced by a responder in the testbench that follows
// the global request up and down after random delays. For each external
// request the testbench raises `done` after K global-request cycles and
// checks: req never rises while an acknowledge is high, req falls only after
// all acknowledges are high, exactly K cycles are run, ext_ack rises only
// after the last cycle has returned to zero, and the engine stays quiet
// without an external request.
module tb_ue_ecu;
  localparam int N = 3;
  logic clk = 0, rst_n = 0, ext_req = 0, ext_ack, done, req;
  logic [N-1:0] acks = '0;
  int checks = 0, failures = 0, ncyc = 0, target = 1;
  int cnt [N];
  always #5 clk = ~clk;
  ue_ecu #(.N_ACK(N)) dut (.*);

  // responders
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (acks[i] != req) begin
        if (cnt[i] == 0) begin acks[i] <= req; cnt[i] <= int'($urandom_range(0, 4)); end
        else cnt[i] <= cnt[i] - 1;
      end
    end
  end

  // protocol monitors
  logic req_q = 0;
  logic [N-1:0] acks_q = '0;
  always @(posedge clk) begin
    req_q <= req; acks_q <= acks;
    if (rst_n && req && !req_q) begin
      ncyc <= ncyc + 1;
      checks++;
      if (acks_q != '0) begin failures++; $display("FAIL req rose with acks high"); end
    end
    if (rst_n && ncyc > 0 && !req && req_q) begin
      checks++;
      if (acks_q != '1) begin failures++; $display("FAIL req fell before all acks"); end
    end
  end
  assign done = (ncyc >= target);

  initial begin
    for (int i = 0; i < N; i++) cnt[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (20) @(posedge clk);
    checks++; if (req || ncyc != 0) begin failures++; $display("FAIL started without ext_req"); end
    for (int k = 1; k <= 12; k++) begin
      target = ncyc + k;
      @(posedge clk); ext_req <= 1;
      wait (ext_ack); #1;
      checks += 2;
      if (ncyc != target) begin failures++; $display("FAIL ran %0d cycles, wanted %0d", ncyc, target); end
      if (acks != '0 || req) begin failures++; $display("FAIL ext_ack before return to zero"); end
      repeat (3) @(posedge clk);
      checks++; if (!ext_ack) begin failures++; $display("FAIL ext_ack dropped early"); end
      ext_req <= 0;
      wait (!ext_ack); #1;
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
