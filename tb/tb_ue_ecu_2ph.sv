// Unit test of the two-phase execution control unit with three acknowledge
// inputs. Testbench responders take the level of the global request after
// random delays. Runs of random length are started by toggling ext_req;
// the done input rises once the requested number of cycles has been issued.
// Checks: the global request toggles only when every acknowledge is in phase
// with it; each run issues exactly the requested number of request
// transitions; ext_ack toggles once per run, and only after the last cycle's
// acknowledges are in phase.
module tb_ue_ecu_2ph;
  localparam int N = 3;
  logic clk = 0, rst_n = 0, ext_req = 0, ext_ack, done, req;
  logic [N-1:0] acks = '0;
  int checks = 0, failures = 0, ncyc = 0, target = 1;
  int cnt [N];
  logic req_q = 0, ext_ack_q = 0, rst_q = 0;
  logic [N-1:0] acks_q = '0;
  always #5 clk = ~clk;
  ue_ecu_2ph #(.N_ACK(N)) dut (.*);
  assign done = (ncyc >= target);

  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (acks[i] != req) begin
        if (cnt[i] == 0) begin acks[i] <= req; cnt[i] <= int'($urandom_range(0, 4)); end
        else cnt[i] <= cnt[i] - 1;
      end
    end
  end

  always @(posedge clk) begin
    req_q <= req; acks_q <= acks; ext_ack_q <= ext_ack; rst_q <= rst_n;
    if (rst_q && rst_n && req != req_q) begin
      ncyc <= ncyc + 1;
      checks++;
      if (acks_q != {N{req_q}}) begin failures++; $display("FAIL req toggled out of phase"); end
    end
    if (rst_q && rst_n && ext_ack != ext_ack_q) begin
      checks++;
      if (acks_q != {N{req_q}}) begin failures++; $display("FAIL ext_ack before join"); end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) cnt[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      int k, t, start;
      k = int'($urandom_range(1, 6));
      start = ncyc;
      target = ncyc + k;
      @(posedge clk); ext_req <= ~ext_req;
      t = 0;
      @(posedge clk);
      while (ext_ack != ext_req && t < 300) begin @(posedge clk); t++; end
      checks += 2;
      if (ext_ack != ext_req) begin failures++; $display("FAIL run %0d did not finish", r); end
      if (ncyc - start != k) begin failures++; $display("FAIL run %0d: %0d cycles, expected %0d", r, ncyc - start, k); end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
