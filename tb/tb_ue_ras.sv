// Unit test of the four-phase RAS block with two sequence inputs. A datapath
// unit model acknowledges after two cycles. Checks, for every se/ss setting:
// a bypassed unit gets no request and the acknowledge equals the global
// request; a parallel unit gets the global request at once; a chained unit
// starts only when the global request and every selected sequence request
// are high, ignoring unselected ones; the unit's request returns to zero with
// the global request; and the acknowledge is the unit's when it executes.
module tb_ue_ras;
  logic clk = 0, rst_n = 0, req = 0, se = 0, dpu_req, dpu_ack, ack;
  logic [1:0] ss = '0, sreq = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ue_ras #(.N_SEQ(2)) dut (.*);
  ue_bd_delay #(.DELAY(2)) unit (.clk, .rst_n, .req(dpu_req), .ack(dpu_ack), .fire());

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (se=%b ss=%b sreq=%b)", msg, se, ss, sreq); end
  endtask

  task automatic cycle(bit s_e, logic [1:0] s_s, int d0, int d1);
    int t;
    bit exp_fired;
    @(posedge clk); se <= s_e; ss <= s_s; sreq <= '0;
    @(posedge clk); req <= 1'b1;
    for (t = 0; t < 8; t++) begin
      @(posedge clk); #1;
      if (t == d0) sreq[0] = 1'b1;
      if (t == d1) sreq[1] = 1'b1;
      #1;
      exp_fired = s_e && (s_s == 2'b00 || ((!s_s[0] || sreq[0]) && (!s_s[1] || sreq[1])));
      if (exp_fired) chk(dpu_req, "request should be passed");
      else           chk(!dpu_req, "request passed too early or when not executing");
      chk(ack == (s_e ? dpu_ack : req), "acknowledge source");
      if (dpu_req) break;
    end
    repeat (3) @(posedge clk); #1;
    if (s_e) chk(ack, "unit acknowledge missing");
    req <= 1'b0; @(posedge clk); #1;
    chk(!dpu_req, "no parallel return to zero");
    sreq = '0;
    repeat (2) @(posedge clk); #1;
    chk(!ack, "ack did not return to zero");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++)
      cycle(k[0], 2'(k >> 1), int'($urandom_range(0, 5)), int'($urandom_range(0, 5)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
