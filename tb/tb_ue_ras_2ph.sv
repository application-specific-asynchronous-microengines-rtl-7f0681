// Unit test of the two-phase RAS block with two sequence inputs. Each cycle
// picks random se/ss settings, toggles the global request and lets the two
// sequence requests follow it after random delays; a two-phase unit model
// acknowledges two cycles after each request transition. Checks per cycle:
// the unit sees exactly one request transition when se is 1 and none when se
// is 0; a parallel unit gets it in the same cycle as the global request; a
// chained unit only once every selected sequence request has reached the new
// level; the acknowledge makes exactly one transition and ends in phase with
// the global request, at once for a skipped parallel unit.
module tb_ue_ras_2ph;
  logic clk = 0, rst_n = 0, req = 0, se = 0, dpu_req, dpu_ack, ack;
  logic [1:0] ss = '0, sreq = '0;
  int checks = 0, failures = 0;
  int n_dreq = 0, n_ack = 0, dly0, dly1, ucnt = 0;
  logic dpu_req_q = 0, ack_q = 0, bad_order = 0;
  always #5 clk = ~clk;
  ue_ras_2ph #(.N_SEQ(2)) dut (.*);

  // two-phase unit model: ack takes the request level two cycles later
  always @(posedge clk) begin
    if (!rst_n) begin dpu_ack <= 1'b0; ucnt <= 0; end
    else if (dpu_req != dpu_ack) begin
      if (ucnt == 1) begin dpu_ack <= dpu_req; ucnt <= 0; end
      else ucnt <= ucnt + 1;
    end
  end

  // event counters and ordering monitor
  always @(posedge clk) begin
    dpu_req_q <= dpu_req; ack_q <= ack;
    if (rst_n && dpu_req != dpu_req_q) n_dreq++;
    if (rst_n && ack != ack_q) n_ack++;
  end
  // a chained unit's request may change only when every selected sequence
  // request has the global request's level
  always @(dpu_req) if (rst_n && ((sreq ^ {2{req}}) & ss) != '0) bad_order = 1'b1;

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (se=%0b ss=%b)", msg, se, ss); end
  endtask

  initial begin
    dpu_ack = 1'b0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int k = 0; k < 200; k++) begin
      se = 1'($urandom); ss = 2'($urandom);
      dly0 = int'($urandom_range(0, 4)); dly1 = int'($urandom_range(0, 4));
      n_dreq = 0; n_ack = 0; bad_order = 0;
      @(posedge clk); #1;
      req = ~req; #1;
      if (se && ss == '0) chk(dpu_req != dpu_req_q, "parallel request passes in the same cycle");
      if (!se && ss == '0) chk(ack == req, "skipped parallel unit acknowledges at once");
      for (int c = 0; c < 5; c++) begin
        if (c == dly0) sreq[0] = req;
        if (c == dly1) sreq[1] = req;
        @(posedge clk); #1;
      end
      sreq = {2{req}};
      repeat (6) @(posedge clk); #1;
      chk(n_dreq == (se ? 1 : 0), "one request transition to the unit iff se");
      chk(!bad_order, "chained request before its sequence requests");
      chk(n_ack == 1 && ack == req, "one acknowledge transition, in phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
