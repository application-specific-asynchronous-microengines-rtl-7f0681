// Unit test of the bundled-data delay: for several DELAY values the
// acknowledge must rise exactly DELAY cycles after the request, `fire` must
// be high exactly in the cycle before, and the acknowledge must return to zero
// one cycle after the request falls. A two-phase instance (DELAY 3) must
// take each new request level exactly three cycles after the transition,
// firing once per transition, for rising and falling transitions alike.
module tb_ue_bd_delay;
  logic clk = 0, rst_n = 0;
  logic [2:0] req = '0, ack, fire;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ue_bd_delay #(.DELAY(1)) d1 (.clk, .rst_n, .req(req[0]), .ack(ack[0]), .fire(fire[0]));
  ue_bd_delay #(.DELAY(3)) d3 (.clk, .rst_n, .req(req[1]), .ack(ack[1]), .fire(fire[1]));
  logic req2 = 1'b0, ack2, fire2;
  ue_bd_delay #(.DELAY(3), .TWO_PHASE(1'b1)) t3 (.clk, .rst_n, .req(req2), .ack(ack2), .fire(fire2));
  ue_bd_delay #(.DELAY(6)) d6 (.clk, .rst_n, .req(req[2]), .ack(ack[2]), .fire(fire[2]));
  task automatic one(int i, int d);
    int lat = 0, fires = 0;
    @(posedge clk); req[i] <= 1'b1;
    do begin @(posedge clk); lat++; if (fire[i]) fires++; #1; end while (!ack[i] && lat < 20);
    checks += 2;
    if (lat != d) begin failures++; $display("FAIL delay %0d latency %0d", d, lat); end
    if (fires != 1 && d > 0) begin failures++; $display("FAIL fire count %0d", fires); end
    repeat (3) @(posedge clk);
    checks++; if (!ack[i]) begin failures++; $display("FAIL ack dropped early"); end
    req[i] <= 1'b0; @(posedge clk); @(posedge clk); #1;
    checks++; if (ack[i]) begin failures++; $display("FAIL rtz"); end
  endtask
  task automatic two_phase();
    int lat = 0, fires = 0;
    @(posedge clk); req2 <= ~req2;
    do begin @(posedge clk); lat++; if (fire2) fires++; #1; end while (ack2 != req2 && lat < 20);
    checks += 2;
    if (lat != 3) begin failures++; $display("FAIL two-phase latency %0d", lat); end
    if (fires != 1) begin failures++; $display("FAIL two-phase fire count %0d", fires); end
    repeat (2) @(posedge clk); #1;
    checks++; if (ack2 != req2) begin failures++; $display("FAIL two-phase ack moved without request"); end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 5; k++) begin one(0, 1); one(1, 3); one(2, 6); end
    for (int k = 0; k < 6; k++) two_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
