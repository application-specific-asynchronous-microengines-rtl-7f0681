// Unit test of the RAS block for decoupled execution, with a datapath unit
// model that acknowledges six cycles after its request. Checks: a parallel
// unit follows the global request up and down; a unit that does not execute
// gets no request and gives no acknowledge (no bypass); a chained unit waits
// for its selected sequence request; a decoupled unit (sd=1) keeps its
// request across later global requests without being restarted, and is
// released only when sd is cleared and the global request falls; a decoupled
// chained unit starts on its sequence request while the global request is low.
module tb_ue_ras_dec;
  logic clk = 0, rst_n = 0, req = 0, se = 0, sd = 0, dpu_req, ack;
  logic dpu_ack;
  logic [1:0] ss = '0, sreq = '0;
  int checks = 0, failures = 0, starts = 0;
  logic dpu_req_q = 0;
  always #5 clk = ~clk;
  ue_ras_dec #(.N_SEQ(2)) dut (.*);
  // unit model: acknowledge six cycles after the request rises, one cycle
  // after it falls; a request that falls before the acknowledge is an error
  int ucnt = 0;
  assign dpu_ack = (ucnt >= 6);
  always @(posedge clk) begin
    dpu_req_q <= dpu_req;
    if (dpu_req && !dpu_req_q) starts++;
    if (!dpu_req && dpu_req_q && !dpu_ack) begin
      failures++; $display("FAIL unit request withdrawn before acknowledge");
    end
    if (!rst_n || !dpu_req) ucnt <= 0;
    else if (ucnt < 6) ucnt <= ucnt + 1;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic step(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    step(2); rst_n = 1; step(1);
    // parallel
    se = 1; ss = 0; req = 1; #1;
    chk(dpu_req, "parallel request passes at once");
    step(8); chk(ack && dpu_ack, "ack from unit");
    req = 0; #1; chk(!dpu_req, "parallel return to zero");
    step(2); chk(!ack, "ack rtz");
    // not executing: no request, no bypass acknowledge
    se = 0; req = 1; step(4);
    chk(!dpu_req && !ack, "non-executing unit stays silent");
    req = 0; step(2);
    // chained on sreq[1]
    se = 1; ss = 2'b10; req = 1; step(3);
    chk(!dpu_req, "chained unit waits");
    sreq[0] = 1; step(1); chk(!dpu_req, "unselected sequence request ignored");
    sreq[1] = 1; #1; chk(dpu_req, "chained unit starts on its sequence request");
    step(8); req = 0; sreq = 0; #1; chk(!dpu_req, "chained return to zero");
    step(2);
    // decoupled: starts once, survives three more global cycles
    starts = 0;
    se = 1; ss = 0; sd = 1; req = 1; step(1);
    req = 0; step(1);
    chk(dpu_req, "decoupled request held after global request falls");
    for (int k = 0; k < 3; k++) begin
      req = 1; step(1); req = 0; step(1);
    end
    chk(dpu_req && starts == 1, "decoupled unit not restarted");
    chk(ack, "decoupled unit finished meanwhile");
    // resynchronise: sd cleared while the global request is high
    req = 1; step(1); sd = 0; step(1);
    chk(dpu_req && ack, "held until global request falls");
    req = 0; #1; chk(!dpu_req, "released after resynchronisation");
    step(2); chk(!ack, "ack rtz after release");
    // decoupled chain: sequence request with global request low
    starts = 0;
    se = 1; sd = 1; ss = 2'b01; sreq = 0; req = 0; step(2);
    chk(!dpu_req, "decoupled chained unit waits for its sequence request");
    sreq[0] = 1; #1; chk(dpu_req, "decoupled chained unit starts with req low");
    step(1); sreq[0] = 0; step(8); chk(dpu_req && ack, "decoupled chained unit holds");
    sd = 0; #1; chk(!dpu_req, "released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
