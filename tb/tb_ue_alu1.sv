// Unit test of ALU1: op=0 gives Y+MUL1, op=1 gives U-MUL1 (16-bit wrap),
// random operands, and the acknowledge latency.
module tb_ue_alu1;
  import ue_pkg::*;
  localparam int D = 2;
  logic clk = 0, rst_n = 0, req = 0, ack, op;
  data_t m, y, u, r, e;
  int checks = 0, failures = 0, lat;
  always #5 clk = ~clk;
  ue_alu1 #(.DELAY(D)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      m = data_t'($urandom); y = data_t'($urandom); u = data_t'($urandom); op = k[0];
      e = op ? data_t'(int'(u) - int'(m)) : data_t'(int'(y) + int'(m));
      @(posedge clk); req <= 1; lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ack);
      checks += 2;
      if (lat != D) begin failures++; $display("FAIL latency %0d", lat); end
      if (r != e) begin failures++; $display("FAIL op=%0d r=%0d exp %0d", op, r, e); end
      req <= 0; @(posedge clk); @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
