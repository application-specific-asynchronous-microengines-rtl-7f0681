// Unit test of MUL1: both operand selections (X*U and 3DX*T) with random
// values, checked against an integer fixed-point reference, and the
// acknowledge latency.
module tb_ue_mul1;
  import ue_pkg::*;
  localparam int D = 3;
  logic clk = 0, rst_n = 0, req = 0, ack, sm;
  data_t x, dx3, u, t, p, e;
  int checks = 0, failures = 0, lat;
  always #5 clk = ~clk;
  ue_mul1 #(.DELAY(D)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      x = data_t'($urandom); dx3 = data_t'($urandom); u = data_t'($urandom); t = data_t'($urandom);
      sm = k[0];
      e = sm ? data_t'((int'(dx3) * int'(t)) >>> 8) : data_t'((int'(x) * int'(u)) >>> 8);
      @(posedge clk); req <= 1; lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ack);
      checks += 2;
      if (lat != D) begin failures++; $display("FAIL latency %0d", lat); end
      if (p != e) begin failures++; $display("FAIL sm=%0d p=%0d exp %0d", sm, p, e); end
      req <= 0; @(posedge clk); @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
