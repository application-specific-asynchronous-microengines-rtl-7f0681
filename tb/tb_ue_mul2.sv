// Unit test of MUL2: random operands, fixed-point product checked against an
// integer reference, acknowledge latency (DELAY cycles) and return to zero.
module tb_ue_mul2;
  import ue_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0, req = 0, ack;
  data_t u, dx, p;
  int checks = 0, failures = 0, lat;
  always #5 clk = ~clk;
  ue_mul2 #(.DELAY(D)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      u = data_t'($urandom); dx = data_t'($urandom);
      @(posedge clk); req <= 1; lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ack);
      checks += 2;
      if (lat != D) begin failures++; $display("FAIL latency %0d", lat); end
      if (p != data_t'((int'(u) * int'(dx)) >>> 8)) begin failures++; $display("FAIL p %0d*%0d=%0d", u, dx, p); end
      req <= 0; @(posedge clk); @(posedge clk);
      checks++; if (ack) begin failures++; $display("FAIL rtz"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
