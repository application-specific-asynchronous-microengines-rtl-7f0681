// Unit test of CMP: signed X < A for random and edge values; the flag is
// updated only on a request and held afterwards.
module tb_ue_cmp;
  import ue_pkg::*;
  localparam int D = 1;
  logic clk = 0, rst_n = 0, req = 0, ack, lt;
  data_t x, a;
  int checks = 0, failures = 0, lat;
  bit e;
  always #5 clk = ~clk;
  ue_cmp #(.DELAY(D)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 80; k++) begin
      x = data_t'($urandom); a = (k % 4 == 0) ? x : data_t'($urandom);
      e = int'(x) < int'(a);
      @(posedge clk); req <= 1; lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ack);
      checks += 2;
      if (lat != D) begin failures++; $display("FAIL latency %0d", lat); end
      if (lt != e) begin failures++; $display("FAIL %0d<%0d gave %0d", x, a, lt); end
      req <= 0; @(posedge clk);
      x = ~x; a = ~a; @(posedge clk);   // inputs change without a request
      checks++; if (lt != e) begin failures++; $display("FAIL flag not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
