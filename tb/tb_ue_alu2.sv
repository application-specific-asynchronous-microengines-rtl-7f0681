// Unit test of ALU2: sm=0 gives DX+X, sm=1 gives MUL2+Y, random operands,
// and the acknowledge latency.
module tb_ue_alu2;
  import ue_pkg::*;
  localparam int D = 2;
  logic clk = 0, rst_n = 0, req = 0, ack, sm;
  data_t dx, m, x, y, r, e;
  int checks = 0, failures = 0, lat;
  always #5 clk = ~clk;
  ue_alu2 #(.DELAY(D)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      dx = data_t'($urandom); m = data_t'($urandom); x = data_t'($urandom); y = data_t'($urandom);
      sm = k[0];
      e = sm ? data_t'(int'(m) + int'(y)) : data_t'(int'(dx) + int'(x));
      @(posedge clk); req <= 1; lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ack);
      checks += 2;
      if (lat != D) begin failures++; $display("FAIL latency %0d", lat); end
      if (r != e) begin failures++; $display("FAIL sm=%0d r=%0d exp %0d", sm, r, e); end
      req <= 0; @(posedge clk); @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
