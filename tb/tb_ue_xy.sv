// Unit test of XY: every combination of sm, enx and eny; X and Y must take
// the port or ALU2 value only when enabled and keep their value otherwise,
// and only once the request is acknowledged.
module tb_ue_xy;
  import ue_pkg::*;
  localparam int D = 2;
  logic clk = 0, rst_n = 0, req = 0, ack, sm, enx, eny;
  data_t x_port, y_port, alu2, x, y, ex = 0, ey = 0;
  int checks = 0, failures = 0, lat;
  always #5 clk = ~clk;
  ue_xy #(.DELAY(D)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      x_port = data_t'($urandom); y_port = data_t'($urandom); alu2 = data_t'($urandom);
      {sm, enx, eny} = 3'(k);
      if (enx) ex = sm ? alu2 : x_port;
      if (eny) ey = sm ? alu2 : y_port;
      @(posedge clk); req <= 1; lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ack);
      checks += 3;
      if (lat != D) begin failures++; $display("FAIL latency %0d", lat); end
      if (x != ex) begin failures++; $display("FAIL x=%0d exp %0d", x, ex); end
      if (y != ey) begin failures++; $display("FAIL y=%0d exp %0d", y, ey); end
      req <= 0; @(posedge clk); @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
