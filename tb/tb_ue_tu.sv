// Unit test of TU: en=0 loads T from ALU1, en=1 loads U from Uport (sm=1) or
// ALU1 (sm=0); the other register must hold.
module tb_ue_tu;
  import ue_pkg::*;
  localparam int D = 1;
  logic clk = 0, rst_n = 0, req = 0, ack, sm, en;
  data_t u_port, alu1, t, u, et = 0, eu = 0;
  int checks = 0, failures = 0, lat;
  always #5 clk = ~clk;
  ue_tu #(.DELAY(D)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      u_port = data_t'($urandom); alu1 = data_t'($urandom);
      {sm, en} = 2'(k);
      if (en) eu = sm ? u_port : alu1; else et = alu1;
      @(posedge clk); req <= 1; lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!ack);
      checks += 3;
      if (lat != D) begin failures++; $display("FAIL latency %0d", lat); end
      if (t != et) begin failures++; $display("FAIL t=%0d exp %0d", t, et); end
      if (u != eu) begin failures++; $display("FAIL u=%0d exp %0d", u, eu); end
      req <= 0; @(posedge clk); @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
