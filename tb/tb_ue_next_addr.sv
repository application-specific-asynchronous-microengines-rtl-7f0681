// Unit test of the next address logic against a reference model: random
// sequences of global requests with random clear, sel-addr and next-addr.
// curr_addr must be next-addr when sel-addr is set and otherwise the address
// held in the incremented-address register, which loads curr_addr+1 at each
// request unless clear is high.
module tb_ue_next_addr;
  localparam int AW = 3;
  logic clk = 0, rst_n = 0, req = 0, clear = 0, sel_addr = 0;
  logic [AW-1:0] next_addr = '0, curr_addr, inc_ref;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ue_next_addr #(.AW(AW), .ENTRY(5)) dut (.*);
  initial begin
    inc_ref = 3'd5;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    checks++; if (curr_addr != 3'd5) begin failures++; $display("FAIL entry %0d", curr_addr); end
    for (int k = 0; k < 200; k++) begin
      sel_addr = 1'($urandom); next_addr = AW'($urandom); clear = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (curr_addr != (sel_addr ? next_addr : inc_ref)) begin
        failures++; $display("FAIL curr=%0d sel=%0d next=%0d inc=%0d", curr_addr, sel_addr, next_addr, inc_ref);
      end
      if (!clear) inc_ref = curr_addr + 1'b1;
      @(posedge clk); req <= 1'b1;
      @(posedge clk); @(posedge clk); req <= 1'b0;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
