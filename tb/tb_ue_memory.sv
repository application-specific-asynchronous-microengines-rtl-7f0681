// Unit test of the microprogram memory and register array with the
// solver's program. Expected words are the 24-bit encodings of the four
// program rows, written out here by hand: 000FFE, 5EFC80, 33EAEF, 800001;
// the clear mask (every se and ss, eval and bra-pred) is 56B8A6. Checks:
// zero after reset; a word is latched only at a rising global request;
// req_dp follows req one cycle later; the fetch acknowledge follows after
// FETCH_DELAY cycles and returns to zero; a clear keeps the word, zeroes the
// masked bits and toggles sel-addr; the done output is the latched word's
// done bit; a program write is fetched afterwards.
module tb_ue_memory;
  localparam int FD = 2;
  logic clk = 0, rst_n = 0, req = 0, clear = 0, ack, req_dp, done_exec, prog_we = 0;
  logic [1:0] curr_addr = '0, prog_addr = '0;
  logic [23:0] uinstr, prog_data = '0, exp_w;
  logic [23:0] words [4] = '{24'h000FFE, 24'h5EFC80, 24'h33EAEF, 24'h800001};
  int checks = 0, failures = 0, lat;
  always #5 clk = ~clk;
  ue_memory #(.FETCH_DELAY(FD)) dut (.*);

  task automatic pulse(logic [1:0] a, bit c);
    curr_addr = a; clear = c;
    @(posedge clk); req <= 1'b1;
    @(posedge clk); #1;
    checks++; if (!req_dp) begin failures++; $display("FAIL req_dp"); end
    lat = 0;
    while (!ack && lat < 10) begin @(posedge clk); #1; lat++; end
    checks++; if (lat != FD) begin failures++; $display("FAIL fetch ack latency %0d", lat); end
    curr_addr = ~a;   // address may change; the word must hold
    req <= 1'b0; repeat (2) @(posedge clk); #1;
    checks++; if (ack) begin failures++; $display("FAIL ack rtz"); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    checks++; if (uinstr != '0) begin failures++; $display("FAIL reset word"); end
    for (int k = 0; k < 12; k++) begin
      pulse(2'(k), 1'b0);
      checks++; if (uinstr != words[k % 4]) begin failures++; $display("FAIL word %0d = %h", k % 4, uinstr); end
      checks++; if (done_exec != words[k % 4][23]) begin failures++; $display("FAIL done bit of word %0d", k % 4); end
      if ((k % 4) != 3) begin
        exp_w = (uinstr & ~24'h56B8A6) ^ 24'h000001;
        pulse(2'(k + 1), 1'b1);
        checks++; if (uinstr != exp_w) begin failures++; $display("FAIL clear %h exp %h", uinstr, exp_w); end
      end
    end
    @(posedge clk); prog_we <= 1; prog_addr <= 2'd2; prog_data <= 24'hABCDE5;
    @(posedge clk); prog_we <= 0;
    pulse(2'd2, 1'b0);
    checks++; if (uinstr != 24'hABCDE5) begin failures++; $display("FAIL program write %h", uinstr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
