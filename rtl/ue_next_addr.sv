// Next address logic.
//
// A register, loaded at each global request, holds the incremented current
// address. A multiplexer driven by the sel-addr bit of the latched
// microinstruction chooses between that register (0) and the microinstruction's
// next-addr field (1); the result is curr_addr, the address the memory fetches
// during the current cycle. On a mispredicted branch `clear` disables the
// register, so the old incremented address is kept and the toggled sel-addr
// picks the correct one. The structure follows the document.
//
// Emulation timing: the register is loaded on the `clk` edge at which `req` is
// seen rising (falling with LATCH_FALL, changing at all with TWO_PHASE), the
// same edge that loads the microinstruction register array.
// After reset the register holds ENTRY (the program's entry point) and
// sel-addr is 0, so the first request fetches from ENTRY.
module ue_next_addr #(
  parameter int unsigned AW    = 2,
  parameter int unsigned ENTRY = 0,
  parameter bit          LATCH_FALL = 1'b0,
  parameter bit          TWO_PHASE  = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,        // global request from the ECU
  input  logic          clear,      // mispredicted branch, from the BDU
  input  logic          sel_addr,   // current sel-addr bit
  input  logic [AW-1:0] next_addr,  // next-addr field
  output logic [AW-1:0] curr_addr
);

  logic          req_q;
  logic [AW-1:0] inc_q;

  assign curr_addr = sel_addr ? next_addr : inc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_q <= 1'b0;
      inc_q <= AW'(ENTRY);
    end else begin
      req_q <= req;
      if ((TWO_PHASE ? (req != req_q) : LATCH_FALL ? (!req && req_q) : (req && !req_q)) && !clear)
        inc_q <= curr_addr + 1'b1;
    end
  end

endmodule
