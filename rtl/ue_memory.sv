// Microprogram memory with its microinstruction register array.
//
// The store holds DEPTH words of W bits. It is writable through the `prog_*`
// port, so the microprogram can be changed after fabrication; reset loads
// INIT. The word at `curr_addr` is fetched during each cycle and `ack` is
// raised FETCH_DELAY clock cycles after the (delayed) global request to say
// the fetch is complete; it returns to zero with the request (with TWO_PHASE,
// it takes the request's new level instead).
//
// On the clock edge at which the global request `req` is seen rising (or,
// with LATCH_FALL set, falling: the optimized four-phase scheme, which
// overlaps the latch with the return-to-zero phase; with TWO_PHASE set, any
// transition, for transition signalling), the register array loads
// the prefetched word, which drives the datapath,
// branch detection unit and next address logic. If `clear` (mispredicted
// branch) is high at that edge, the word is not loaded: the bits in CLR_MASK
// (every se and ss, eval, bra-pred) are cleared, the sel-addr bit at SEL_BIT
// is toggled, and all other bits keep their value. The cleared cycle then
// executes nothing while the correct word is fetched.
//
// `req_dp` is the global request delayed by one clock for the datapath, so
// the new microinstruction reaches the RAS blocks before the request does.
// `done_exec` is the done bit of the word being executed: the latched word's
// bit, or with LATCH_FALL a copy taken when the request rises, since by the
// end of the cycle the register array already holds the next word.
// The register array resets to all zeros. Clear behaviour and the toggle of
// sel-addr follow the document; the write port, delays and reset contents are
// this design's choices.
module ue_memory #(
  parameter int unsigned        DEPTH       = 4,
  parameter int unsigned        W           = 24,
  parameter int unsigned        AW          = 2,
  parameter logic [DEPTH*W-1:0] INIT        = ue_pkg::DIFFEQ_PROGRAM,
  parameter logic [W-1:0]       CLR_MASK    = ue_pkg::CLR_FIELDS,
  parameter int unsigned        SEL_BIT     = ue_pkg::SEL_BIT,
  parameter int unsigned        DONE_BIT    = W - 1,
  parameter bit                 LATCH_FALL  = 1'b0,
  parameter bit                 TWO_PHASE   = 1'b0,
  parameter int unsigned        FETCH_DELAY = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,        // global request from the ECU
  input  logic [AW-1:0] curr_addr,  // address to prefetch
  input  logic          clear,      // mispredicted branch, from the BDU
  output logic [W-1:0]  uinstr,     // latched microinstruction
  output logic          ack,        // fetch complete
  output logic          req_dp,     // global request, delayed for the datapath
  output logic          done_exec,  // done bit of the executing word
  input  logic          prog_we,    // program write
  input  logic [AW-1:0] prog_addr,
  input  logic [W-1:0]  prog_data
);

  logic [W-1:0] store [DEPTH];
  logic [W-1:0] fetched;
  logic [W-1:0] sel_mask;
  logic         unused_fire;
  logic         latch_now, done_q;

  assign fetched  = store[curr_addr];
  assign sel_mask = W'(1) << SEL_BIT;
  assign latch_now = TWO_PHASE  ? (req != req_dp) :
                     LATCH_FALL ? (!req && req_dp) : (req && !req_dp);
  assign done_exec = LATCH_FALL ? done_q : uinstr[DONE_BIT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) store[i] <= INIT[i*W +: W];
    end else if (prog_we) begin
      store[prog_addr] <= prog_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_dp <= 1'b0;
      uinstr <= '0;
      done_q <= 1'b0;
    end else begin
      req_dp <= req;
      if (req && !req_dp) done_q <= uinstr[DONE_BIT];
      if (latch_now) begin
        if (clear) uinstr <= (uinstr & ~CLR_MASK) ^ sel_mask;
        else       uinstr <= fetched;
      end
    end
  end

  ue_bd_delay #(.DELAY(FETCH_DELAY), .TWO_PHASE(TWO_PHASE)) u_fetch (
    .clk, .rst_n, .req(req_dp), .ack, .fire(unused_fire)
  );

endmodule
