// Shared types and constants of the differential-equation microengine.
//
// The microinstruction is the 24-bit word of the solver's microprogram: one
// group of control fields per datapath unit (set-execute se, set-sequence ss,
// set-mux sm, op-code op, register enables en), then the global flow fields
// next-addr, bdu (which condition the branch detection unit evaluates),
// bra-pred (predicted branch outcome) and sel-addr (prefetch next-addr instead
// of the incremented address). Field order and the four program words follow
// the memory table of the solver example; the 2-bit next-addr and the
// encoding of printed addresses 1..4 as 0..3 are this design's choice.
//
// Datapath numbers are signed fixed point: DATA_W bits with FRAC_W fraction
// bits. Both widths are this design's choice.
//
// CLR_FIELDS, SEL_BIT and DIFFEQ_PROGRAM are read as parameter defaults of
// ue_memory, so a lint run of the package alone reports them as unused.
package ue_pkg;

  parameter int unsigned DATA_W = 16;   // datapath word width
  parameter int unsigned FRAC_W = 8;    // fraction bits of the fixed-point format
  parameter int unsigned ADDR_W = 2;    // microprogram address width
  parameter int unsigned DEPTH  = 4;    // microprogram words
  parameter int unsigned UI_W   = 24;   // microinstruction width

  // Control-structure variant of the microengine.
  //   ARCH_BASIC     RAS with sequence gate and bypass mux; microinstruction
  //                  latched when the global request rises.
  //   ARCH_OPT4      optimized four-phase: microinstruction latched when the
  //                  global request falls; transmission-gate request path and
  //                  glitch-free acknowledge logic in the RAS.
  //   ARCH_DECOUPLED as ARCH_OPT4, with the ECU ignoring units that do not
  //                  execute (no always-acknowledge) and set-decoupled inputs
  //                  on the ECU and RAS blocks.
  //   ARCH_TWO_PHASE basic structure with transition signalling: two-phase
  //                  ECU, RAS blocks with SELECT element and XOR bypass, every
  //                  request edge latches a microinstruction.
  typedef enum logic [1:0] {ARCH_BASIC, ARCH_OPT4, ARCH_DECOUPLED, ARCH_TWO_PHASE} arch_e;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0]        addr_t;

  // One microinstruction, most significant field first (table order).
  typedef struct packed {
    logic       done;      // computation complete, answer on the output port
    logic       mul2_se;   // MUL2: execute (always parallel)
    logic       mul1_sm;   // MUL1: 0 = X*U, 1 = 3DX*T
    logic       mul1_se;   // MUL1: execute (always parallel)
    logic       alu2_sm;   // ALU2: 0 = DX+X, 1 = MUL2+Y
    logic       alu2_ss;   // ALU2: wait for MUL2
    logic       alu2_se;   // ALU2: execute
    logic       alu1_op;   // ALU1: 0 = Y+MUL1, 1 = U-MUL1
    logic       alu1_se;   // ALU1: execute, always chained after MUL1
    logic       xy_sm;     // XY: 0 = load ports, 1 = load ALU2
    logic       xy_ss1;    // XY: wait for ALU2
    logic       xy_ss2;    // XY: wait for ALU1
    logic       xy_se;     // XY: execute
    logic       xy_eny;    // XY: latch Y
    logic       xy_enx;    // XY: latch X
    logic       tu_sm;     // TU: U input 0 = ALU1, 1 = Uport
    logic       tu_se;     // TU: execute, always chained after ALU1
    logic       tu_en;     // TU: 0 = latch T, 1 = latch U
    logic       cmp_se;    // CMP: execute, always chained after XY
    addr_t      next_addr; // branch target
    logic       bdu;       // eval bit: test the CMP result
    logic       bra_pred;  // predicted branch result
    logic       sel_addr;  // 1 = prefetch next_addr, 0 = incremented address
  } uinstr_t;

  // Bits cleared by a mispredicted branch: every se and ss, eval and bra-pred.
  localparam uinstr_t CLR_FIELDS = '{
    mul2_se: 1'b1, mul1_se: 1'b1, alu2_ss: 1'b1, alu2_se: 1'b1, alu1_se: 1'b1,
    xy_ss1: 1'b1, xy_ss2: 1'b1, xy_se: 1'b1, tu_se: 1'b1, cmp_se: 1'b1,
    bdu: 1'b1, bra_pred: 1'b1, default: '0};

  // Position of sel-addr in the word (least significant bit).
  localparam int unsigned SEL_BIT = 0;

  // The solver's microprogram; word i holds printed address i+1.
  localparam logic [DEPTH*UI_W-1:0] DIFFEQ_PROGRAM = {
    // 4: done, unconditional jump to 1
    uinstr_t'{done: 1'b1, next_addr: 2'd0, sel_addr: 1'b1, default: '0},
    // 3: (MUL1->ALU1->TU) || (ALU2->XY->CMP), branch to 2 predicted taken
    uinstr_t'{mul1_sm: 1'b1, mul1_se: 1'b1, alu2_se: 1'b1, alu1_op: 1'b1, alu1_se: 1'b1,
              xy_sm: 1'b1, xy_ss1: 1'b1, xy_se: 1'b1, xy_enx: 1'b1,
              tu_se: 1'b1, tu_en: 1'b1, cmp_se: 1'b1,
              next_addr: 2'd1, bdu: 1'b1, bra_pred: 1'b1, sel_addr: 1'b1, default: '0},
    // 2: (MUL1->ALU1->TU) || (MUL2->ALU2->XY), XY also waits for ALU1
    uinstr_t'{mul2_se: 1'b1, mul1_se: 1'b1, alu2_sm: 1'b1, alu2_ss: 1'b1, alu2_se: 1'b1,
              alu1_se: 1'b1, xy_sm: 1'b1, xy_ss1: 1'b1, xy_ss2: 1'b1, xy_se: 1'b1,
              xy_eny: 1'b1, tu_se: 1'b1, default: '0},
    // 1: (XY->CMP) || (TU), branch predicted true, fall through to 2
    uinstr_t'{xy_se: 1'b1, xy_eny: 1'b1, xy_enx: 1'b1, tu_sm: 1'b1, tu_se: 1'b1,
              tu_en: 1'b1, cmp_se: 1'b1, next_addr: 2'd3, bdu: 1'b1, bra_pred: 1'b1,
              default: '0}
  };

  // Fixed-point product, truncated toward minus infinity.
  function automatic data_t fx_mul(data_t a, data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return data_t'(p >>> FRAC_W);
  endfunction

endpackage
