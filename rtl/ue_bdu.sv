// Branch detection unit.
//
// The first part forms the branch result as an AND-OR of the condition
// results `cond` from the datapath, each enabled by its `eval` bit from the
// microinstruction, so several conditions can be ORed in one test. The second
// part compares the result with the predicted outcome `bra_pred` and raises
// `clear` when they differ, i.e. on a mispredicted branch. Purely
// combinational; `clear` is sampled when the next global request arrives.
// With all eval bits and bra_pred at 0 (unconditional flow) clear stays low.
// Structure follows the document; N_COND is sized for the solver (one
// comparator).
module ue_bdu #(
  parameter int unsigned N_COND = 1
) (
  input  logic [N_COND-1:0] eval,
  input  logic [N_COND-1:0] cond,
  input  logic              bra_pred,
  output logic              branch,
  output logic              clear
);

  assign branch = |(eval & cond);
  assign clear  = branch ^ bra_pred;

endmodule
