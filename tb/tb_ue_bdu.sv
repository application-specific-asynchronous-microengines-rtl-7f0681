// Unit test of the branch detection unit: exhaustive over eval, cond and
// bra_pred for three conditions; branch = OR of enabled conditions, clear =
// branch differs from the prediction.
module tb_ue_bdu;
  logic [2:0] eval, cond;
  logic bra_pred, branch, clear;
  int checks = 0, failures = 0;
  bit eb;
  ue_bdu #(.N_COND(3)) dut (.*);
  initial begin
    for (int k = 0; k < 128; k++) begin
      {bra_pred, eval, cond} = 7'(k);
      #1;
      eb = 0;
      for (int i = 0; i < 3; i++) if (eval[i] && cond[i]) eb = 1;
      checks += 2;
      if (branch != eb) begin failures++; $display("FAIL branch %b %b", eval, cond); end
      if (clear != (eb != bra_pred)) begin failures++; $display("FAIL clear %b %b %b", eval, cond, bra_pred); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
