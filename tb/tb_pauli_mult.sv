// tb_pauli_mult: exhaustive check of the Pauli literal multiplier against the
// product of the 2x2 Pauli matrices.
module tb_pauli_mult;
  import pauli_pkg::*;
  import tb_qref_pkg::*;

  pauli_t  a, b, p;
  iphase_t e;
  int checks = 0, failures = 0;

  pauli_mult dut (.a(a), .b(b), .p(p), .e(e));

  initial begin
    int rp, rk;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = pauli_t'(i); b = pauli_t'(j);
        #1;
        lit_mul(i, j, rp, rk);
        checks++;
        if (int'(p) != rp || int'(e) != rk) begin
          failures++;
          $display("FAIL %0d*%0d: got p=%0d e=%0d, expected p=%0d e=%0d", i, j, p, e, rp, rk);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
