// tb_clifford_conj: exhaustive check of the literal conjugation unit against
// U * P * U^dagger computed with explicit matrices, for H, the phase gate
// and CNOT (control = column a) on every literal pair.
module tb_clifford_conj;
  import pauli_pkg::*;
  import tb_qref_pkg::*;

  conj_op_e op;
  pauli_t   la, lb, oa, ob;
  logic     flip;
  int checks = 0, failures = 0;

  clifford_conj dut (.op(op), .la(la), .lb(lb), .oa(oa), .ob(ob), .flip(flip));

  initial begin
    cm_t u, m;
    int  ra, rb, rk;
    bit  ok;
    for (int g = 0; g < 3; g++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          op = conj_op_e'(g); la = pauli_t'(i); lb = pauli_t'(j);
          #1;
          case (g)
            0: u = kron(hadamard_m(), pauli_m(0));
            1: u = kron(phase_m(), pauli_m(0));
            default: u = cnot_m();
          endcase
          m = conj(u, kron(pauli_m(i), pauli_m(j)), 4);
          ident2(m, ra, rb, rk, ok);
          checks++;
          if (!ok || (rk != 0 && rk != 2) || int'(oa) != ra || int'(ob) != rb
              || flip != (rk == 2)) begin
            failures++;
            $display("FAIL op=%0d la=%0d lb=%0d: got %0d %0d flip=%0d, expected %0d %0d k=%0d",
                     g, i, j, oa, ob, flip, ra, rb, rk);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
