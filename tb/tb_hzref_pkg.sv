// tb_hzref_pkg: reference stabilizer matrix for the testbenches.
//
// hz_ref keeps an n-by-n matrix of literal codes (I=0, Z=1, X=2, Y=3) and a
// phase per row (power of i) and updates it with explicit matrix arithmetic
// from tb_qref_pkg: conjugation U * P * U^dagger for H, the phase gate and
// CNOT, and Pauli matrix products for row multiplication.
package tb_hzref_pkg;
  import pauli_pkg::*;
  import tb_qref_pkg::*;

  class hz_ref;
    int n;
    int lit[][];
    int ph[];
    bit last_commute;

    function new(int nn);
      n = nn;
      lit = new[n];
      foreach (lit[r]) lit[r] = new[n];
      ph = new[n];
      last_commute = 1;
      init('0);
    endfunction

    function void init(logic [255:0] s);
      for (int r = 0; r < n; r++) begin
        for (int j = 0; j < n; j++) lit[r][j] = (j == r) ? 1 : 0;
        ph[r] = s[r] ? 2 : 0;
      end
    endfunction

    function void apply(hz_instr_t ins, logic [255:0] s);
      cm_t m;
      int  p, pb, k, ksum, anti;
      bit  ok;
      int  a = int'(ins.a), b = int'(ins.b);
      case (ins.op)
        HZ_INIT: init(s);
        HZ_H, HZ_P:
          for (int r = 0; r < n; r++) begin
            m = conj((ins.op == HZ_H) ? hadamard_m() : phase_m(), pauli_m(lit[r][a]), 2);
            ident1(m, p, k, ok);
            lit[r][a] = p; ph[r] = (ph[r] + k) % 4;
          end
        HZ_CNOT:
          for (int r = 0; r < n; r++) begin
            // only the literal pair matters; skip the matrix work for I I
            if (lit[r][a] != 0 || lit[r][b] != 0) begin
              m = conj(cnot_m(), kron(pauli_m(lit[r][a]), pauli_m(lit[r][b])), 4);
              ident2(m, p, pb, k, ok);
              lit[r][a] = p; lit[r][b] = pb; ph[r] = (ph[r] + k) % 4;
            end
          end
        HZ_ROWMUL: begin
          ksum = ph[a] + ph[b]; anti = 0;
          for (int j = 0; j < n; j++) begin
            lit_mul(lit[b][j], lit[a][j], p, k);
            lit[a][j] = p; ksum += k;
            if (k % 2 == 1) anti++;
          end
          ph[a] = ksum % 4;
          last_commute = (anti % 2 == 0);
        end
        default: ;
      endcase
    endfunction
  endclass

  function automatic hz_instr_t hz_mk(hz_op_e op, int a, int b);
    hz_instr_t s;
    s.op = op; s.a = HZ_IDX_W'(a); s.b = HZ_IDX_W'(b);
    return s;
  endfunction

  // Random Clifford instruction on n qubits (H, P, CNOT, ROWMUL, rare INIT).
  function automatic hz_instr_t hz_random(int n);
    int c = $urandom_range(0, 39);
    int a = $urandom_range(0, n - 1);
    int b = (a + $urandom_range(1, n - 1)) % n;
    hz_op_e op;
    if (c == 0) op = HZ_INIT;
    else if (c < 13) op = HZ_H;
    else if (c < 23) op = HZ_P;
    else if (c < 35) op = HZ_CNOT;
    else op = HZ_ROWMUL;
    return hz_mk(op, a, b);
  endfunction

endpackage
