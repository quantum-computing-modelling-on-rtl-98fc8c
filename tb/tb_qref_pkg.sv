// tb_qref_pkg: matrix-level reference arithmetic for the testbenches.
//
// Pauli literals and Clifford gates are handled here as explicit complex
// matrices (up to 4x4, real and imaginary parts as reals), so that the
// checks do not depend on the bit-level rules the RTL uses: a conjugation is
// U * P * U^dagger, a literal product is a matrix product, and the result is
// identified by comparing against i^k times every Pauli (tensor) product.
// Literal codes: I = 0, X = 2, Y = 3, Z = 1 (the {x, z} code).
package tb_qref_pkg;

  typedef struct {
    real re [4][4];
    real im [4][4];
  } cm_t;

  function automatic cm_t zero_m();
    cm_t m;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        m.re[r][c] = 0.0;
        m.im[r][c] = 0.0;
      end
    return m;
  endfunction

  // 2x2 Pauli matrix for a literal code.
  function automatic cm_t pauli_m(input int p);
    cm_t m = zero_m();
    case (p)
      0: begin m.re[0][0] = 1.0; m.re[1][1] = 1.0; end            // I
      2: begin m.re[0][1] = 1.0; m.re[1][0] = 1.0; end            // X
      3: begin m.im[0][1] = -1.0; m.im[1][0] = 1.0; end           // Y
      default: begin m.re[0][0] = 1.0; m.re[1][1] = -1.0; end     // Z
    endcase
    return m;
  endfunction

  function automatic cm_t kron(input cm_t a, input cm_t b);
    cm_t m = zero_m();
    for (int ar = 0; ar < 2; ar++)
      for (int ac = 0; ac < 2; ac++)
        for (int br = 0; br < 2; br++)
          for (int bc = 0; bc < 2; bc++) begin
            m.re[2*ar+br][2*ac+bc] = a.re[ar][ac]*b.re[br][bc] - a.im[ar][ac]*b.im[br][bc];
            m.im[2*ar+br][2*ac+bc] = a.re[ar][ac]*b.im[br][bc] + a.im[ar][ac]*b.re[br][bc];
          end
    return m;
  endfunction

  function automatic cm_t mul(input cm_t a, input cm_t b, input int n);
    cm_t m = zero_m();
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++)
        for (int k = 0; k < n; k++) begin
          m.re[r][c] += a.re[r][k]*b.re[k][c] - a.im[r][k]*b.im[k][c];
          m.im[r][c] += a.re[r][k]*b.im[k][c] + a.im[r][k]*b.re[k][c];
        end
    return m;
  endfunction

  function automatic cm_t adj(input cm_t a, input int n);
    cm_t m = zero_m();
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        m.re[r][c] = a.re[c][r];
        m.im[r][c] = -a.im[c][r];
      end
    return m;
  endfunction

  // U * P * U^dagger
  function automatic cm_t conj(input cm_t u, input cm_t p, input int n);
    return mul(mul(u, p, n), adj(u, n), n);
  endfunction

  // true when a == i^k * b
  function automatic bit eq_phase(input cm_t a, input cm_t b, input int k, input int n);
    real sr, si, er, ei;
    sr = (k == 0) ? 1.0 : (k == 2) ? -1.0 : 0.0;
    si = (k == 1) ? 1.0 : (k == 3) ? -1.0 : 0.0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        er = sr*b.re[r][c] - si*b.im[r][c] - a.re[r][c];
        ei = sr*b.im[r][c] + si*b.re[r][c] - a.im[r][c];
        if (er > 1e-9 || er < -1e-9 || ei > 1e-9 || ei < -1e-9) return 1'b0;
      end
    return 1'b1;
  endfunction

  // Identify a 2x2 matrix as i^k * Pauli(p). ok = 0 if it is none.
  function automatic void ident1(input cm_t m, output int p, output int k, output bit ok);
    ok = 1'b0; p = 0; k = 0;
    for (int pp = 0; pp < 4; pp++)
      for (int kk = 0; kk < 4; kk++)
        if (!ok && eq_phase(m, pauli_m(pp), kk, 2)) begin
          ok = 1'b1; p = pp; k = kk;
        end
  endfunction

  // Identify a 4x4 matrix as i^k * Pauli(pa) (x) Pauli(pb).
  function automatic void ident2(input cm_t m, output int pa, output int pb,
                                 output int k, output bit ok);
    ok = 1'b0; pa = 0; pb = 0; k = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int kk = 0; kk < 4; kk++)
          if (!ok && eq_phase(m, kron(pauli_m(a), pauli_m(b)), kk, 4)) begin
            ok = 1'b1; pa = a; pb = b; k = kk;
          end
  endfunction

  function automatic cm_t hadamard_m();
    cm_t m = zero_m();
    real s = 1.0 / $sqrt(2.0);
    m.re[0][0] = s; m.re[0][1] = s; m.re[1][0] = s; m.re[1][1] = -s;
    return m;
  endfunction

  function automatic cm_t phase_m();
    cm_t m = zero_m();
    m.re[0][0] = 1.0; m.im[1][1] = 1.0;
    return m;
  endfunction

  // CNOT with the control on the first tensor factor.
  function automatic cm_t cnot_m();
    cm_t m = zero_m();
    m.re[0][0] = 1.0; m.re[1][1] = 1.0; m.re[2][3] = 1.0; m.re[3][2] = 1.0;
    return m;
  endfunction

  // Product of two literals as matrices: a * b = i^k * Pauli(p).
  function automatic void lit_mul(input int a, input int b, output int p, output int k);
    bit ok;
    ident1(mul(pauli_m(a), pauli_m(b), 2), p, k, ok);
  endfunction

endpackage
