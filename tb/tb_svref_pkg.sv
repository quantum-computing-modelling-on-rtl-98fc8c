// tb_svref_pkg: floating-point state-vector reference for the testbenches.
//
// sv_ref holds 2^nq complex amplitudes as reals and applies gates the
// textbook way, by pairing amplitudes that differ in the target bit, with
// the exact (unrounded) gate matrices. It also builds the gate sequences of
// the quantum Fourier transform and of Grover's search.
package tb_svref_pkg;
  import sv_pkg::*;

  localparam real PI = 3.14159265358979323846;

  class sv_ref;
    int  nq;
    real re[];
    real im[];

    function new(int n);
      nq = n;
      re = new[1 << n];
      im = new[1 << n];
      init(0);
    endfunction

    function void init(int idx);
      foreach (re[i]) begin re[i] = 0.0; im[i] = 0.0; end
      re[idx] = 1.0;
    endfunction

    // 2x2 matrix of a gate: m[row][col] as (re, im)
    static function void gate_m(sv_gate_e g, int k, output real mr[2][2], output real mi[2][2]);
      real h = 1.0 / $sqrt(2.0);
      mr = '{'{1.0, 0.0}, '{0.0, 1.0}};
      mi = '{'{0.0, 0.0}, '{0.0, 0.0}};
      case (g)
        G_H: mr = '{'{h, h}, '{h, -h}};
        G_X: mr = '{'{0.0, 1.0}, '{1.0, 0.0}};
        G_Z: mr = '{'{1.0, 0.0}, '{0.0, -1.0}};
        default:
          if (k >= 1 && k <= 8) begin
            mr[1][1] = $cos(2.0 * PI / real'(1 << k));
            mi[1][1] = $sin(2.0 * PI / real'(1 << k));
          end
      endcase
    endfunction

    function void gate(sv_gate_e g, int k, int tgt, int ctrl);
      real mr[2][2], mi[2][2];
      int  c = ctrl & ~(1 << tgt);
      gate_m(g, k, mr, mi);
      for (int i = 0; i < (1 << nq); i++) begin
        if (((i >> tgt) & 1) == 0 && (i & c) == c) begin
          int j = i | (1 << tgt);
          real ar = re[i], ai = im[i], br = re[j], bi = im[j];
          re[i] = mr[0][0]*ar - mi[0][0]*ai + mr[0][1]*br - mi[0][1]*bi;
          im[i] = mr[0][0]*ai + mi[0][0]*ar + mr[0][1]*bi + mi[0][1]*br;
          re[j] = mr[1][0]*ar - mi[1][0]*ai + mr[1][1]*br - mi[1][1]*bi;
          im[j] = mr[1][0]*ai + mi[1][0]*ar + mr[1][1]*bi + mi[1][1]*br;
        end
      end
    endfunction

    function void swap(int a, int b);
      for (int i = 0; i < (1 << nq); i++)
        if (((i >> a) & 1) == 1 && ((i >> b) & 1) == 0) begin
          int j = i ^ (1 << a) ^ (1 << b);
          real tr = re[i], ti = im[i];
          re[i] = re[j]; im[i] = im[j];
          re[j] = tr;    im[j] = ti;
        end
    endfunction

    function void apply(sv_instr_t ins);
      case (ins.op)
        SV_INIT: init(int'(ins.data));
        SV_GATE: gate(ins.gate, int'(ins.k), int'(ins.tgt), int'(ins.data));
        SV_SWAP: swap(int'(ins.tgt), int'(ins.arg));
        default: ;
      endcase
    endfunction
  endclass

  function automatic sv_instr_t mk(sv_op_e op, sv_gate_e g, int k, int tgt, int arg, int data);
    sv_instr_t s;
    s.op = op; s.gate = g; s.k = 4'(k); s.tgt = 4'(tgt); s.arg = 4'(arg); s.data = MAXQ'(data);
    return s;
  endfunction

  // Quantum Fourier transform on n qubits, qubit n-1 the most significant:
  // H and controlled R_k on each qubit from the top down, then swaps to
  // restore the bit order.
  function automatic void qft_circuit(int n, ref sv_instr_t c[$]);
    for (int q = n - 1; q >= 0; q--) begin
      c.push_back(mk(SV_GATE, G_H, 0, q, 0, 0));
      for (int m = q - 1; m >= 0; m--)
        c.push_back(mk(SV_GATE, G_R, q - m + 1, q, 0, 1 << m));
    end
    for (int q = 0; q < n / 2; q++)
      c.push_back(mk(SV_SWAP, G_H, 0, q, n - 1 - q, 0));
  endfunction

  // Grover's search for basis state 'marked' on n qubits, 'iters' rounds.
  // Oracle: X on the zero bits of marked, multi-controlled Z, X again.
  // Diffusion: H, X on all, multi-controlled Z, X, H on all.
  function automatic void grover_circuit(int n, int marked, int iters, ref sv_instr_t c[$]);
    int all = (1 << n) - 1;
    c.push_back(mk(SV_INIT, G_H, 0, 0, 0, 0));
    for (int q = 0; q < n; q++) c.push_back(mk(SV_GATE, G_H, 0, q, 0, 0));
    for (int it = 0; it < iters; it++) begin
      for (int q = 0; q < n; q++)
        if (((marked >> q) & 1) == 0) c.push_back(mk(SV_GATE, G_X, 0, q, 0, 0));
      c.push_back(mk(SV_GATE, G_Z, 0, 0, 0, all));
      for (int q = 0; q < n; q++)
        if (((marked >> q) & 1) == 0) c.push_back(mk(SV_GATE, G_X, 0, q, 0, 0));
      for (int q = 0; q < n; q++) c.push_back(mk(SV_GATE, G_H, 0, q, 0, 0));
      for (int q = 0; q < n; q++) c.push_back(mk(SV_GATE, G_X, 0, q, 0, 0));
      c.push_back(mk(SV_GATE, G_Z, 0, 0, 0, all));
      for (int q = 0; q < n; q++) c.push_back(mk(SV_GATE, G_X, 0, q, 0, 0));
      for (int q = 0; q < n; q++) c.push_back(mk(SV_GATE, G_H, 0, q, 0, 0));
    end
  endfunction

endpackage
