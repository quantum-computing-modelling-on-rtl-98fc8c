// clifford_conj: conjugation of Pauli literals by a stabilizer (Clifford) gate.
//
// One instance updates the literal(s) of one stabilizer-matrix row in the
// column(s) a gate acts on. Hadamard and phase act on literal la only; CNOT
// takes the control-column literal la and the target-column literal lb. On the
// {x, z} code:
//   H    : X -> Z, Z -> X, Y -> -Y           (swap x and z, minus for Y)
//   P    : X -> Y, Y -> -X, Z -> Z           (z ^= x, minus for Y)
//   CNOT : x_t ^= x_c, z_c ^= z_t, minus when x_c & z_t & ~(x_t ^ z_c)
// The CNOT rule reproduces every listed case of the conjugation table (for
// example Y_c Y_t -> -X_c Z_t) and, being linear in the literals, extends it
// to the pairs the table leaves out. flip asks the row to negate its phase.
// The conjugation table is the source's; the bit-level rules are this
// design's compact form of it.
// Purely combinational.
module clifford_conj
  import pauli_pkg::*;
(
  input  conj_op_e op,
  input  pauli_t   la,     // literal in column a (single-qubit target, or CNOT control)
  input  pauli_t   lb,     // literal in column b (CNOT target; ignored otherwise)
  output pauli_t   oa,
  output pauli_t   ob,
  output logic     flip    // result carries an extra factor -1
);

  logic xa, za, xb, zb;
  assign {xa, za} = la;
  assign {xb, zb} = lb;

  always_comb begin
    oa   = la;
    ob   = lb;
    flip = 1'b0;
    unique case (op)
      CONJ_H: begin
        oa   = {za, xa};
        flip = xa & za;
      end
      CONJ_P: begin
        oa   = {xa, za ^ xa};
        flip = xa & za;
      end
      CONJ_CNOT: begin
        oa   = {xa, za ^ zb};
        ob   = {xb ^ xa, zb};
        flip = xa & zb & ~(xb ^ za);
      end
      default: ;
    endcase
  end

endmodule
