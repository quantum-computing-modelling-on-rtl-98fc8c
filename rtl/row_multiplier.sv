// row_multiplier: product of two stabilizer-matrix rows, left * right.
//
// Each row is n Pauli literals (x and z bit vectors) and a phase i^ph. The
// product is formed column by column with one pauli_mult per column; the
// result phase is ph_left + ph_right + the sum of the column phases, modulo 4.
// Two rows commute exactly when the number of anticommuting columns is even,
// i.e. when the column-phase sum is even; commute reports that (for rows of
// one stabilizer group the product then again has phase +1 or -1).
// Purely combinational; the column-phase sum is a linear chain of 2-bit adds
// that synthesis balances. The row product follows the source's description
// of deriving equivalent stabilizer matrices; keeping the phase as a power of
// i and the commute flag are this design's additions.
module row_multiplier
  import pauli_pkg::*;
#(
  parameter int unsigned N = 120       // qubits = literals per row
) (
  input  logic [N-1:0] lx, lz,         // left row
  input  iphase_t      lph,
  input  logic [N-1:0] rx, rz,         // right row
  input  iphase_t      rph,
  output logic [N-1:0] px, pz,         // product row
  output iphase_t      pph,
  output logic         commute
);

  iphase_t col_e [N];

  for (genvar j = 0; j < N; j++) begin : g_col
    pauli_mult u_pm (
      .a ({lx[j], lz[j]}),
      .b ({rx[j], rz[j]}),
      .p ({px[j], pz[j]}),
      .e (col_e[j])
    );
  end

  iphase_t col_sum;
  always_comb begin
    col_sum = '0;
    for (int j = 0; j < N; j++) col_sum = col_sum + col_e[j];
  end

  assign pph     = lph + rph + col_sum;
  assign commute = ~col_sum[0];

endmodule
