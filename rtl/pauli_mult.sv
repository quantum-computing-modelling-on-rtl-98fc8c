// pauli_mult: product of two Pauli literals, a * b (a on the left).
//
// The literal of the product is the XOR of the two {x, z} codes; its phase is
// looked up in the Pauli multiplication table (I, X, Y, Z rows times I, X, Y, Z
// columns, e.g. X*Y = iZ, Y*X = -iZ) and returned as an exponent of i. Equal
// literals or a factor I give phase 1 (exponent 0); otherwise the two
// anticommute and the exponent is 1 or 3. Purely combinational. The literal
// code and the table are those of the Heisenberg-model description this
// design follows; reading the table with the row as the left factor is this
// design's reading.
module pauli_mult
  import pauli_pkg::*;
(
  input  pauli_t  a,      // left factor
  input  pauli_t  b,      // right factor
  output pauli_t  p,      // product literal
  output iphase_t e       // product phase i^e
);

  assign p = a ^ b;

  always_comb begin
    unique case ({a, b})
      {PAULI_X, PAULI_Y}: e = 2'd1;   //  X*Y =  iZ
      {PAULI_X, PAULI_Z}: e = 2'd3;   //  X*Z = -iY
      {PAULI_Y, PAULI_X}: e = 2'd3;   //  Y*X = -iZ
      {PAULI_Y, PAULI_Z}: e = 2'd1;   //  Y*Z =  iX
      {PAULI_Z, PAULI_X}: e = 2'd1;   //  Z*X =  iY
      {PAULI_Z, PAULI_Y}: e = 2'd3;   //  Z*Y = -iX
      default:            e = 2'd0;   //  commuting pairs
    endcase
  end

endmodule
