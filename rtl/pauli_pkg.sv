// pauli_pkg: shared types of the Heisenberg-model (stabilizer) emulator.
//
// A Pauli literal is two bits {x, z}: I = 00, X = 10, Y = 11, Z = 01. This
// encoding is the one the design is built around; with it the product of two
// literals (ignoring phase) is their bitwise XOR, and Clifford gates become
// simple bit rewrites. A row phase is held as a power of i, 2 bits
// (0: +1, 1: +i, 2: -1, 3: -i). The instruction word of the emulator and its
// opcode set (H, phase, CNOT, row multiplication, initialise) are this
// design's own choice.
package pauli_pkg;

  typedef logic [1:0] pauli_t;

  localparam pauli_t PAULI_I = 2'b00;
  localparam pauli_t PAULI_X = 2'b10;
  localparam pauli_t PAULI_Y = 2'b11;
  localparam pauli_t PAULI_Z = 2'b01;

  // Power of i: phase factor i^e.
  typedef logic [1:0] iphase_t;

  // Gate selector of the literal conjugation unit.
  typedef enum logic [1:0] {
    CONJ_H    = 2'd0,   // Hadamard on column a
    CONJ_P    = 2'd1,   // phase gate S on column a
    CONJ_CNOT = 2'd2    // CNOT, control column a, target column b
  } conj_op_e;

  // Opcodes of the stabilizer-matrix instruction.
  typedef enum logic [2:0] {
    HZ_NOP    = 3'd0,
    HZ_INIT   = 3'd1,   // load a computational basis state (eq. 1.9 form)
    HZ_H      = 3'd2,   // Hadamard on qubit a
    HZ_P      = 3'd3,   // phase gate on qubit a
    HZ_CNOT   = 3'd4,   // CNOT, control a, target b
    HZ_ROWMUL = 3'd5    // row a := row b * row a (row b on the left)
  } hz_op_e;

  // Qubit / row index field: up to 256 qubits.
  localparam int unsigned HZ_IDX_W = 8;

  typedef struct packed {
    hz_op_e                op;
    logic [HZ_IDX_W-1:0]   a;
    logic [HZ_IDX_W-1:0]   b;
  } hz_instr_t;

endpackage
