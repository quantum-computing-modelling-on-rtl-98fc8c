// sv_pkg: shared types of the state-vector emulator.
//
// Amplitudes are complex numbers in signed fixed point, 18 bits per part with
// 16 fraction bits (range [-2, 2), one unit in the last place is 2^-16). 18 bits
// matches the multiplier width of common FPGA DSP blocks; the format itself is
// this design's choice. A gate instruction names an operation, a gate type, a
// target qubit, a second qubit (for swap), a phase-shift order k (R_k rotates
// |1> by exp(2*pi*i/2^k)) and a data field that is the control mask of a gate
// or the basis-state index of an initialisation.
package sv_pkg;

  localparam int unsigned FX_W    = 18;
  localparam int unsigned FX_FRAC = 16;
  localparam int unsigned MAXQ    = 16;   // widest state the instruction word can address

  typedef logic signed [FX_W-1:0] fx_t;

  typedef struct packed {
    fx_t re;
    fx_t im;
  } cplx_t;

  localparam fx_t FX_ONE  = fx_t'(1 << FX_FRAC);
  localparam fx_t FX_ZERO = '0;

  typedef enum logic [1:0] {
    SV_NOP  = 2'd0,
    SV_INIT = 2'd1,   // state := basis state |data>
    SV_GATE = 2'd2,   // (controlled) single-qubit gate
    SV_SWAP = 2'd3    // swap qubits tgt and arg
  } sv_op_e;

  typedef enum logic [1:0] {
    G_H = 2'd0,       // Hadamard
    G_X = 2'd1,       // Pauli X (NOT; with controls: CNOT, Toffoli)
    G_Z = 2'd2,       // Pauli Z (with controls: multi-controlled Z)
    G_R = 2'd3        // phase shift R_k
  } sv_gate_e;

  typedef struct packed {
    sv_op_e          op;
    sv_gate_e        gate;
    logic [3:0]      k;      // R_k order, 1..8
    logic [3:0]      tgt;
    logic [3:0]      arg;
    logic [MAXQ-1:0] data;   // control mask (GATE) or basis index (INIT)
  } sv_instr_t;

endpackage
