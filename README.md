# Quantum-circuit emulators in SystemVerilog: state vector and Heisenberg (stabilizer) models

A classical machine that emulates an n-qubit quantum circuit has to hold a
description of the quantum state. This RTL offers two such descriptions, each
with its own emulator:

* **State-vector emulator.** Holds all 2^n complex amplitudes and applies each
  gate to them. It works for any gate, but its storage and arithmetic double with
  every added qubit. The default is 8 qubits, i.e. 256 amplitudes.
* **Heisenberg-model emulator.** Describes the state by the n Pauli operators
  that leave it unchanged: its *stabilizers*. These are stored as an n-by-n
  matrix of Pauli literals (I, X, Y, Z), plus a phase per row. Stabilizer
  (Clifford) gates (Hadamard, phase, CNOT) map Pauli operators to Pauli
  operators. Applying such a gate therefore only rewrites the one or two matrix
  columns of the qubits it acts on. Storage grows as n^2, so the default is 120
  qubits. Only stabilizer circuits can be emulated this way.

Both emulators apply one gate per clock through a single shared datapath, so
a circuit of g gates finishes in g + 2 clocks. They sit side by side in
`qc_emulator_top` and share no state.

## The Heisenberg model in hardware

### Literal code and products

A Pauli literal is two bits `{x, z}`:

| literal | I  | X  | Y  | Z  |
|---------|----|----|----|----|
| code    | 00 | 10 | 11 | 01 |

With this code, the literal part of a product of two Pauli matrices is simply
the XOR of the codes. The product can also carry a factor i or -i, and this
factor depends on the order of the operands:

| left \ right | I | X   | Y   | Z   |
|--------------|---|-----|-----|-----|
| I            | I | X   | Y   | Z   |
| X            | X | I   | iZ  | -iY |
| Y            | Y | -iZ | I   | iX  |
| Z            | Z | iY  | -iX | I   |

`pauli_mult` implements this table. It returns the phase as an exponent e of
i^e. The phase is 1 when the two literals commute (equal, or one of them is I).
It is ±i when they anticommute.

### Column update by Clifford gates

When a gate acts on qubit t, it conjugates column t of every row of the matrix
(P -> U P U^dagger). A CNOT does the same on its control column c and target
column t together. `clifford_conj` does this for one row, on the codes:

| gate | new literal(s)                        | row sign flips when      |
|------|---------------------------------------|--------------------------|
| H    | swap x and z (X<->Z, Y -> -Y)          | x & z (the literal is Y) |
| S    | z ^= x (X -> Y, Y -> -X, Z -> Z)      | x & z                    |
| CNOT | x_t ^= x_c, z_c ^= z_t                | x_c & z_t & ~(x_t ^ z_c) |

For example, the CNOT rule maps X_c I_t to X_c X_t and I_c Z_t to Z_c Z_t.
It maps Y_c Y_t to -X_c Z_t.

`stabilizer_matrix` has one `clifford_conj` per row. On a gate it rewrites the
selected column(s) of all n rows in the same clock and updates each row's
phase. It stores 2·n² literal bits and 2·n phase bits in flip-flops. At n = 120
that is 28,800 + 240 bits.

### Row phases and row multiplication

The same state has many equivalent stabilizer matrices. The Bell state
(|00> + |11>)/sqrt(2), for example, is stabilized by the rows `+XX, +ZZ`. It is
equally described by `-YY, +ZZ`, because (ZZ)(XX) = (ZX)(ZX) = (iY)(iY) = -YY.

The instruction `ROWMUL a, b` replaces row a by row b · row a, with row b on the
left. `row_multiplier` forms the product with one `pauli_mult` per column. The
new phase is ph_b + ph_a plus the sum of all column phases, taken modulo 4.

Each row phase is kept as a power of i (2 bits), not just a sign. Two rows of
one stabilizer group always commute, so their product again has a phase of ±1.
The `commute` output reports whether the last two rows multiplied did commute.
Rows commute when an even number of columns anticommute.

### Basis-state initialisation

`INIT` loads the stabilizer matrix of a computational basis state: row j becomes
Z_j. Its sign is + if qubit j of `init_state` is 0 and - if it is 1. The reset
state is |0...0>.

### Instruction word (`pauli_pkg::hz_instr_t`, 19 bits)

| field | bits | meaning                                                  |
|-------|------|----------------------------------------------------------|
| op    | 3    | NOP, INIT, H, P (phase S), CNOT, ROWMUL                   |
| a     | 8    | qubit (H, P), control (CNOT), destination row (ROWMUL)   |
| b     | 8    | target (CNOT), source row, the left factor (ROWMUL)      |

## The state-vector model in hardware

### Applying a gate without a tensor product

In matrix form, a gate U on qubit t of n qubits is the 2^n x 2^n matrix
I ⊗ ... ⊗ U ⊗ ... ⊗ I. `sv_datapath` never forms this matrix. The product only
ever mixes two amplitudes whose indices differ in bit t, so each amplitude i is
updated as:

    bit t of i = 0:  new[i] = u00 * a[i] + u01 * a[i ^ 2^t]
    bit t of i = 1:  new[i] = u10 * a[i ^ 2^t] + u11 * a[i]

Each amplitude has its own lane with two complex multipliers. All 2^n lanes work
in the same clock. Each gate of the circuit then passes through these same lanes
in turn. So the arithmetic grows with the number of amplitudes but not with the
circuit's depth. A pipeline with one stage per gate would grow with both.

### Controlled gates and swap

A gate instruction carries a control mask. Lanes whose index does not have all
control bits set keep their amplitude. This one mechanism gives several gates:

* CNOT: X with one control.
* Toffoli: X with two controls.
* Controlled phase shifts.
* The multi-controlled Z used by Grover's search.

`SWAP` permutes the amplitudes: it exchanges bits tgt and arg of each index.
`INIT` loads a basis state |data>.

### Gate coefficients (`gate_coef_rom`)

| gate | matrix                                            |
|------|---------------------------------------------------|
| H    | 1/sqrt(2) [1 1; 1 -1]                             |
| X    | [0 1; 1 0]                                        |
| Z    | [1 0; 0 -1]                                       |
| R_k  | [1 0; 0 exp(2·pi·i/2^k)], k = 1..8 (R_2 = S, R_3 = T) |

Each entry is stored as round(value · 2^16). R_k for k = 1..8 covers the
controlled rotations of an 8-qubit quantum Fourier transform.

### Number format

Each real and imaginary part is 18-bit two's complement with 16 fraction bits,
so the range is [-2, 2). `complex_mult` keeps full-width products and rounds
each result once. After hundreds of gates the error is a few units of 2^-16 per
gate. For example, an 8-qubit Grover search of 513 gates ends within 0.02 of a
floating-point reference. The result's probabilities can therefore sum to
slightly more than 1.

### Instruction word (`sv_pkg::sv_instr_t`, 32 bits)

| field | bits | meaning                                             |
|-------|------|-----------------------------------------------------|
| op    | 2    | NOP, INIT, GATE, SWAP                               |
| gate  | 2    | H, X, Z, R (phase shift R_k)                         |
| k     | 4    | R_k order                                           |
| tgt   | 4    | target qubit (GATE) or first qubit (SWAP)            |
| arg   | 4    | second qubit (SWAP)                                  |
| data  | 16   | control mask (GATE) or basis index (INIT)            |

## Control: circuit buffer and gate sequencer

Both emulators are driven the same way:

1. The host writes the circuit, one instruction per word, through the load port
   (`ld_we`, `ld_addr`, `ld_data`). The words go into `circuit_buffer`, which
   holds 1024 words and has a synchronous read.
2. The host pulses `start` with `len`, the number of gates.
3. `gate_sequencer` reads addresses 0 .. len-1 on consecutive clocks. Each
   instruction reaches the datapath one clock after its read.
4. `done` pulses len + 2 clocks after `start`. `busy` is high in between, and a
   `start` while busy is ignored.

The state can be read at any time through the combinational read ports:
`rd_row` for a stabilizer row, `rd_idx` for an amplitude. The buffer may be
reloaded between runs. The state persists across runs unless a circuit begins
with `INIT`.

## Files

| file | contents |
|------|----------|
| `rtl/pauli_pkg.sv` | literal code, Heisenberg opcodes and instruction type |
| `rtl/sv_pkg.sv` | fixed-point complex type, state-vector opcodes and instruction type |
| `rtl/pauli_mult.sv` | literal product with phase |
| `rtl/clifford_conj.sv` | literal conjugation by H, S, CNOT |
| `rtl/row_multiplier.sv` | row product with phase sum and commute flag |
| `rtl/stabilizer_matrix.sv` | n-by-n stabilizer matrix and its update |
| `rtl/heisenberg_emulator.sv` | buffer + sequencer + stabilizer matrix |
| `rtl/complex_mult.sv` | fixed-point complex multiplier |
| `rtl/gate_coef_rom.sv` | 2x2 gate coefficients |
| `rtl/sv_datapath.sv` | all-amplitude gate, swap and init datapath |
| `rtl/state_vector_emulator.sv` | buffer + sequencer + coefficients + datapath |
| `rtl/circuit_buffer.sv`, `rtl/gate_sequencer.sv` | shared control |
| `rtl/qc_emulator_top.sv` | both emulators side by side |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_qc_full.sv` | the whole top at its default sizes |
| `tb/tb_qref_pkg.sv`, `tb/tb_hzref_pkg.sv`, `tb/tb_svref_pkg.sv` | reference models |

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `HZ_N` / `N` | 120 qubits | Heisenberg emulator |
| `SV_NQ` / `NQ` | 8 qubits | state-vector emulator |
| `HZ_DEPTH`, `SV_DEPTH` / `DEPTH` | 1024 gates | circuit buffers |

The instruction words limit the Heisenberg emulator to 256 qubits and the
state-vector emulator to 16. The state-vector datapath grows as 2^NQ lanes of
two complex multipliers each.

## Simulating

Every testbench checks itself. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops, or fails when its watchdog
expires. The references in `tb/` are written independently of the RTL rules:

* Literal conjugations and products are computed with explicit complex
  matrices (U·P·U^dagger).
* The state vector is computed in floating point with the exact gate matrices.

To build and run one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/pauli_pkg.sv rtl/sv_pkg.sv tb/tb_qref_pkg.sv tb/tb_svref_pkg.sv tb/tb_hzref_pkg.sv \
      tb/tb_qc_full.sv --top-module tb_qc_full -o sim
    ./obj_dir/sim

Replace `tb_qc_full` with any other testbench name. The other modules are found
through `-Irtl`.

What the system-level testbenches run:

* `tb_qc_full` runs the top at its default sizes:
  * a 120-qubit GHZ state (row 0 must become +X...X), then 400 random Clifford
    gates and row products;
  * an 8-qubit Grover search (item 77, 12 rounds, 513 gates), where the marked
    probability must exceed 0.99;
  * an 8-qubit QFT checked against the DFT formula;
  * the same two on 7 of the 8 qubits: Grover for item 45 (8 rounds, 296
    gates) and a 7-qubit QFT.

  Building it takes about a minute, and the run takes well under a second.
* `tb_qc_emulator_top` runs both emulators at the same time, at reduced sizes.
  It checks that every mechanism occurs at least once: each opcode, sign flips,
  controlled gates and swaps.

## Scope and departures

What this RTL covers, and the choices it makes where no specification was
available:

* **Not included: global phase bookkeeping.** In the Heisenberg model, the
  global phase factor of the state has to be tracked apart from the stabilizer
  matrix. Without it the emulator cannot handle non-stabilizer gates, such as
  the controlled rotations of a QFT. The Heisenberg emulator here handles
  stabilizer circuits only.
* **Not included: measurement.** Neither emulator implements measurement. The
  host reads the amplitudes or the stabilizer rows.
* **Own choices in the datapaths.** The state-vector datapath uses all 2^NQ
  lanes at once. The stabilizer matrix updates all rows in one clock. Both are
  the simplest structures that do the described operations; a design with fewer
  lanes, iterating over the amplitudes or rows, would trade speed for area.
* **Own choices in format and control.** The following are this design's
  choices:
  * the fixed-point format;
  * the instruction encodings;
  * the 1024-gate circuit buffer;
  * the start/len/done handshake;
  * the asynchronous low-active reset.
* **Synthesis.** The state-vector datapath at NQ = 8 has 512 complex multipliers,
  which is large for FPGA DSP resources. A real implementation would lower the
  lane count.
