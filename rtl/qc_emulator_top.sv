// qc_emulator_top: the two quantum-circuit emulators side by side.
//
// hz_*: the Heisenberg-model emulator. It tracks a stabilizer circuit on n
//       qubits (default 120) as an n-by-n matrix of Pauli literals with row
//       phases, at one Clifford gate per clock.
// sv_*: the state-vector emulator. It tracks an arbitrary circuit of
//       single-qubit, controlled and swap gates on NQ qubits (default 8) as
//       2^NQ complex amplitudes, at one gate per clock.
// The two share no state; each has its own circuit load port, start/len/
// busy/done handshake and read port, brought out unchanged. Both use the
// same circuit-buffer and gate-sequencer blocks. See the two emulators for
// timing.
module qc_emulator_top
  import pauli_pkg::*;
  import sv_pkg::*;
#(
  parameter int unsigned HZ_N     = 120,
  parameter int unsigned HZ_DEPTH = 1024,
  parameter int unsigned SV_NQ    = 8,
  parameter int unsigned SV_DEPTH = 1024,
  localparam int unsigned HZ_AW   = $clog2(HZ_DEPTH),
  localparam int unsigned SV_AW   = $clog2(SV_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  // Heisenberg-model emulator
  input  logic                hz_ld_we,
  input  logic [HZ_AW-1:0]    hz_ld_addr,
  input  hz_instr_t           hz_ld_data,
  input  logic                hz_start,
  input  logic [HZ_AW:0]      hz_len,
  input  logic [HZ_N-1:0]     hz_init_state,
  output logic                hz_busy,
  output logic                hz_done,
  input  logic [HZ_IDX_W-1:0] hz_rd_row,
  output logic [HZ_N-1:0]     hz_rd_x,
  output logic [HZ_N-1:0]     hz_rd_z,
  output iphase_t             hz_rd_ph,
  output logic                hz_commute,
  // state-vector emulator
  input  logic                sv_ld_we,
  input  logic [SV_AW-1:0]    sv_ld_addr,
  input  sv_instr_t           sv_ld_data,
  input  logic                sv_start,
  input  logic [SV_AW:0]      sv_len,
  output logic                sv_busy,
  output logic                sv_done,
  input  logic [SV_NQ-1:0]    sv_rd_idx,
  output cplx_t               sv_rd_amp
);

  heisenberg_emulator #(.N(HZ_N), .DEPTH(HZ_DEPTH)) u_hz (
    .clk        (clk),
    .rst_n      (rst_n),
    .ld_we      (hz_ld_we),
    .ld_addr    (hz_ld_addr),
    .ld_data    (hz_ld_data),
    .start      (hz_start),
    .len        (hz_len),
    .init_state (hz_init_state),
    .busy       (hz_busy),
    .done       (hz_done),
    .rd_row     (hz_rd_row),
    .rd_x       (hz_rd_x),
    .rd_z       (hz_rd_z),
    .rd_ph      (hz_rd_ph),
    .commute    (hz_commute)
  );

  state_vector_emulator #(.NQ(SV_NQ), .DEPTH(SV_DEPTH)) u_sv (
    .clk     (clk),
    .rst_n   (rst_n),
    .ld_we   (sv_ld_we),
    .ld_addr (sv_ld_addr),
    .ld_data (sv_ld_data),
    .start   (sv_start),
    .len     (sv_len),
    .busy    (sv_busy),
    .done    (sv_done),
    .rd_idx  (sv_rd_idx),
    .rd_amp  (sv_rd_amp)
  );

endmodule
