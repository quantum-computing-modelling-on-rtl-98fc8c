// heisenberg_emulator: emulates a stabilizer circuit in the Heisenberg
// representation.
//
// The host loads the circuit (one hz_instr_t per gate) into the circuit
// buffer through the load port, sets init_state (the computational basis
// state that INIT loads) and pulses start with the number of gates. The gate
// sequencer then feeds the gates to the stabilizer matrix one per clock; each
// Clifford gate rewrites its column(s) of all n rows at once, so a g-gate
// circuit finishes g + 2 clocks after start (done pulses then) regardless of
// the number of qubits. The matrix can be read row by row at any time
// through rd_row; commute reports whether the rows of the last ROWMUL
// commuted. Only the stabilizer-matrix update is provided: measurement and
// the bookkeeping of the global phase factor are not part of this block.
module heisenberg_emulator
  import pauli_pkg::*;
#(
  parameter int unsigned N     = 120,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  // circuit load port
  input  logic                ld_we,
  input  logic [AW-1:0]       ld_addr,
  input  hz_instr_t           ld_data,
  // run control
  input  logic                start,
  input  logic [AW:0]         len,
  input  logic [N-1:0]        init_state,
  output logic                busy,
  output logic                done,
  // stabilizer matrix read port
  input  logic [HZ_IDX_W-1:0] rd_row,
  output logic [N-1:0]        rd_x,
  output logic [N-1:0]        rd_z,
  output iphase_t             rd_ph,
  output logic                commute
);

  logic          rd_en, issue_valid;
  logic [AW-1:0] rd_addr;
  hz_instr_t     instr;

  circuit_buffer #(.W($bits(hz_instr_t)), .DEPTH(DEPTH)) u_buf (
    .clk   (clk),
    .we    (ld_we),
    .waddr (ld_addr),
    .wdata (ld_data),
    .re    (rd_en),
    .raddr (rd_addr),
    .rdata (instr)
  );

  gate_sequencer #(.DEPTH(DEPTH)) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .len         (len),
    .rd_en       (rd_en),
    .rd_addr     (rd_addr),
    .issue_valid (issue_valid),
    .busy        (busy),
    .done        (done)
  );

  stabilizer_matrix #(.N(N)) u_mat (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (issue_valid),
    .in_instr   (instr),
    .init_state (init_state),
    .rd_row     (rd_row),
    .rd_x       (rd_x),
    .rd_z       (rd_z),
    .rd_ph      (rd_ph),
    .commute_o  (commute)
  );

endmodule
