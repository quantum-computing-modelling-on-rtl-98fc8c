// state_vector_emulator: emulates a quantum circuit on a 2^NQ-amplitude state
// vector.
//
// The host loads the circuit (one sv_instr_t per gate) into the circuit
// buffer and pulses start with the number of gates. The gate sequencer
// reads one gate per clock; the coefficient table turns its gate type into a
// 2x2 unitary; the datapath applies it to every amplitude at once. The same
// datapath serves every gate of the circuit in turn, so the arithmetic does
// not grow with the circuit's depth. A g-gate circuit finishes g + 2 clocks
// after start, when done pulses; amplitudes are read through rd_idx/rd_amp.
// Measurement is not part of this block: the host reads the amplitudes.
module state_vector_emulator
  import sv_pkg::*;
#(
  parameter int unsigned NQ    = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // circuit load port
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  sv_instr_t     ld_data,
  // run control
  input  logic          start,
  input  logic [AW:0]   len,
  output logic          busy,
  output logic          done,
  // amplitude read port
  input  logic [NQ-1:0] rd_idx,
  output cplx_t         rd_amp
);

  logic          rd_en, issue_valid;
  logic [AW-1:0] rd_addr;
  sv_instr_t     instr;
  cplx_t         u00, u01, u10, u11;

  circuit_buffer #(.W($bits(sv_instr_t)), .DEPTH(DEPTH)) u_buf (
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

  gate_coef_rom u_rom (
    .gate (instr.gate),
    .k    (instr.k),
    .u00  (u00),
    .u01  (u01),
    .u10  (u10),
    .u11  (u11)
  );

  sv_datapath #(.NQ(NQ)) u_dp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (issue_valid),
    .in_instr (instr),
    .u00      (u00),
    .u01      (u01),
    .u10      (u10),
    .u11      (u11),
    .rd_idx   (rd_idx),
    .rd_amp   (rd_amp)
  );

endmodule
