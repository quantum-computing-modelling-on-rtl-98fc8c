// stabilizer_matrix: the n-by-n stabilizer matrix of an n-qubit state and the
// logic that updates it, one instruction per clock.
//
// Row r holds n Pauli literals L(r,1..n) as two bit vectors x[r], z[r] and a
// phase ph[r] (power of i). A Clifford gate touches only the column(s) of the
// qubit(s) it acts on: a Hadamard or phase gate on qubit t rewrites column t,
// a CNOT rewrites columns c and t, and every row is rewritten at once by its
// own clifford_conj instance, negating the row's phase where the conjugation
// says so. INIT loads a computational basis state: row r becomes Z_r with
// sign + for |0> and - for |1> of qubit r (init_state[r]). ROWMUL replaces
// row a by row b * row a through one row_multiplier; this leaves the
// stabilized state unchanged when the two rows commute, and commute_o
// reports whether they did.
//
// Interface: in_valid/in_instr issue an instruction; the matrix is always
// ready. The new matrix is visible on the read port (rd_row -> rd_x, rd_z,
// rd_ph, combinational) one clock after the instruction is issued.
// The storage layout, the one-gate-per-clock timing and the opcodes are this
// design's choices; the literal code, the update tables and the row product
// follow the Heisenberg-model description the design is based on.
module stabilizer_matrix
  import pauli_pkg::*;
#(
  parameter int unsigned N = 120
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  hz_instr_t           in_instr,
  input  logic [N-1:0]        init_state,
  input  logic [HZ_IDX_W-1:0] rd_row,
  output logic [N-1:0]        rd_x,
  output logic [N-1:0]        rd_z,
  output iphase_t             rd_ph,
  output logic                commute_o     // result of the last ROWMUL
);

  logic [N-1:0] x_q  [N];
  logic [N-1:0] z_q  [N];
  iphase_t      ph_q [N];

  // ---------------------------------------------------------------- columns
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ca, cb;
  assign ca = in_instr.a[IW-1:0];
  assign cb = in_instr.b[IW-1:0];

  conj_op_e conj_op;
  always_comb begin
    unique case (in_instr.op)
      HZ_P:    conj_op = CONJ_P;
      HZ_CNOT: conj_op = CONJ_CNOT;
      default: conj_op = CONJ_H;
    endcase
  end

  logic [N-1:0] gx_d [N];
  logic [N-1:0] gz_d [N];
  iphase_t      gph_d[N];

  for (genvar r = 0; r < N; r++) begin : g_row
    pauli_t la, lb, oa, ob;
    logic   flip;
    assign la = {x_q[r][ca], z_q[r][ca]};
    assign lb = {x_q[r][cb], z_q[r][cb]};

    clifford_conj u_conj (
      .op   (conj_op),
      .la   (la),
      .lb   (lb),
      .oa   (oa),
      .ob   (ob),
      .flip (flip)
    );

    always_comb begin
      gx_d[r] = x_q[r];
      gz_d[r] = z_q[r];
      gx_d[r][ca] = oa[1];
      gz_d[r][ca] = oa[0];
      if (in_instr.op == HZ_CNOT) begin
        gx_d[r][cb] = ob[1];
        gz_d[r][cb] = ob[0];
      end
      gph_d[r] = ph_q[r] + {flip, 1'b0};
    end
  end

  // ------------------------------------------------------- row multiplication
  logic [N-1:0] mx, mz;
  iphase_t      mph;
  logic         mcomm;

  row_multiplier #(.N(N)) u_rowmul (
    .lx (x_q[cb]), .lz (z_q[cb]), .lph (ph_q[cb]),
    .rx (x_q[ca]), .rz (z_q[ca]), .rph (ph_q[ca]),
    .px (mx),      .pz (mz),      .pph (mph),
    .commute (mcomm)
  );

  // ------------------------------------------------------------------ update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) begin
        x_q[r]  <= '0;
        z_q[r]  <= N'(1) << r;
        ph_q[r] <= '0;
      end
      commute_o <= 1'b1;
    end else if (in_valid) begin
      unique case (in_instr.op)
        HZ_INIT: begin
          for (int r = 0; r < N; r++) begin
            x_q[r]  <= '0;
            z_q[r]  <= N'(1) << r;
            ph_q[r] <= {init_state[r], 1'b0};
          end
        end
        HZ_H, HZ_P, HZ_CNOT: begin
          for (int r = 0; r < N; r++) begin
            x_q[r]  <= gx_d[r];
            z_q[r]  <= gz_d[r];
            ph_q[r] <= gph_d[r];
          end
        end
        HZ_ROWMUL: begin
          x_q[ca]   <= mx;
          z_q[ca]   <= mz;
          ph_q[ca]  <= mph;
          commute_o <= mcomm;
        end
        default: ;
      endcase
    end
  end

  assign rd_x  = x_q[rd_row[IW-1:0]];
  assign rd_z  = z_q[rd_row[IW-1:0]];
  assign rd_ph = ph_q[rd_row[IW-1:0]];

  // Gate and row operands must lie inside the matrix; a CNOT needs two
  // distinct qubits.
  a_operands_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_instr.op inside {HZ_H, HZ_P, HZ_CNOT, HZ_ROWMUL}
      |-> (32'(in_instr.a) < N) && (in_instr.op == HZ_H || in_instr.op == HZ_P || 32'(in_instr.b) < N));
  a_cnot_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_instr.op == HZ_CNOT |-> ca != cb);

endmodule
