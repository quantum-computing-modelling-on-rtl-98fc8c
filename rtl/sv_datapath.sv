// sv_datapath: state-vector datapath that applies one gate to the whole
// 2^NQ-amplitude state vector per clock.
//
// Applying a single-qubit gate U on qubit t is, in matrix form, a product
// with I (x) ... (x) U (x) ... (x) I. The datapath never builds that matrix:
// the tensor product only ever mixes the two amplitudes whose indices differ
// in bit t, so each amplitude i is updated as
//   new[i] = u00*a[i] + u01*a[i^2^t]   if bit t of i is 0
//   new[i] = u10*a[i^2^t] + u11*a[i]   if bit t of i is 1
// (two complex multiplies and an add per amplitude). A controlled gate does
// the same only for the indices whose control bits (mask in data) are all 1
// and leaves the others; this covers CNOT, Toffoli, controlled phase shifts
// and multi-controlled Z. SWAP permutes the amplitudes, INIT loads the basis
// state |data>. All amplitudes are computed in parallel; successive gates
// reuse the same arithmetic one after another, so a circuit of g gates takes
// g clocks in a single shared stage instead of a g-stage pipeline.
//
// Interface: in_valid with in_instr and the gate's coefficients u00..u11;
// always ready; the result is visible on rd_amp (combinational read of
// amplitude rd_idx) one clock later. The amplitude format is sv_pkg's; the
// number of arithmetic lanes (all 2^NQ amplitudes at once) and the
// instruction encoding are this design's choices.
module sv_datapath
  import sv_pkg::*;
#(
  parameter int unsigned NQ = 8,
  localparam int unsigned DIM = 1 << NQ
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  sv_instr_t     in_instr,
  input  cplx_t         u00,
  input  cplx_t         u01,
  input  cplx_t         u10,
  input  cplx_t         u11,
  input  logic [NQ-1:0] rd_idx,
  output cplx_t         rd_amp
);

  cplx_t amp_q [DIM];
  cplx_t gate_d[DIM];
  cplx_t swap_d[DIM];

  logic [NQ-1:0] tgt, arg, ctrl;
  assign tgt  = NQ'(in_instr.tgt);
  assign arg  = NQ'(in_instr.arg);
  assign ctrl = in_instr.data[NQ-1:0] & ~(NQ'(1) << tgt);

  for (genvar i = 0; i < DIM; i++) begin : g_amp
    logic  bit_t;
    cplx_t partner, a_own, a_oth, c_own, c_oth, p_own, p_oth, swp;

    // Amplitude paired with i by the target qubit, and by a swap.
    always_comb begin
      partner = amp_q[i];
      swp     = amp_q[i];
      bit_t   = 1'b0;
      for (int q = 0; q < NQ; q++) begin
        if (tgt == NQ'(q)) begin
          partner = amp_q[i ^ (1 << q)];
          bit_t   = 1'((i >> q) & 1);
        end
        for (int s = 0; s < NQ; s++) begin
          if (tgt == NQ'(q) && arg == NQ'(s)
              && (((i >> q) & 1) != ((i >> s) & 1)))
            swp = amp_q[i ^ (1 << q) ^ (1 << s)];
        end
      end
    end

    assign a_own = amp_q[i];
    assign a_oth = partner;
    assign c_own = bit_t ? u11 : u00;
    assign c_oth = bit_t ? u10 : u01;

    complex_mult u_m_own (.a(c_own), .b(a_own), .p(p_own));
    complex_mult u_m_oth (.a(c_oth), .b(a_oth), .p(p_oth));

    always_comb begin
      if ((NQ'(i) & ctrl) == ctrl) begin
        gate_d[i].re = p_own.re + p_oth.re;
        gate_d[i].im = p_own.im + p_oth.im;
      end else begin
        gate_d[i] = amp_q[i];
      end
    end

    assign swap_d[i] = swp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIM; i++)
        amp_q[i] <= (i == 0) ? '{re: FX_ONE, im: FX_ZERO} : '{re: FX_ZERO, im: FX_ZERO};
    end else if (in_valid) begin
      unique case (in_instr.op)
        SV_INIT:
          for (int i = 0; i < DIM; i++)
            amp_q[i] <= (NQ'(i) == in_instr.data[NQ-1:0]) ? '{re: FX_ONE, im: FX_ZERO}
                                                          : '{re: FX_ZERO, im: FX_ZERO};
        SV_GATE:
          for (int i = 0; i < DIM; i++) amp_q[i] <= gate_d[i];
        SV_SWAP:
          for (int i = 0; i < DIM; i++) amp_q[i] <= swap_d[i];
        default: ;
      endcase
    end
  end

  assign rd_amp = amp_q[rd_idx];

  a_qubits_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_instr.op inside {SV_GATE, SV_SWAP}
      |-> (32'(in_instr.tgt) < NQ) && (in_instr.op == SV_GATE || 32'(in_instr.arg) < NQ));

endmodule
