// tb_qc_emulator_top: end-to-end test of both emulators through the top, at
// reduced sizes (8-qubit Heisenberg emulator, 4-qubit state-vector
// emulator). The two emulators run at the same time. Every mechanism of the
// design is counted and must occur at least once:
//   Heisenberg: INIT, H, phase, CNOT, row multiplication, a row sign flip
//               caused by a gate, a non-zero initial basis state;
//   state vector: INIT, H, X, Z, R_k, a controlled gate, swap;
//   both: overlapping runs, done exactly len + 2 clocks after start.
module tb_qc_emulator_top;
  import pauli_pkg::*;
  import sv_pkg::*;
  import tb_hzref_pkg::*;
  import tb_svref_pkg::*;

  localparam int HN = 8, SQ = 4, DEPTH = 256, AW = 8, DIM = 1 << SQ;

  logic                clk = 0, rst_n = 0;
  logic                hz_ld_we = 0, sv_ld_we = 0, hz_start = 0, sv_start = 0;
  logic [AW-1:0]       hz_ld_addr = '0, sv_ld_addr = '0;
  hz_instr_t           hz_ld_data;
  sv_instr_t           sv_ld_data;
  logic [AW:0]         hz_len = '0, sv_len = '0;
  logic [HN-1:0]       hz_init_state = '0;
  logic                hz_busy, hz_done, sv_busy, sv_done, hz_commute;
  logic [HZ_IDX_W-1:0] hz_rd_row = '0;
  logic [HN-1:0]       hz_rd_x, hz_rd_z;
  iphase_t             hz_rd_ph;
  logic [SQ-1:0]       sv_rd_idx = '0;
  cplx_t               sv_rd_amp;

  qc_emulator_top #(.HZ_N(HN), .HZ_DEPTH(DEPTH), .SV_NQ(SQ), .SV_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hz_op[8];
  int n_sv_gate[4];
  int n_init_sv = 0, n_ctrl = 0, n_swap = 0, n_flip = 0, n_init_nonzero = 0, n_overlap = 0;

  hz_instr_t hc[$];
  sv_instr_t sc[$];
  hz_ref     hr;
  sv_ref     sr;

  initial begin
    int hz_cyc, sv_cyc, cyc, prev_ph[];
    hz_ld_data = '0; sv_ld_data = '0;
    hr = new(HN);
    sr = new(SQ);
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int run = 0; run < 4; run++) begin
      hc.delete(); sc.delete();
      hz_init_state = HN'($urandom);
      if (hz_init_state != 0) n_init_nonzero++;
      hc.push_back(hz_mk(HZ_INIT, 0, 0));
      for (int g = 0; g < 120; g++) hc.push_back(hz_random(HN));
      sc.push_back(mk(SV_INIT, G_H, 0, 0, 0, $urandom_range(0, DIM - 1)));
      for (int g = 0; g < 40; g++) begin
        automatic int tg = $urandom_range(0, SQ - 1);
        if ($urandom_range(0, 7) == 0) sc.push_back(mk(SV_SWAP, G_H, 0, tg, (tg + 1) % SQ, 0));
        else sc.push_back(mk(SV_GATE, sv_gate_e'($urandom_range(0, 3)), $urandom_range(1, 8), tg, 0,
                             $urandom_range(0, 2) == 0 ? $urandom_range(1, DIM - 1) : 0));
      end
      if (run == 0) qft_circuit(SQ, sc);
      // reference runs and mechanism counts
      foreach (hc[i]) begin
        prev_ph = hr.ph;
        hr.apply(hc[i], 256'(hz_init_state));
        n_hz_op[int'(hc[i].op)]++;
        if (hc[i].op inside {HZ_H, HZ_P, HZ_CNOT})
          foreach (prev_ph[r]) if (prev_ph[r] != hr.ph[r]) begin n_flip++; break; end
      end
      foreach (sc[i]) begin
        sr.apply(sc[i]);
        if (sc[i].op == SV_INIT) n_init_sv++;
        if (sc[i].op == SV_SWAP) n_swap++;
        if (sc[i].op == SV_GATE) begin
          n_sv_gate[int'(sc[i].gate)]++;
          if ((int'(sc[i].data) & ~(1 << int'(sc[i].tgt))) != 0) n_ctrl++;
        end
      end
      // load both
      for (int i = 0; i < hc.size() || i < sc.size(); i++) begin
        @(negedge clk);
        hz_ld_we = (i < hc.size()); hz_ld_addr = AW'(i); if (i < hc.size()) hz_ld_data = hc[i];
        sv_ld_we = (i < sc.size()); sv_ld_addr = AW'(i); if (i < sc.size()) sv_ld_data = sc[i];
      end
      @(negedge clk);
      hz_ld_we = 0; sv_ld_we = 0;
      hz_start = 1; hz_len = (AW+1)'(hc.size());
      sv_start = 1; sv_len = (AW+1)'(sc.size());
      @(negedge clk);
      hz_start = 0; sv_start = 0;
      cyc = 1; hz_cyc = -1; sv_cyc = -1;
      while ((hz_cyc < 0 || sv_cyc < 0) && cyc < 2000) begin
        if (hz_busy && sv_busy) n_overlap++;
        if (hz_done) hz_cyc = cyc;
        if (sv_done) sv_cyc = cyc;
        @(negedge clk); cyc++;
      end
      checks++;
      if (hz_cyc != hc.size() + 2 || sv_cyc != sc.size() + 2) begin
        failures++; $display("FAIL run %0d: done at %0d / %0d", run, hz_cyc, sv_cyc);
      end
      for (int r = 0; r < HN; r++) begin
        hz_rd_row = HZ_IDX_W'(r);
        #1;
        checks++;
        for (int j = 0; j < HN; j++)
          if (int'({hz_rd_x[j], hz_rd_z[j]}) != hr.lit[r][j] || int'(hz_rd_ph) != hr.ph[r]) begin
            failures++; $display("FAIL run %0d: stabilizer row %0d", run, r); break;
          end
      end
      for (int i = 0; i < DIM; i++) begin
        real gr, gi;
        sv_rd_idx = SQ'(i);
        #1;
        gr = real'(sv_rd_amp.re) / real'(1 << FX_FRAC);
        gi = real'(sv_rd_amp.im) / real'(1 << FX_FRAC);
        checks++;
        if (gr - sr.re[i] > 0.005 || sr.re[i] - gr > 0.005 ||
            gi - sr.im[i] > 0.005 || sr.im[i] - gi > 0.005) begin
          failures++;
          $display("FAIL run %0d amp %0d: got (%f,%f) expected (%f,%f)", run, i, gr, gi,
                   sr.re[i], sr.im[i]);
        end
      end
    end

    $display("heisenberg: init %0d H %0d P %0d CNOT %0d ROWMUL %0d sign-flips %0d nonzero-init %0d",
             n_hz_op[HZ_INIT], n_hz_op[HZ_H], n_hz_op[HZ_P], n_hz_op[HZ_CNOT], n_hz_op[HZ_ROWMUL],
             n_flip, n_init_nonzero);
    $display("state vector: init %0d H %0d X %0d Z %0d R %0d controlled %0d swap %0d; overlap %0d",
             n_init_sv, n_sv_gate[G_H], n_sv_gate[G_X], n_sv_gate[G_Z], n_sv_gate[G_R], n_ctrl,
             n_swap, n_overlap);
    foreach (n_sv_gate[i]) begin checks++; if (n_sv_gate[i] == 0) failures++; end
    for (int i = 1; i <= 5; i++) begin checks++; if (n_hz_op[i] == 0) failures++; end
    checks++; if (n_init_sv == 0 || n_ctrl == 0 || n_swap == 0) failures++;
    checks++; if (n_flip == 0 || n_init_nonzero == 0 || n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
