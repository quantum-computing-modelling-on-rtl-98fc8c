// tb_qc_full: one complete operation of each emulator with the top at its
// default sizes (120-qubit Heisenberg emulator, 8-qubit state-vector
// emulator, 1024-gate circuit buffers).
//  - Heisenberg: a 120-qubit GHZ state (H, 119 CNOTs) followed by 400 random
//    Clifford gates and row multiplications; the whole matrix is compared
//    with the reference, and after the GHZ part row 0 must be X on all 120
//    qubits.
//  - State vector: 8-qubit Grover's search for item 77 with 12 rounds
//    (about 700 gates), compared amplitude by amplitude with the
//    floating-point reference; the marked item's probability must exceed
//    0.99, and the run must take one clock per gate plus 2.
//  - State vector: 8-qubit QFT of |77>, checked against the DFT formula.
//  - The same two on 7 of the 8 qubits (qubit 7 stays |0>): Grover for item
//    45 with 8 rounds, and the 7-qubit QFT of |100>.
module tb_qc_full;
  import pauli_pkg::*;
  import sv_pkg::*;
  import tb_hzref_pkg::*;
  import tb_svref_pkg::*;

  localparam int HN = 120, SQ = 8, AW = 10, DIM = 1 << SQ;

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

  qc_emulator_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic hz_run(input hz_instr_t c[$]);
    int cyc;
    foreach (c[i]) begin
      @(negedge clk); hz_ld_we = 1; hz_ld_addr = AW'(i); hz_ld_data = c[i];
    end
    @(negedge clk); hz_ld_we = 0; hz_start = 1; hz_len = (AW+1)'(c.size());
    @(negedge clk); hz_start = 0;
    cyc = 1;
    while (!hz_done && cyc < 5000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != c.size() + 2) begin failures++; $display("FAIL hz run took %0d clocks", cyc); end
  endtask

  task automatic sv_run(input sv_instr_t c[$]);
    int cyc;
    foreach (c[i]) begin
      @(negedge clk); sv_ld_we = 1; sv_ld_addr = AW'(i); sv_ld_data = c[i];
    end
    @(negedge clk); sv_ld_we = 0; sv_start = 1; sv_len = (AW+1)'(c.size());
    @(negedge clk); sv_start = 0;
    cyc = 1;
    while (!sv_done && cyc < 5000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != c.size() + 2) begin failures++; $display("FAIL sv run took %0d clocks", cyc); end
  endtask

  task automatic hz_compare(input hz_ref hr, input string what);
    for (int r = 0; r < HN; r++) begin
      hz_rd_row = HZ_IDX_W'(r);
      #1;
      checks++;
      for (int j = 0; j < HN; j++)
        if (int'({hz_rd_x[j], hz_rd_z[j]}) != hr.lit[r][j] || int'(hz_rd_ph) != hr.ph[r]) begin
          failures++; $display("FAIL %s: row %0d", what, r); break;
        end
    end
  endtask

  function automatic real amp_re();
    return real'(sv_rd_amp.re) / real'(1 << FX_FRAC);
  endfunction
  function automatic real amp_im();
    return real'(sv_rd_amp.im) / real'(1 << FX_FRAC);
  endfunction

  initial begin
    hz_instr_t hc[$];
    sv_instr_t sc[$];
    hz_ref     hr;
    sv_ref     sr;
    real       gr, gi, er, ei, p, th;
    hz_ld_data = '0; sv_ld_data = '0;
    hr = new(HN);
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- Heisenberg: GHZ on 120 qubits
    hc.push_back(hz_mk(HZ_INIT, 0, 0));
    hc.push_back(hz_mk(HZ_H, 0, 0));
    for (int j = 1; j < HN; j++) hc.push_back(hz_mk(HZ_CNOT, 0, j));
    foreach (hc[i]) hr.apply(hc[i], '0);
    hz_run(hc);
    hz_compare(hr, "GHZ");
    hz_rd_row = 0; #1;
    checks++;
    if (hz_rd_x != '1 || hz_rd_z != '0 || hz_rd_ph != 0) begin
      failures++; $display("FAIL GHZ row 0 is not +X..X");
    end
    // ---- Heisenberg: random Clifford circuit from a random basis state
    hc.delete();
    hz_init_state = {$urandom, $urandom, $urandom, $urandom};
    hc.push_back(hz_mk(HZ_INIT, 0, 0));
    for (int g = 0; g < 400; g++) hc.push_back(hz_random(HN));
    foreach (hc[i]) hr.apply(hc[i], 256'(hz_init_state));
    hz_run(hc);
    hz_compare(hr, "random Clifford");

    // ---- State vector: Grover, 8 qubits
    grover_circuit(SQ, 77, 12, sc);
    sr = new(SQ);
    foreach (sc[i]) sr.apply(sc[i]);
    sv_run(sc);
    for (int y = 0; y < DIM; y++) begin
      sv_rd_idx = SQ'(y); #1;
      gr = amp_re(); gi = amp_im();
      checks++;
      if (gr - sr.re[y] > 0.02 || sr.re[y] - gr > 0.02 || gi - sr.im[y] > 0.02 || sr.im[y] - gi > 0.02) begin
        failures++; $display("FAIL Grover amp %0d: (%f,%f) vs (%f,%f)", y, gr, gi, sr.re[y], sr.im[y]);
      end
      if (y == 77) p = gr * gr + gi * gi;
    end
    $display("Grover: %0d gates, P(77) = %f", sc.size(), p);
    checks++;
    if (p < 0.99) begin failures++; $display("FAIL Grover probability %f", p); end

    // ---- State vector: QFT of |77>
    sc.delete();
    sc.push_back(mk(SV_INIT, G_H, 0, 0, 0, 77));
    qft_circuit(SQ, sc);
    sv_run(sc);
    for (int y = 0; y < DIM; y++) begin
      sv_rd_idx = SQ'(y); #1;
      th = 2.0 * PI * real'(77 * y) / real'(DIM);
      er = $cos(th) / 16.0; ei = $sin(th) / 16.0;
      gr = amp_re(); gi = amp_im();
      checks++;
      if (gr - er > 0.002 || er - gr > 0.002 || gi - ei > 0.002 || ei - gi > 0.002) begin
        failures++; $display("FAIL QFT amp %0d", y);
      end
    end
    // ---- 7-qubit Grover and QFT on the 8-qubit emulator
    sc.delete();
    grover_circuit(7, 45, 8, sc);
    sr = new(SQ);
    foreach (sc[i]) sr.apply(sc[i]);
    sv_run(sc);
    for (int y = 0; y < DIM; y++) begin
      sv_rd_idx = SQ'(y); #1;
      gr = amp_re(); gi = amp_im();
      checks++;
      if (gr - sr.re[y] > 0.02 || sr.re[y] - gr > 0.02 || gi - sr.im[y] > 0.02 || sr.im[y] - gi > 0.02) begin
        failures++; $display("FAIL Grover-7 amp %0d", y);
      end
      if (y == 45) p = gr * gr + gi * gi;
    end
    $display("Grover 7 qubits: %0d gates, P(45) = %f", sc.size(), p);
    checks++;
    if (p < 0.98) begin failures++; $display("FAIL Grover-7 probability %f", p); end
    sc.delete();
    sc.push_back(mk(SV_INIT, G_H, 0, 0, 0, 100));
    qft_circuit(7, sc);
    sv_run(sc);
    for (int y = 0; y < DIM; y++) begin
      sv_rd_idx = SQ'(y); #1;
      th = 2.0 * PI * real'(100 * y) / 128.0;
      er = (y < 128) ? $cos(th) / $sqrt(128.0) : 0.0;
      ei = (y < 128) ? $sin(th) / $sqrt(128.0) : 0.0;
      gr = amp_re(); gi = amp_im();
      checks++;
      if (gr - er > 0.002 || er - gr > 0.002 || gi - ei > 0.002 || ei - gi > 0.002) begin
        failures++; $display("FAIL QFT-7 amp %0d", y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
