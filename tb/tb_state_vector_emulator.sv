// tb_state_vector_emulator: runs whole circuits through the emulator.
//  - QFT on 4 qubits applied to every basis state |x>: each amplitude y must
//    equal exp(2*pi*i*x*y/16)/4 (the discrete Fourier transform).
//  - Grover's search on 4 qubits, marked item 11, 3 rounds: compared with the
//    floating-point reference, and the marked item's probability must be
//    sin^2(7*asin(1/4)) = 0.96.
// Each run must end (done) exactly len + 2 clocks after start.
module tb_state_vector_emulator;
  import sv_pkg::*;
  import tb_svref_pkg::*;

  localparam int NQ = 4, DEPTH = 128, AW = 7, DIM = 1 << NQ;

  logic          clk = 0, rst_n = 0, ld_we = 0, start = 0;
  logic [AW-1:0] ld_addr = '0;
  sv_instr_t     ld_data;
  logic [AW:0]   len = '0;
  logic          busy, done;
  logic [NQ-1:0] rd_idx = '0;
  cplx_t         rd_amp;

  state_vector_emulator #(.NQ(NQ), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic run(input sv_instr_t c[$], input string what);
    int cyc;
    foreach (c[i]) begin
      @(negedge clk);
      ld_we = 1; ld_addr = AW'(i); ld_data = c[i];
    end
    @(negedge clk);
    ld_we = 0; start = 1; len = (AW+1)'(c.size());
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != c.size() + 2) begin
      failures++; $display("FAIL %s: done after %0d clocks, expected %0d", what, cyc, c.size() + 2);
    end
  endtask

  task automatic expect_amp(input int i, input real er, input real ei, input real tol,
                            input string what);
    real gr, gi;
    rd_idx = NQ'(i);
    #1;
    gr = real'(rd_amp.re) / real'(1 << FX_FRAC);
    gi = real'(rd_amp.im) / real'(1 << FX_FRAC);
    checks++;
    if (gr - er > tol || er - gr > tol || gi - ei > tol || ei - gi > tol) begin
      failures++;
      $display("FAIL %s amp %0d: got (%f,%f) expected (%f,%f)", what, i, gr, gi, er, ei);
    end
  endtask

  initial begin
    sv_instr_t c[$];
    sv_ref     rf;
    real       p, th;
    ld_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int x = 0; x < DIM; x++) begin
      c.delete();
      c.push_back(mk(SV_INIT, G_H, 0, 0, 0, x));
      qft_circuit(NQ, c);
      run(c, $sformatf("QFT |%0d>", x));
      for (int y = 0; y < DIM; y++) begin
        th = 2.0 * PI * real'(x * y) / real'(DIM);
        expect_amp(y, $cos(th) / $sqrt(real'(DIM)), $sin(th) / $sqrt(real'(DIM)), 0.002, "QFT");
      end
    end
    c.delete();
    grover_circuit(NQ, 11, 3, c);
    rf = new(NQ);
    foreach (c[i]) rf.apply(c[i]);
    run(c, "Grover");
    for (int y = 0; y < DIM; y++) expect_amp(y, rf.re[y], rf.im[y], 0.003, "Grover");
    p = rf.re[11] * rf.re[11] + rf.im[11] * rf.im[11];
    th = $sin(7.0 * $asin(0.25));
    checks++;
    if (p - th * th > 1e-6 || th * th - p > 1e-6) begin
      failures++; $display("FAIL Grover reference probability %f", p);
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
