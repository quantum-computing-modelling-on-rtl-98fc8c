// tb_heisenberg_emulator: loads circuits into the emulator, runs them and
// compares the whole stabilizer matrix with the reference afterwards.
// Circuits: a GHZ state (H, then a CNOT chain: rows X..X and Z_0 Z_j), and
// several random Clifford circuits with row multiplications and a non-zero
// initial basis state. Each run must end (done) exactly len + 2 clocks after
// start, i.e. one gate per clock.
module tb_heisenberg_emulator;
  import pauli_pkg::*;
  import tb_hzref_pkg::*;

  localparam int N = 10, DEPTH = 128, AW = 7;

  logic                clk = 0, rst_n = 0;
  logic                ld_we = 0;
  logic [AW-1:0]       ld_addr = '0;
  hz_instr_t           ld_data;
  logic                start = 0;
  logic [AW:0]         len = '0;
  logic [N-1:0]        init_state = '0;
  logic                busy, done;
  logic [HZ_IDX_W-1:0] rd_row = '0;
  logic [N-1:0]        rd_x, rd_z;
  iphase_t             rd_ph;
  logic                commute;

  heisenberg_emulator #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  hz_ref rf;

  task automatic run(input hz_instr_t c[$], input string what);
    int cyc = 0;
    foreach (c[i]) begin
      @(negedge clk);
      ld_we = 1; ld_addr = AW'(i); ld_data = c[i];
      rf.apply(c[i], 256'(init_state));
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
    for (int r = 0; r < N; r++) begin
      rd_row = HZ_IDX_W'(r);
      #1;
      checks++;
      for (int j = 0; j < N; j++)
        if (int'({rd_x[j], rd_z[j]}) != rf.lit[r][j] || int'(rd_ph) != rf.ph[r]) begin
          failures++;
          $display("FAIL %s: row %0d differs", what, r);
          break;
        end
    end
    checks++;
    if (commute != rf.last_commute) begin failures++; $display("FAIL %s: commute", what); end
  endtask

  initial begin
    hz_instr_t c[$];
    rf = new(N);
    ld_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // GHZ
    c.push_back(hz_mk(HZ_INIT, 0, 0));
    c.push_back(hz_mk(HZ_H, 0, 0));
    for (int j = 1; j < N; j++) c.push_back(hz_mk(HZ_CNOT, 0, j));
    run(c, "GHZ");
    checks++;
    for (int j = 0; j < N; j++)
      if (rf.lit[0][j] != 2 || (j > 0 && (rf.lit[j][0] != 1 || rf.lit[j][j] != 1))) begin
        failures++; $display("FAIL GHZ rows not X..X / Z0 Zj"); break;
      end
    // random circuits
    for (int t = 0; t < 6; t++) begin
      c.delete();
      init_state = N'($urandom);
      c.push_back(hz_mk(HZ_INIT, 0, 0));
      for (int g = 0; g < 100; g++) c.push_back(hz_random(N));
      run(c, $sformatf("random %0d", t));
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
