// tb_sv_datapath: applies random gates (H, X, Z, R_k with random controls,
// swaps, initialisations) to a 4-qubit state and compares every amplitude
// after every gate with a floating-point reference. Coefficients come from
// the testbench, rounded to the fixed-point format. The tolerance grows with
// the number of gates since the last initialisation (3 units in the last
// place per gate). The result must be visible one clock after the gate.
module tb_sv_datapath;
  import sv_pkg::*;
  import tb_svref_pkg::*;

  localparam int NQ = 4;

  logic          clk = 0, rst_n = 0, in_valid = 0;
  sv_instr_t     in_instr;
  cplx_t         u00, u01, u10, u11;
  logic [NQ-1:0] rd_idx = '0;
  cplx_t         rd_amp;

  sv_datapath #(.NQ(NQ)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, depth = 0;
  sv_ref ref_m;

  function automatic fx_t r2fx(real v);
    real s = v * real'(1 << FX_FRAC);
    return fx_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  task automatic compare(input string what);
    real tol = (3.0 * real'(depth) + 1.0) / real'(1 << FX_FRAC);
    for (int i = 0; i < (1 << NQ); i++) begin
      real gr, gi;
      rd_idx = NQ'(i);
      #1;
      gr = real'(rd_amp.re) / real'(1 << FX_FRAC);
      gi = real'(rd_amp.im) / real'(1 << FX_FRAC);
      checks++;
      if (gr - ref_m.re[i] > tol || ref_m.re[i] - gr > tol ||
          gi - ref_m.im[i] > tol || ref_m.im[i] - gi > tol) begin
        failures++;
        $display("FAIL %s amp %0d: got (%f,%f) expected (%f,%f)", what, i, gr, gi,
                 ref_m.re[i], ref_m.im[i]);
      end
    end
  endtask

  task automatic issue(input sv_instr_t ins);
    real mr[2][2], mi[2][2];
    sv_ref::gate_m(ins.gate, int'(ins.k), mr, mi);
    @(negedge clk);
    in_instr = ins;
    u00 = '{re: r2fx(mr[0][0]), im: r2fx(mi[0][0])};
    u01 = '{re: r2fx(mr[0][1]), im: r2fx(mi[0][1])};
    u10 = '{re: r2fx(mr[1][0]), im: r2fx(mi[1][0])};
    u11 = '{re: r2fx(mr[1][1]), im: r2fx(mi[1][1])};
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    ref_m.apply(ins);
    depth = (ins.op == SV_INIT) ? 0 : depth + 1;
    compare(ins.op.name());
  endtask

  initial begin
    ref_m = new(NQ);
    in_instr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare("reset");
    // H(x)H on |00>: all four amplitudes 1/2
    issue(mk(SV_GATE, G_H, 0, 0, 0, 0));
    issue(mk(SV_GATE, G_H, 0, 1, 0, 0));
    for (int t = 0; t < 200; t++) begin
      automatic int c = $urandom_range(0, 9);
      automatic int tg = $urandom_range(0, NQ-1);
      automatic int ar = (tg + $urandom_range(1, NQ-1)) % NQ;
      automatic int ct = $urandom_range(0, 2) == 0 ? int'($urandom_range(0, (1 << NQ) - 1)) : 0;
      if (c == 0 || depth > 40) issue(mk(SV_INIT, G_H, 0, 0, 0, $urandom_range(0, (1 << NQ) - 1)));
      else if (c == 1) issue(mk(SV_SWAP, G_H, 0, tg, ar, 0));
      else issue(mk(SV_GATE, sv_gate_e'($urandom_range(0, 3)), $urandom_range(1, 8), tg, 0, ct));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
