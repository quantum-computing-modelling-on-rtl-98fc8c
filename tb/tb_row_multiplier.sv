// tb_row_multiplier: random stabilizer rows multiplied column by column with
// explicit Pauli matrices; checks the product row, its phase and the
// commute flag (rows commute when an even number of columns anticommute).
module tb_row_multiplier;
  import pauli_pkg::*;
  import tb_qref_pkg::*;

  localparam int N = 7;

  logic [N-1:0] lx, lz, rx, rz, px, pz;
  iphase_t      lph, rph, pph;
  logic         commute;
  int checks = 0, failures = 0;
  int n_comm = 0, n_anti = 0;

  row_multiplier #(.N(N)) dut (.*);

  initial begin
    int p, k, ksum, anti, ep, ek;
    for (int t = 0; t < 400; t++) begin
      lx = N'($urandom); lz = N'($urandom); rx = N'($urandom); rz = N'($urandom);
      lph = iphase_t'($urandom); rph = iphase_t'($urandom);
      #1;
      ksum = int'(lph) + int'(rph);
      anti = 0;
      for (int j = 0; j < N; j++) begin
        lit_mul(int'({lx[j], lz[j]}), int'({rx[j], rz[j]}), p, k);
        ksum += k;
        if (k % 2 == 1) anti++;
        checks++;
        if (int'({px[j], pz[j]}) != p) begin
          failures++;
          $display("FAIL column %0d literal", j);
        end
      end
      ep = ksum % 4;
      checks++;
      if (int'(pph) != ep || commute != (anti % 2 == 0)) begin
        failures++;
        $display("FAIL phase got %0d expected %0d, commute %0d anti=%0d", pph, ep, commute, anti);
      end
      if (anti % 2 == 0) n_comm++; else n_anti++;
    end
    checks++;
    if (n_comm == 0 || n_anti == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
