// tb_gate_coef_rom: every gate's coefficients against values computed with
// real arithmetic ($sqrt, $cos, $sin), to within one unit in the last place.
module tb_gate_coef_rom;
  import sv_pkg::*;

  sv_gate_e   gate;
  logic [3:0] k;
  cplx_t      u00, u01, u10, u11;
  int checks = 0, failures = 0;

  gate_coef_rom dut (.*);

  task automatic chk(input cplx_t got, input real re, input real im, input string what);
    real s = real'(1 << FX_FRAC);
    checks++;
    if (real'(got.re) - re*s > 1.0 || re*s - real'(got.re) > 1.0 ||
        real'(got.im) - im*s > 1.0 || im*s - real'(got.im) > 1.0) begin
      failures++;
      $display("FAIL %s: got (%0d,%0d) expected (%f,%f)", what, got.re, got.im, re*s, im*s);
    end
  endtask

  initial begin
    real h, pi, th;
    h  = 1.0 / $sqrt(2.0);
    pi = 3.14159265358979323846;
    gate = G_H; k = 0; #1;
    chk(u00, h, 0, "H00"); chk(u01, h, 0, "H01"); chk(u10, h, 0, "H10"); chk(u11, -h, 0, "H11");
    gate = G_X; #1;
    chk(u00, 0, 0, "X00"); chk(u01, 1, 0, "X01"); chk(u10, 1, 0, "X10"); chk(u11, 0, 0, "X11");
    gate = G_Z; #1;
    chk(u00, 1, 0, "Z00"); chk(u01, 0, 0, "Z01"); chk(u10, 0, 0, "Z10"); chk(u11, -1, 0, "Z11");
    gate = G_R;
    for (int kk = 1; kk <= 8; kk++) begin
      k = 4'(kk); #1;
      th = 2.0 * pi / real'(1 << kk);
      chk(u00, 1, 0, "R00"); chk(u01, 0, 0, "R01"); chk(u10, 0, 0, "R10");
      chk(u11, $cos(th), $sin(th), $sformatf("R%0d", kk));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
