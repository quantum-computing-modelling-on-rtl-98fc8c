// tb_complex_mult: random unit-range operands; the product is compared with
// real arithmetic and must be within one unit in the last place.
module tb_complex_mult;
  import sv_pkg::*;

  cplx_t a, b, p;
  int checks = 0, failures = 0;

  complex_mult dut (.a(a), .b(b), .p(p));

  function automatic real fx2r(input fx_t v);
    return real'(v) / real'(1 << FX_FRAC);
  endfunction

  initial begin
    real er, ei, s;
    s = real'(1 << FX_FRAC);
    for (int t = 0; t < 2000; t++) begin
      a.re = fx_t'($signed($urandom_range(0, 2*46341)) - 46341);
      a.im = fx_t'($signed($urandom_range(0, 2*46341)) - 46341);
      b.re = fx_t'($signed($urandom_range(0, 2*46341)) - 46341);
      b.im = fx_t'($signed($urandom_range(0, 2*46341)) - 46341);
      if (t == 0) begin a = '{re: FX_ONE, im: FX_ZERO}; b = '{re: -FX_ONE, im: FX_ZERO}; end
      #1;
      er = (fx2r(a.re)*fx2r(b.re) - fx2r(a.im)*fx2r(b.im)) * s;
      ei = (fx2r(a.re)*fx2r(b.im) + fx2r(a.im)*fx2r(b.re)) * s;
      checks++;
      if (real'(p.re) - er > 1.0 || er - real'(p.re) > 1.0 ||
          real'(p.im) - ei > 1.0 || ei - real'(p.im) > 1.0) begin
        failures++;
        $display("FAIL got (%0d,%0d) expected (%f,%f)", p.re, p.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
