// complex_mult: fixed-point complex product p = a * b.
//
// Both operands and the result use the amplitude format of sv_pkg (18-bit
// two's complement, 16 fraction bits, per real and imaginary part). The four
// partial products are kept at full width, combined, then rounded to nearest
// (half up) and cut back to 18 bits. Inputs are unit-modulus gate
// coefficients and amplitudes of magnitude at most one, so the result cannot
// overflow. Purely combinational; on an FPGA each part maps to DSP multipliers.
// The number format and the rounding are this design's choices.
module complex_mult
  import sv_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t p
);

  localparam int unsigned PW = 2 * FX_W + 1;

  logic signed [PW-1:0] re_full, im_full;
  logic signed [PW-1:0] re_rnd,  im_rnd;

  always_comb begin
    re_full = PW'(a.re * b.re) - PW'(a.im * b.im);
    im_full = PW'(a.re * b.im) + PW'(a.im * b.re);
    re_rnd  = (re_full + PW'(1 << (FX_FRAC - 1))) >>> FX_FRAC;
    im_rnd  = (im_full + PW'(1 << (FX_FRAC - 1))) >>> FX_FRAC;
  end

  assign p.re = re_rnd[FX_W-1:0];
  assign p.im = im_rnd[FX_W-1:0];

endmodule
