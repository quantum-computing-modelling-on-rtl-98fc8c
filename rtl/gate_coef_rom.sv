// gate_coef_rom: the 2x2 unitary [u00 u01; u10 u11] of each basic gate.
//
//   H   = 1/sqrt(2) [1 1; 1 -1]
//   X   = [0 1; 1 0]
//   Z   = [1 0; 0 -1]
//   R_k = [1 0; 0 exp(2*pi*i/2^k)],  k = 1 .. 8
// R_1 is Z, R_2 the phase gate S and R_3 the T gate; the controlled R_k are
// the rotations of the quantum Fourier transform. Coefficients are in the
// amplitude format of sv_pkg: each entry is round(value * 2^16). The R_k
// table holds round(cos(2*pi/2^k) * 2^16) and round(sin(2*pi/2^k) * 2^16).
// k outside 1 .. 8 gives the identity. Purely combinational.
module gate_coef_rom
  import sv_pkg::*;
(
  input  sv_gate_e gate,
  input  logic [3:0] k,
  output cplx_t    u00,
  output cplx_t    u01,
  output cplx_t    u10,
  output cplx_t    u11
);

  localparam fx_t INV_SQRT2 = fx_t'(46341);   // round(2^16 / sqrt(2))

  cplx_t rk;
  always_comb begin
    unique case (k)
      4'd1:    rk = '{re: -fx_t'(65536), im: fx_t'(0)};
      4'd2:    rk = '{re: fx_t'(0),      im: fx_t'(65536)};
      4'd3:    rk = '{re: fx_t'(46341),  im: fx_t'(46341)};
      4'd4:    rk = '{re: fx_t'(60547),  im: fx_t'(25080)};
      4'd5:    rk = '{re: fx_t'(64277),  im: fx_t'(12785)};
      4'd6:    rk = '{re: fx_t'(65220),  im: fx_t'(6424)};
      4'd7:    rk = '{re: fx_t'(65457),  im: fx_t'(3216)};
      4'd8:    rk = '{re: fx_t'(65516),  im: fx_t'(1608)};
      default: rk = '{re: FX_ONE,        im: FX_ZERO};
    endcase
  end

  localparam cplx_t C0 = '{re: FX_ZERO, im: FX_ZERO};
  localparam cplx_t C1 = '{re: FX_ONE,  im: FX_ZERO};

  always_comb begin
    unique case (gate)
      G_H: begin
        u00 = '{re: INV_SQRT2, im: FX_ZERO};
        u01 = '{re: INV_SQRT2, im: FX_ZERO};
        u10 = '{re: INV_SQRT2, im: FX_ZERO};
        u11 = '{re: -INV_SQRT2, im: FX_ZERO};
      end
      G_X: begin
        u00 = C0; u01 = C1; u10 = C1; u11 = C0;
      end
      G_Z: begin
        u00 = C1; u01 = C0; u10 = C0; u11 = '{re: -FX_ONE, im: FX_ZERO};
      end
      default: begin   // G_R
        u00 = C1; u01 = C0; u10 = C0; u11 = rk;
      end
    endcase
  end

endmodule
