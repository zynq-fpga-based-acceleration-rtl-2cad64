// cdft_cmac: one MAC lane of the CDFT engine, multiplying one sample by one
// twiddle factor.
//
// Forward transform (kernel e^-j*theta):
//   p_re = f_re*cos + f_im*sin,  p_im = f_im*cos - f_re*sin
// Inverse transform (kernel e^+j*theta):
//   p_re = f_re*cos - f_im*sin,  p_im = f_re*sin + f_im*cos
// In DFT mode the input is an image, which is real, so the terms with f_im
// are dropped (the imaginary input is ignored and never needs to be loaded);
// only the IDFT uses all four products. Both modes share the same four
// multipliers: the sine sign and the imaginary operand are selected by mode.
//
// Interface and timing: products appear on p_re/p_im one clock after a cycle
// with en high. Products keep all fraction bits (DATA_FRAC + COEF_FRAC).
module cdft_cmac
  import cdft_pkg::*;
(
  input  logic     clk,
  input  logic     en,
  input  mode_e    mode,
  input  cplx_t    f,
  input  twiddle_t tw,
  output prod_t    p_re,
  output prod_t    p_im
);

  // Sine with the sign of the selected kernel, and the imaginary operand
  // (forced to zero in DFT mode).
  // All operands are sign-extended to the product width first, so every
  // multiplication below is a plain signed PROD_W-bit one.
  prod_t fr, fi, c, s;

  always_comb begin
    fr = PROD_W'(f.re);
    fi = (mode == MODE_IDFT) ? PROD_W'(f.im) : '0;
    c  = PROD_W'(tw.cos_v);
    s  = (mode == MODE_IDFT) ? PROD_W'(tw.sin_v) : -PROD_W'(tw.sin_v);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      p_re <= fr * c - fi * s;
      p_im <= fr * s + fi * c;
    end
  end

endmodule
