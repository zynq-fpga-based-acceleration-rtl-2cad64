// tb_cdft_ref_pkg: reference model for the CDFT testbenches.
//
// Computes the 2-D DFT and IDFT directly from their definitions in double
// precision, with sin/cos evaluated for every term, and converts between real
// numbers and the 16.16 fixed-point sample format. It shares no code or table
// with the design.
package tb_cdft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef real rvec_t [];

  function automatic int to_fix(real r);
    return $rtoi($floor(r * 65536.0 + 0.5));
  endfunction

  function automatic real from_fix(int v);
    return real'(v) / 65536.0;
  endfunction

  // out(p,q) = scale * sum_{i,k} in(i,k) * e^(sgn*j*2*pi*(p*i/M + q*k/N)),
  // with sgn = -1, scale = 1 for the DFT and sgn = +1, scale = 1/(M*N) for the
  // IDFT. When real_in is set the imaginary input is taken as zero.
  function automatic void dft2(input int m, input int n, input bit inverse,
                               input bit real_in,
                               input rvec_t in_re, input rvec_t in_im,
                               output rvec_t out_re, output rvec_t out_im);
    real sgn, scale;
    sgn   = inverse ? 1.0 : -1.0;
    scale = inverse ? 1.0 / real'(m * n) : 1.0;
    out_re = new[m * n];
    out_im = new[m * n];
    for (int p = 0; p < m; p++) begin
      for (int q = 0; q < n; q++) begin
        real sr, si;
        sr = 0.0;
        si = 0.0;
        for (int i = 0; i < m; i++) begin
          for (int k = 0; k < n; k++) begin
            real th, c, s, ar, ai;
            th = sgn * 2.0 * PI * (real'(p * i) / real'(m) + real'(q * k) / real'(n));
            c  = $cos(th);
            s  = $sin(th);
            ar = in_re[i * n + k];
            ai = real_in ? 0.0 : in_im[i * n + k];
            sr += ar * c - ai * s;
            si += ar * s + ai * c;
          end
        end
        out_re[p * n + q] = sr * scale;
        out_im[p * n + q] = si * scale;
      end
    end
  endfunction

endpackage
