// cap_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: the 16-point constellation as a literal table,
// the shaping filter taps from their defining formula, and a floating-point
// inverse DFT.
package cap_ref_pkg;

  localparam real PI = 3.141592653589793;

  // Constellation, index 0..15 -> (a, b): sign bits d3/d2, magnitude bits d1/d0.
  localparam int REF_A [16] = '{ 1,  1,  3,  3,  1,  1,  3,  3, -1, -1, -3, -3, -1, -1, -3, -3};
  localparam int REF_B [16] = '{ 1,  3,  1,  3, -1, -3, -1, -3,  1,  3,  1,  3, -1, -3, -1, -3};

  // Shaping tap n of a TAPS-tap filter, SPS samples per symbol, coefficient
  // scale AMP: AMP * sin^2(pi(n+0.5)/TAPS) * cos or sin(2 pi (n-(TAPS-1)/2)/SPS),
  // rounded half away from zero.
  function automatic int ref_coef(bit quad, int n, int taps, int sps, int amp);
    real t, w, v;
    t = n - (taps - 1) / 2.0;
    w = $sin(PI * (n + 0.5) / taps) ** 2;
    v = w * (quad ? $sin(2.0 * PI * t / sps) : $cos(2.0 * PI * t / sps)) * amp;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // out[n] = (1/N) sum_k in[k] exp(+j 2 pi k n / N)
  function automatic void ref_idft(input real in_re[], input real in_im[],
                                   output real out_re[], output real out_im[]);
    int n_pts = in_re.size();
    out_re = new[n_pts];
    out_im = new[n_pts];
    for (int n = 0; n < n_pts; n++) begin
      out_re[n] = 0.0;
      out_im[n] = 0.0;
      for (int k = 0; k < n_pts; k++) begin
        real c = $cos(2.0 * PI * k * n / n_pts);
        real s = $sin(2.0 * PI * k * n / n_pts);
        out_re[n] += in_re[k] * c - in_im[k] * s;
        out_im[n] += in_re[k] * s + in_im[k] * c;
      end
      out_re[n] /= n_pts;
      out_im[n] /= n_pts;
    end
  endfunction

endpackage
