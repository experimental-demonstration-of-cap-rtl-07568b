// ifft_butterfly: the single radix-2 decimation-in-time butterfly of the
// IFFT, with its twiddle applied by CORDIC and a divide-by-two per stage.
//
//   t = b * exp(+j*theta)          (CORDIC rotation, theta = ang)
//   x = (a + t) / 2,   y = (a - t) / 2
//
// The positive rotation makes this an inverse transform; halving at each of
// the log2(N) stages gives the 1/N factor of the IFFT and keeps every value
// in range: if |a| and |b| (complex moduli) are below 2^(W-1), so are |x|
// and |y|. The halving rounds half up, and results are saturated to W bits
// so rounding at full scale cannot wrap.
//
// Interface: combinational; the IFFT controller reads a and b from its
// RAMs and writes x and y back in the same cycle.
//
// The butterfly and the CORDIC twiddle follow the source description;
// scaling, rounding and saturation are this design's choices.
module ifft_butterfly
  import cap_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic signed [W-1:0]     a_re, a_im,
  input  logic signed [W-1:0]     b_re, b_im,
  input  logic signed [ANG_W-1:0] ang,
  output logic signed [W-1:0]     x_re, x_im,
  output logic signed [W-1:0]     y_re, y_im
);

  logic signed [W:0] t_re, t_im;

  cordic_rotator #(.W(W), .ANG_W(ANG_W)) u_twiddle (
    .x_i(b_re), .y_i(b_im), .ang(ang), .x_o(t_re), .y_o(t_im)
  );

  // (p + q + 1) / 2, saturated to W bits.
  function automatic logic signed [W-1:0] half_sat(logic signed [W+1:0] s);
    logic signed [W+1:0] h;
    h = (s + 1) >>> 1;
    if (h > (W+2)'(2**(W-1) - 1))  return {1'b0, {(W-1){1'b1}}};
    if (h < -(W+2)'(2**(W-1)))     return {1'b1, {(W-1){1'b0}}};
    return h[W-1:0];
  endfunction

  always_comb begin
    x_re = half_sat((W+2)'(a_re) + (W+2)'(t_re));
    x_im = half_sat((W+2)'(a_im) + (W+2)'(t_im));
    y_re = half_sat((W+2)'(a_re) - (W+2)'(t_re));
    y_im = half_sat((W+2)'(a_im) - (W+2)'(t_im));
  end

endmodule
