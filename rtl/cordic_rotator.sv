// cordic_rotator: rotates the complex sample (x_i, y_i) by the angle ang
// with the CORDIC shift-and-add algorithm, the way the IFFT applies its
// twiddle factors without a multiplier per twiddle.
//
// The angle is a binary angle: 2^ANG_W is a full turn, so ang = 2^(ANG_W-2)
// is +90 degrees. An angle beyond +-90 degrees is first brought into range
// by negating the vector and adding half a turn. ITER micro-rotations by
// +-atan(2^-i) then drive the residual angle to zero. The micro-rotations
// grow the vector by K = prod sqrt(1 + 2^-2i) (about 1.6468); one constant
// multiplication by round(2^GAIN_FRAC / K) at the end removes it.
// GUARD fractional bits on the vector and AFRAC on the residual angle are
// carried through the iterations to limit rounding error; the result is
// rounded to nearest. With the defaults the error stays within 2 LSB.
//
// Interface: combinational. The output is one bit wider than the input
// because a rotation can turn (max, max) into (sqrt(2)*max, 0).
// The arctangent table and 1/K are computed at elaboration from their
// formulas.
//
// The source description says the IFFT stages are joined through a CORDIC
// algorithm; iteration count, widths and rounding are this design's choices.
module cordic_rotator #(
  parameter int W     = cap_pkg::DATA_W,
  parameter int ANG_W = cap_pkg::ANG_W,
  parameter int ITER  = cap_pkg::CORDIC_ITER,
  parameter int GUARD = 5,
  parameter int AFRAC = 6
) (
  input  logic signed [W-1:0]     x_i,
  input  logic signed [W-1:0]     y_i,
  input  logic signed [ANG_W-1:0] ang,
  output logic signed [W:0]       x_o,
  output logic signed [W:0]       y_o
);

  localparam int IW        = W + 2 + GUARD;   // iteration width
  localparam int GAIN_FRAC = 16;
  localparam real PI = 3.141592653589793;

  localparam int ZW        = ANG_W + AFRAC;  // residual angle width

  typedef logic signed [ZW-1:0] ang_t;
  typedef ang_t atan_tab_t [ITER];

  // atan(2^-i) as a binary angle, rounded.
  function automatic atan_tab_t atan_table();
    atan_tab_t r;
    for (int i = 0; i < ITER; i++)
      r[i] = ang_t'($rtoi($atan(2.0 ** (-i)) / (2.0 * PI) * (2.0 ** ZW) + 0.5));
    return r;
  endfunction

  // round(2^GAIN_FRAC / K)
  function automatic int inv_gain();
    real k;
    k = 1.0;
    for (int i = 0; i < ITER; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return $rtoi((2.0 ** GAIN_FRAC) / k + 0.5);
  endfunction

  localparam atan_tab_t ATAN = atan_table();
  localparam int        KINV = inv_gain();

  logic signed [IW-1:0]          x, y, xs, ys;
  logic signed [ZW-1:0]          z;
  logic signed [IW+GAIN_FRAC:0]  xm, ym;
  logic signed [IW+GAIN_FRAC:0]  half;

  always_comb begin
    // Pre-rotation into [-90, +90] degrees.
    x = IW'(x_i) <<< GUARD;
    y = IW'(y_i) <<< GUARD;
    z = {ang, AFRAC'(0)};
    if (ang[ANG_W-1] != ang[ANG_W-2]) begin
      x = -x;
      y = -y;
      z[ZW-1] = ~z[ZW-1];
    end
    // Micro-rotations.
    for (int i = 0; i < ITER; i++) begin
      xs = x >>> i;
      ys = y >>> i;
      if (!z[ZW-1]) begin
        x = x - ys;
        y = y + xs;
        z = z - ATAN[i];
      end else begin
        x = x + ys;
        y = y - xs;
        z = z + ATAN[i];
      end
    end
    // Gain compensation and rounding back to W+1 bits.
    half = (IW+GAIN_FRAC+1)'(1) <<< (GAIN_FRAC + GUARD - 1);
    xm = (IW+GAIN_FRAC+1)'(x) * (IW+GAIN_FRAC+1)'(KINV) + half;
    ym = (IW+GAIN_FRAC+1)'(y) * (IW+GAIN_FRAC+1)'(KINV) + half;
    x_o = (W+1)'(xm >>> (GAIN_FRAC + GUARD));
    y_o = (W+1)'(ym >>> (GAIN_FRAC + GUARD));
  end

endmodule
