// cap_shaping: carrierless amplitude/phase modulator. The symbol pair
// (a_k, b_k) is upsampled by SPS and passed through two orthogonal shaping
// filters, an in-phase filter f_I for a_k and a quadrature filter f_Q for
// b_k, and the quadrature output is subtracted from the in-phase output:
//
//   s[n] = sum_k a_k * f_I[n - k*SPS]  -  b_k * f_Q[n - k*SPS]
//
// Because the upsampled stream is zero except at symbol instants, the
// filter is computed in polyphase form. The last SPAN symbols are held in a
// history register; output sample p (0..SPS-1) of the newest symbol k is
//   s[k*SPS + p] = sum_{m=0}^{SPAN-1} a_{k-m} f_I[p + m*SPS] - b_{k-m} f_Q[p + m*SPS]
// and needs SPAN multiply pairs per cycle. The sum is kept at full
// precision (SHAPE_OUT_W bits), so the output is exact.
//
// Interface: symbols arrive on a valid/ready stream and SPS samples leave,
// one per cycle, on samp_valid/samp (no back-pressure on the output).
// sym_ready is high while fewer than two samples of the current symbol are
// left, so a symbol offered every SPS cycles gives a gap-free output.
// Timing: the first sample of a symbol is registered one cycle after the
// symbol is accepted. The history starts at zero after reset.
//
// The subtraction of the two filter outputs follows the CAP modulator of the
// source description; the filter shape (cos/sin of frequency 1/SPS under a
// sin^2 window, see cap_pkg), SPS and SPAN are this design's choices.
module cap_shaping
  import cap_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          sym_valid,
  output logic                          sym_ready,
  input  sym_t                          sym,
  output logic                          samp_valid,
  output logic signed [SHAPE_OUT_W-1:0] samp
);

  sym_t                       hist [SPAN];   // hist[0] = newest symbol
  logic [$clog2(SPS+1)-1:0]   left;          // samples still to send, 0..SPS
  logic [$clog2(SPS)-1:0]     phase;         // next sample's phase
  logic                       take;

  assign sym_ready = (left <= 1);
  assign take      = sym_valid && sym_ready;

  // Polyphase sum for the current phase.
  logic signed [SHAPE_OUT_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int m = 0; m < SPAN; m++) begin
      acc += SHAPE_OUT_W'(hist[m].a * SHAPE_I[int'(phase) + m*SPS]);
      acc -= SHAPE_OUT_W'(hist[m].b * SHAPE_Q[int'(phase) + m*SPS]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < SPAN; m++) hist[m] <= '0;
      left       <= '0;
      phase      <= '0;
      samp_valid <= 1'b0;
      samp       <= '0;
    end else begin
      samp_valid <= (left != 0);
      if (left != 0) begin
        samp  <= acc;
        phase <= phase + 1'b1;
      end
      if (take) begin
        hist[0] <= sym;
        for (int m = 1; m < SPAN; m++) hist[m] <= hist[m-1];
        left  <= ($bits(left))'(SPS);
        phase <= '0;
      end else if (left != 0) begin
        left <= left - 1'b1;
      end
    end
  end

endmodule
