// cap_tx_top: two-dimensional carrierless amplitude/phase (2D CAP)
// transmitter.
//
// Data path:
//   prbs_lfsr -> sipo -> cap_mapper -+-> cap_shaping -> shape_sample (real CAP signal)
//                                    +-> ifft8       -> ifft_re / ifft_im
// The random generator produces the bit stream, the serial-to-parallel
// converter groups it into 4-bit indices, and the mapper turns each index
// into a constellation point (a_k, b_k). Every point goes to both
// modulators: the shaping filter pair, which makes the classic CAP
// waveform, and the inverse FFT, which takes the points in blocks of N_FFT
// as frequency-domain values (a_k + j*b_k) and returns the time-domain
// block. For the IFFT, the 8-bit symbol levels are scaled up by
// 2^IFFT_SHIFT to use its 16-bit range.
//
// Flow control: a symbol leaves the mapper only when both modulators can
// take it (a joint valid/ready fork). The shaping filter wants one symbol
// every 4 cycles; the IFFT accepts symbols only while loading, so while it
// computes and unloads a block the whole chain stalls back to the bit
// generator and the shaped output pauses. No data is ever dropped.
//
// Interface: run starts the bit generator; shape_valid/shape_sample carry
// the shaped signal (no back-pressure); ifft_valid/ifft_ready/ifft_re/
// ifft_im carry the IFFT output blocks in natural order. The shaped and the
// IFFT outputs are where digital-to-analog converters would connect.
//
// The four transmitter functions come from the source description; how they
// are joined (the fork and the stalling) is this design's choice.
module cap_tx_top
  import cap_pkg::*;
#(
  parameter int IFFT_SHIFT = 11
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  output logic                          shape_valid,
  output logic signed [SHAPE_OUT_W-1:0] shape_sample,
  output logic                          ifft_valid,
  input  logic                          ifft_ready,
  output logic signed [DATA_W-1:0]      ifft_re,
  output logic signed [DATA_W-1:0]      ifft_im
);

  // Largest IFFT input modulus must stay below 2^(DATA_W-1).
  initial assert (3 * 1.4143 * (2.0 ** IFFT_SHIFT) < 2.0 ** (DATA_W - 1))
    else $error("cap_tx_top: IFFT_SHIFT too large for DATA_W");

  // ---------------------------------------------------------------- bits
  logic bit_valid, bit_ready, bit_val;

  prbs_lfsr u_rng (
    .clk, .rst_n, .run,
    .bit_valid, .bit_ready, .bit_o(bit_val)
  );

  // ---------------------------------------------------------------- symbols
  logic     sym_valid, sym_ready;
  sym_idx_t sym_idx;
  sym_t     sym;

  sipo #(.BITS(BITS_PER_SYM)) u_sipo (
    .clk, .rst_n,
    .bit_valid, .bit_ready, .bit_i(bit_val),
    .sym_valid, .sym_ready, .sym_idx
  );

  cap_mapper u_map (.idx(sym_idx), .sym);

  // ---------------------------------------------------------------- fork
  logic shp_ready, fft_ready;

  assign sym_ready = shp_ready && fft_ready;

  cap_shaping u_shape (
    .clk, .rst_n,
    .sym_valid(sym_valid && fft_ready), .sym_ready(shp_ready), .sym,
    .samp_valid(shape_valid), .samp(shape_sample)
  );

  logic signed [DATA_W-1:0] fft_in_re, fft_in_im;
  assign fft_in_re = DATA_W'(sym.a) <<< IFFT_SHIFT;
  assign fft_in_im = DATA_W'(sym.b) <<< IFFT_SHIFT;

  ifft8 #(.N(N_FFT), .W(DATA_W)) u_ifft (
    .clk, .rst_n,
    .in_valid(sym_valid && shp_ready), .in_ready(fft_ready),
    .in_re(fft_in_re), .in_im(fft_in_im),
    .out_valid(ifft_valid), .out_ready(ifft_ready),
    .out_re(ifft_re), .out_im(ifft_im)
  );

endmodule
