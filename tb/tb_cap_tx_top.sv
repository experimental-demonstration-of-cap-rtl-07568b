// tb_cap_tx_top: end-to-end test of the 2D CAP transmitter at its default
// parameters. A reference model rebuilds the bit stream from the PRBS7
// recurrence, groups it into 4-bit indices (first bit = MSB), maps them
// with the constellation table, and predicts both outputs: the shaped
// signal by direct convolution with the two shaping filters, and each IFFT
// block by a floating-point inverse DFT of 8 consecutive symbols scaled by
// 2^11 (tolerance 4 LSB). The IFFT output is drained with random
// back-pressure and run is dropped for a while mid-test.
//
// Mechanisms counted (each must happen at least once): the chain stalling
// while the IFFT computes or unloads, pauses in the shaped output, IFFT
// output back-pressure, and the generator being paused by run.
module tb_cap_tx_top;
  import cap_pkg::*;
  import cap_ref_pkg::*;

  localparam int BLOCKS = 60;

  logic clk = 0, rst_n = 0, run = 0, ifft_ready = 0;
  logic shape_valid, ifft_valid;
  logic signed [SHAPE_OUT_W-1:0] shape_sample;
  logic signed [DATA_W-1:0] ifft_re, ifft_im;
  int checks = 0, failures = 0;

  cap_tx_top dut (.clk, .rst_n, .run, .shape_valid, .shape_sample,
                  .ifft_valid, .ifft_ready, .ifft_re, .ifft_im);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- reference
  int sa [$], sb [$];
  int fi [16], fq [16];

  function automatic int expect_sample(int n);
    automatic int k = n / 4, p = n % 4, acc = 0;
    for (int m = 0; m < 4; m++)
      if (k - m >= 0) acc += sa[k-m] * fi[p + 4*m] - sb[k-m] * fq[p + 4*m];
    return acc;
  endfunction

  initial begin
    bit b [$];
    for (int i = 0; i < 7; i++) b.push_back(1'b1);
    for (int i = 7; i < 4 * 8 * BLOCKS + 64; i++) b.push_back(b[i-7] ^ b[i-6]);
    for (int s = 0; s < 8 * BLOCKS + 8; s++) begin
      automatic int idx = 8 * b[4*s] + 4 * b[4*s+1] + 2 * b[4*s+2] + b[4*s+3];
      sa.push_back(REF_A[idx]);
      sb.push_back(REF_B[idx]);
    end
    for (int n = 0; n < 16; n++) begin
      fi[n] = ref_coef(0, n, 16, 4, 2047);
      fq[n] = ref_coef(1, n, 16, 4, 2047);
    end
  end

  // ---------------------------------------------------------- monitors
  int n_shape = 0, n_ifft = 0;
  int stalls = 0, shape_pauses = 0, backpressure = 0, run_pauses = 0;
  bit shape_started = 0;
  real exp_re [], exp_im [];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_sipo.sym_valid && !dut.u_ifft.in_ready) stalls++;
    if (!run) run_pauses++;
    if (shape_valid) begin
      shape_started = 1;
      checks++;
      if (int'(shape_sample) != expect_sample(n_shape)) begin
        failures++;
        if (failures < 10) $display("shaped %0d got %0d want %0d", n_shape, shape_sample, expect_sample(n_shape));
      end
      n_shape++;
    end else if (shape_started) shape_pauses++;
    if (ifft_valid && !ifft_ready) backpressure++;
    if (ifft_valid && ifft_ready) begin
      automatic int blk = n_ifft / 8, k = n_ifft % 8;
      if (k == 0) begin
        real in_re [], in_im [];
        in_re = new[8];
        in_im = new[8];
        for (int j = 0; j < 8; j++) begin
          in_re[j] = sa[8*blk + j] * 2048.0;
          in_im[j] = sb[8*blk + j] * 2048.0;
        end
        ref_idft(in_re, in_im, exp_re, exp_im);
      end
      checks += 2;
      if ((real'(ifft_re) - exp_re[k]) ** 2 > 16.0 || (real'(ifft_im) - exp_im[k]) ** 2 > 16.0) begin
        failures++;
        if (failures < 10) $display("ifft blk %0d out %0d got (%0d,%0d) want (%f,%f)", blk, k, ifft_re, ifft_im, exp_re[k], exp_im[k]);
      end
      n_ifft++;
    end
  end

  // ---------------------------------------------------------- stimulus
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run   <= 1;
    while (n_ifft < 8 * BLOCKS) begin
      ifft_ready <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (n_ifft >= 8 * (BLOCKS / 2) && run_pauses == 0) begin
        run <= 0;
        repeat (30) @(posedge clk);
        run <= 1;
      end
    end
    run <= 0;
    repeat (40) @(posedge clk);
    // Every symbol taken went to both modulators.
    checks++;
    if (n_shape < 4 * n_ifft) begin failures++; $display("%0d shaped samples for %0d IFFT outputs", n_shape, n_ifft); end
    checks++; if (stalls == 0)       begin failures++; $display("chain never stalled"); end
    checks++; if (shape_pauses == 0) begin failures++; $display("shaped output never paused"); end
    checks++; if (backpressure == 0) begin failures++; $display("no IFFT back-pressure"); end
    checks++; if (run_pauses == 0)   begin failures++; $display("run never low"); end
    $display("stalls=%0d shape_pauses=%0d backpressure=%0d run_pauses=%0d shaped=%0d ifft=%0d",
             stalls, shape_pauses, backpressure, run_pauses, n_shape, n_ifft);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
